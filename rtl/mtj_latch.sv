// mtj_latch: BEHAVIOURAL MODEL of the one-bit non-volatile MTJ latch cell.
// The real cell is a full-custom standard cell: a scan flip-flop, write
// drivers, a pair of differentially programmed magnetic tunnel junctions (MTJs)
// stacked between two metal layers, and a pre-charge (dynamic, latched) sense
// amplifier with output buffers. The MTJs are not logic, so this model only
// reproduces the cell's behaviour at its pins; it is meant for simulation.
//
// Behaviour, following the cell description:
//   * Scan flip-flop: captures SI on the rising edge of SCLK; its output is SO,
//     so a column of cells forms a configuration scan chain.
//   * Write: while WE is high the write drivers program the MTJ pair from the
//     scan flip-flop (one MTJ takes D, the other its complement DB). The pair
//     is modelled as one stored bit, mtj_state, that has no reset: it is
//     non-volatile and keeps its value through power cycles.
//   * Sense: while SE is low the sense amplifier is pre-charged; a rising edge
//     of SE fires it once and it then holds the MTJ state on Q/QB for as long
//     as SE stays high. The MTJs are therefore read once per power-up and the
//     LUT read path afterwards is purely static.
//   * Rules: SE must be low during a write and WE must be low during sensing;
//     both are checked by an assertion.
// Own choices where the description is silent: while pre-charged (SE low) both
// Q and QB read 0; the write is level-sensitive on WE, which is why the model
// holds a latch on mtj_state (it stands for the MTJ pair, not for a CMOS latch).
//
// Interface: sclk, si, we, se in; so, q, qb out. No clock other than SCLK and
// the SE edge; no reset.
module mtj_latch (
  input  logic sclk,
  input  logic si,
  input  logic we,
  input  logic se,
  output logic so,
  output logic q,
  output logic qb
);

  logic sff_q;      // scan flip-flop
  logic mtj_state;  // differential MTJ pair: 1 = "D" side programmed
  logic sa_q;       // value latched by the sense amplifier when fired

  always_ff @(posedge sclk) sff_q <= si;

  assign so = sff_q;

  // Write drivers: level-sensitive programming of the MTJ pair.
  always_latch begin
    if (we) mtj_state = sff_q;
  end

  // Sense amplifier fires on the rising edge of SE.
  always_ff @(posedge se) sa_q <= mtj_state;

  // Output buffers; pre-charged (both low) while SE is low.
  assign q  = se &  sa_q;
  assign qb = se & ~sa_q;

  // Write and sense must never overlap.
  always_comb begin
    assert (!(we && se)) else $error("mtj_latch: WE and SE high together");
  end

endmodule
