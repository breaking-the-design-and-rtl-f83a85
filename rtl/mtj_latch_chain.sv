// mtj_latch_chain: a column of LEN MTJ latch cells whose scan flip-flops are
// chained into one configuration scan chain (cell 0 takes SI, cell LEN-1
// drives SO), as in the LUT column of the STT-LUT. SCLK, WE and SE are shared
// by all cells, so one write pulse programs every MTJ pair in parallel and one
// SE edge senses them all.
//
// Loading: shift LEN bits in with SCLK; the bit shifted in first ends in cell
// LEN-1 and the last in cell 0. Then pulse WE (SE low), then raise SE and keep
// it high: q[k] then holds the bit written into cell k.
//
// Interface: sclk, si, we, se in; so out; q[LEN-1:0] the sensed bits.
// LEN has no default in the document; 16 here is the column of a 4-input LUT.
module mtj_latch_chain #(
  parameter int unsigned LEN = 16
) (
  input  logic           sclk,
  input  logic           si,
  input  logic           we,
  input  logic           se,
  output logic           so,
  output logic [LEN-1:0] q
);

  logic [LEN:0] chain;  // chain[k] feeds cell k; chain[LEN] is the scan-out

  assign chain[0] = si;

  for (genvar k = 0; k < LEN; k++) begin : g_cell
    logic qb_unused;
    mtj_latch u_cell (
      .sclk (sclk),
      .si   (chain[k]),
      .we   (we),
      .se   (se),
      .so   (chain[k+1]),
      .q    (q[k]),
      .qb   (qb_unused)
    );
  end

  assign so = chain[LEN];

endmodule
