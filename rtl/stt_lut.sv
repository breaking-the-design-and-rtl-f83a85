// stt_lut: STT-MRAM look-up table of size N. 2^N MTJ latch cells hold the
// truth table and form a configuration scan chain; a static 2^N:1 MUX picks
// the entry addressed by the N inputs. The path from the LUT inputs to its
// output is only the MUX, so once the MTJs have been sensed (SE high) the LUT
// behaves as static combinational logic like the standard cells around it.
//
// Configuration: shift the 2^N entries in on SI with SCLK, entry 2^N-1 first
// and entry 0 last; pulse WE with SE low; then raise SE and keep it high.
// out = entry[in] from then on. SO passes the chain on to the next LUT.
//
// Interface: sclk, si, we, se, so (configuration); in[N-1:0], out (logic).
module stt_lut #(
  parameter int unsigned N = 7
) (
  input  logic         sclk,
  input  logic         si,
  input  logic         we,
  input  logic         se,
  output logic         so,
  input  logic [N-1:0] in,
  output logic         out
);

  logic [(1<<N)-1:0] cfg;

  mtj_latch_chain #(.LEN(1 << N)) u_cells (
    .sclk (sclk),
    .si   (si),
    .we   (we),
    .se   (se),
    .so   (so),
    .q    (cfg)
  );

  lut_mux #(.N(N)) u_mux (
    .cfg (cfg),
    .sel (in),
    .out (out)
  );

endmodule
