// novel_lut: the proposed obfuscation primitive LUT_N + N:LUT_2, built from
// STT-LUTs. Each of the N select inputs of a size-N STT-LUT is driven by its
// own 2-input STT-LUT, so the block takes N pairs of inputs (2N signals) and
// gives one output:
//   out = BIG[ {L_N(in[N-1]), ..., L_1(in[0])} ],  L_j(a) = SMALL_j[a].
// In a SAT model this grows the MUX tree of the large LUT "vertically": every
// select line is itself a small MUX tree with its own key bits, so an attacker
// has to recover both levels at once.
//
// Configuration key, K = 2^N + 4N bits, all on one scan chain:
//   key[2^N-1:0]           entries of the large LUT (entry e at bit e)
//   key[2^N+4j+3:2^N+4j]   entries of the small LUT on select j (j = 0..N-1)
// The chain runs SI -> large LUT cells 0..2^N-1 -> small LUT 0 -> ... ->
// small LUT N-1 -> SO, so key bit p sits at chain position p: shift key[K-1]
// first and key[0] last, pulse WE, then raise SE and hold it. This order is
// this design's choice; the split into one large and N small LUTs follows the
// primitive's definition.
//
// Interface: sclk, si, we, se, so (configuration); in[N-1:0][1:0] (pair j
// feeds small LUT j, bit 0 is its select 0), out. Combinational from in to out.
module novel_lut
  import lut_obf_pkg::*;
#(
  parameter int unsigned N = LUT_SIZE
) (
  input  logic              sclk,
  input  logic              si,
  input  logic              we,
  input  logic              se,
  output logic              so,
  input  logic [N-1:0][1:0] in,
  output logic              out
);

  logic [N:0]   chain;  // chain[0]: large LUT SO; chain[j+1]: small LUT j SO
  logic [N-1:0] sel;    // outputs of the small LUTs

  stt_lut #(.N(N)) u_large (
    .sclk (sclk),
    .si   (si),
    .we   (we),
    .se   (se),
    .so   (chain[0]),
    .in   (sel),
    .out  (out)
  );

  for (genvar j = 0; j < N; j++) begin : g_small
    stt_lut #(.N(SMALL_LUT_SIZE)) u_small (
      .sclk (sclk),
      .si   (chain[j]),
      .we   (we),
      .se   (se),
      .so   (chain[j+1]),
      .in   (in[j]),
      .out  (sel[j])
    );
  end

  assign so = chain[N];

endmodule
