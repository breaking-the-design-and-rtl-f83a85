// novel_lut_keyed: LUT_N + N:LUT_2 for the insertion mode in which the whole
// configuration key lives in a separate non-volatile key macro (e-fuse, MTJ or
// ReRAM) and reaches the LUT as plain inputs. There are no bit cells and no
// scan chain here: N 2-input muxes (the small LUTs) drive the selects of a
// 2^N:1 mux (the large LUT).
//   out = key[ {L_N(in[N-1]), ..., L_1(in[0])} ],  L_j(a) = key[2^N + 4j + a]
// The key layout is the same as novel_lut's, so one key vector configures
// either form identically.
//
// Interface: key[K-1:0] with K = 2^N + 4N, in[N-1:0][1:0], out.
// Purely combinational.
module novel_lut_keyed
  import lut_obf_pkg::*;
#(
  parameter int unsigned N = LUT_SIZE,
  localparam int unsigned K = novel_key_bits(N)
) (
  input  logic [K-1:0]      key,
  input  logic [N-1:0][1:0] in,
  output logic              out
);

  localparam int unsigned BIG = 1 << N;
  localparam int unsigned SML = 1 << SMALL_LUT_SIZE;

  logic [N-1:0] sel;

  for (genvar j = 0; j < N; j++) begin : g_small
    lut_mux #(.N(SMALL_LUT_SIZE)) u_small (
      .cfg (key[BIG + SML*j +: SML]),
      .sel (in[j]),
      .out (sel[j])
    );
  end

  lut_mux #(.N(N)) u_large (
    .cfg (key[BIG-1:0]),
    .sel (sel),
    .out (out)
  );

endmodule
