// lut_obf_top: the obfuscation fabric that is inserted into a host netlist.
// It holds NUM_LUTS blocks of LUT_N + N:LUT_2 in STT form, which keep their
// own key in MTJ latch cells, and NUM_KEYED_LUTS blocks of the same primitive
// in the form whose key comes from a separate non-volatile key macro. The
// LUT inputs and outputs are ports: they connect to the host netlist in place
// of the gates the LUTs replace.
//
// Key programming (STT form), done once in a trusted environment:
//   1. with cfg_we and cfg_se low, shift NUM_LUTS*K bits in on cfg_si with
//      cfg_sclk (K = 2^N + 4N). The chain runs cfg_si -> LUT 0 -> LUT 1 ...,
//      so the bits for the last LUT go in first; within a LUT see novel_lut.
//   2. pulse cfg_we: all MTJ pairs are written at once.
//   3. raise cfg_se (once per power-up) and keep it high: the keys are sensed
//      and the LUTs work as static logic. The scan flip-flops may then be
//      flushed; they no longer matter.
// The configuration chain is separate from any test scan chain and its
// scan-out is blocked: the last cell's SO goes nowhere (lint reports that
// chain bit as unused, on purpose), so the key cannot be
// shifted back out. The keyed form takes its keys on key_in, LUT j's key at
// key_in[j].
//
// Defaults: N = 7 and two STT blocks, the configuration the design is built
// around; two keyed blocks is this design's choice.
module lut_obf_top
  import lut_obf_pkg::*;
#(
  parameter int unsigned N              = LUT_SIZE,
  parameter int unsigned NUM_LUTS       = DEFAULT_NUM_LUTS,
  parameter int unsigned NUM_KEYED_LUTS = 2,
  localparam int unsigned K = novel_key_bits(N)
) (
  // dedicated configuration scan chain (no scan-out)
  input  logic                                cfg_sclk,
  input  logic                                cfg_si,
  input  logic                                cfg_we,
  input  logic                                cfg_se,
  // STT-form LUTs
  input  logic [NUM_LUTS-1:0][N-1:0][1:0]       lut_in,
  output logic [NUM_LUTS-1:0]                   lut_out,
  // keyed-form LUTs and the key from the external non-volatile macro
  input  logic [NUM_KEYED_LUTS-1:0][K-1:0]      key_in,
  input  logic [NUM_KEYED_LUTS-1:0][N-1:0][1:0] keyed_in,
  output logic [NUM_KEYED_LUTS-1:0]             keyed_out
);

  logic [NUM_LUTS:0] chain;  // chain[NUM_LUTS] is the blocked scan-out

  assign chain[0] = cfg_si;

  for (genvar i = 0; i < NUM_LUTS; i++) begin : g_stt
    novel_lut #(.N(N)) u_lut (
      .sclk (cfg_sclk),
      .si   (chain[i]),
      .we   (cfg_we),
      .se   (cfg_se),
      .so   (chain[i+1]),
      .in   (lut_in[i]),
      .out  (lut_out[i])
    );
  end

  for (genvar i = 0; i < NUM_KEYED_LUTS; i++) begin : g_keyed
    novel_lut_keyed #(.N(N)) u_lut (
      .key (key_in[i]),
      .in  (keyed_in[i]),
      .out (keyed_out[i])
    );
  end

endmodule
