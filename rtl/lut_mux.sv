// lut_mux: the static 2^N:1 CMOS multiplexer of a LUT of size N (the
// synthesizable "soft macro" read path). It returns the configuration bit
// addressed by the N LUT inputs: out = cfg[sel].
//
// It is written as the MUX tree that also models the LUT in a SAT attack: N
// levels of 2:1 muxes, level 0 controlled by sel[0] and pairing cfg[2i] with
// cfg[2i+1], the last level controlled by sel[N-1]. Which input is the least
// significant select is this design's choice. Purely combinational.
//
// Interface: cfg[2^N-1:0] configuration bits, sel[N-1:0] LUT inputs, out.
module lut_mux #(
  parameter int unsigned N = 7
) (
  input  logic [(1<<N)-1:0] cfg,
  input  logic [N-1:0]      sel,
  output logic              out
);

  // level[l] holds the 2^(N-l) outputs of tree level l-1 (level[0] = cfg).
  logic [N:0][(1<<N)-1:0] level;

  always_comb begin
    level = '0;
    level[0] = cfg;
    for (int unsigned l = 0; l < N; l++) begin
      for (int unsigned i = 0; i < (1 << (N - l - 1)); i++) begin
        level[l+1][i] = sel[l] ? level[l][2*i+1] : level[l][2*i];
      end
    end
  end

  assign out = level[N][0];

endmodule
