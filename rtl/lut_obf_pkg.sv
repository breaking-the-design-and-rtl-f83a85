// lut_obf_pkg: sizes and key-length arithmetic shared by the obfuscation LUTs.
//
// The proposed primitive is a LUT of size n whose n select inputs are each
// driven by a 2-input LUT ("LUT_n + n:LUT_2"). Its configuration key holds the
// 2^n entries of the large LUT followed by the 4 entries of each small LUT:
//   key bits = 2^n + n * 2^2.
// The defaults (n = 7, two such LUTs) are the configuration the design is
// built around; the key layout is this design's own choice and is described
// in novel_lut.sv.
package lut_obf_pkg;

  // Size (number of inputs) of the large LUT of the main configuration.
  localparam int unsigned LUT_SIZE       = 7;
  // Size of every small LUT placed on a select input of the large one.
  localparam int unsigned SMALL_LUT_SIZE = 2;
  // Number of LUT_n + n:LUT_2 blocks inserted in the main configuration.
  localparam int unsigned DEFAULT_NUM_LUTS = 2;

  // Configuration bits of one LUT_n + n:LUT_2 block.
  function automatic int unsigned novel_key_bits(int unsigned n);
    return (32'd1 << n) + n * (32'd1 << SMALL_LUT_SIZE);
  endfunction

endpackage
