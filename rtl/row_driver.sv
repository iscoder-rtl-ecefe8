// row_driver: turns a symbol and a group address into the bit-line drive codes
// of an in-SRAM CAM search.
//
// Three parts, as in the accelerator's row driver:
//   * interpreter  - maps every symbol bit to a two-bit code {bl,blb}:
//                    bit 1 -> 10, bit 0 -> 01;
//   * address decoder - one-hot vector with 1s on the W lines of the addressed
//                    group and 0s elsewhere;
//   * mask AND     - ANDs the decoded vector with the interpreted symbol, so
//                    every line outside the group gets 00 (don't care).
// Line g*W+k of group g carries symbol bit (W-1-k): the first line of a group
// holds the most significant bit.
//
// The same module drives the rows for a MatchC byte search (GROUPS = 256 row
// groups of 8 rows) and, instantiated a second time, the columns for the
// transposed LutC search (GROUPS = 64 column slots of 8 columns).
// The write/read code 11 is not produced here: array writes use their own
// word-line decode inside cam_array. The "Shifter" drawn next to the decoder
// in the published micro-architecture is not described further, so the group
// address is taken as given.
//
// Purely combinational, no clock.
module row_driver #(
  parameter int unsigned GROUPS = 256,
  parameter int unsigned W      = 8
) (
  input  logic                      en,     // search in this cycle
  input  logic [$clog2(GROUPS)-1:0] addr,   // group to activate
  input  logic [W-1:0]              sym,    // searched symbol
  output logic [GROUPS*W-1:0]       bl,     // drive bit line  (match stored 1)
  output logic [GROUPS*W-1:0]       blb     // drive bit line bar (match stored 0)
);

  logic [W-1:0]      interp_bl, interp_blb;
  logic [GROUPS-1:0] dec;

  // Interpreter: 1 -> 10, 0 -> 01, first line = MSB
  always_comb begin
    for (int k = 0; k < W; k++) begin
      interp_bl[k]  = sym[W-1-k];
      interp_blb[k] = ~sym[W-1-k];
    end
  end

  // Address decoder
  always_comb begin
    dec = '0;
    if (en) dec[addr] = 1'b1;
  end

  // Mask AND: lines outside the addressed group become 00
  always_comb begin
    for (int g = 0; g < int'(GROUPS); g++) begin
      for (int k = 0; k < int'(W); k++) begin
        bl[g*W+k]  = dec[g] & interp_bl[k];
        blb[g*W+k] = dec[g] & interp_blb[k];
      end
    end
  end

endmodule
