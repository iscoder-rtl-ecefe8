// addr1_remap: places the LutC lookup-table blocks in the 16 arrays of a LutC
// PE so that the frequent quality-score contexts are spread out.
//
// Every array holds M = 8 data blocks of the table (one block = the 128 rows
// of one addr1 value); a block with slot number id lives in array id/M as block
// id%M. Without remapping, addr1 = id and the 16 hot contexts 28..43 would
// share two arrays. The remap swaps them with the first block of every array:
//   addr1 in 28..43            -> (addr1-28)*M   (block 0 of array addr1-28)
//   addr1 = 96                 -> 33             (the block displaced by 40)
//   addr1 % M == 0, otherwise  -> addr1/M + 28   (the displaced first blocks)
//   any other addr1            -> addr1
// The result is a permutation of 0..127 in which the hot blocks occupy 16
// different arrays. The document's formula pairs 33 with 96 in the other
// direction (33 -> 96), which would place blocks 33 and 40 both in slot 96;
// this module keeps the swap structure and sends 96 to the free slot 33.
// Purely combinational.
module addr1_remap
  import iscoder_pkg::*;
(
  input  logic [LUT_SYM_W-1:0] old_id,
  output logic [LUT_SYM_W-1:0] new_id,
  output logic [3:0]           array_id,   // new_id / M
  output logic [2:0]           block_id    // new_id % M
);

  always_comb begin
    if (old_id >= 7'(HOT_LO) && old_id <= 7'(HOT_HI))
      new_id = (old_id - 7'(HOT_LO)) << 3;
    else if (old_id == 7'd96)
      new_id = 7'd33;
    else if (old_id[2:0] == 3'd0)
      new_id = (old_id >> 3) + 7'(HOT_LO);
    else
      new_id = old_id;
  end

  assign array_id = new_id[6:3];
  assign block_id = new_id[2:0];

endmodule
