// findpos_tree: finds the position of the rightmost 1 in a result vector.
//
// A binary tree, log2(W) levels deep, walked from the root down as in the
// FindPos tree of the accelerator's peripheral: the root looks at the whole
// vector and sets the most significant position bit to 1 when the right
// (upper-index) half holds a 1, then the chosen half is split again for the
// next bit, down to single entries. A 128-entry tree yields pos[6:0] after
// seven levels. "Rightmost" means the highest index: in a MatchC window the
// column with the highest index is the latest start position, the one a
// sequential scan keeps when two matches are equally long. For LutC only one
// entry can match, so the preference does not matter there.
//
// W must be a power of two and at least 2. valid is 0 when no bit is set (pos
// is then 0). Purely combinational. Each level is written as whole-vector
// operations (OR-reduce of the upper half, 2:1 select of the half), which
// keeps a design with hundreds of trees small for the tools.
module findpos_tree #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0]         vec,
  output logic [$clog2(W)-1:0] pos,
  output logic                 valid
);

  localparam int unsigned LG = $clog2(W);

  logic [W-1:0] cur, hi, lo, half_mask;

  always_comb begin
    cur = vec;
    pos = '0;
    for (int l = int'(LG) - 1; l >= 0; l--) begin
      half_mask = (W'(1) << (1 << l)) - W'(1);     // lower 2**l bits
      hi        = (cur >> (1 << l)) & half_mask;
      lo        = cur & half_mask;
      pos[l]    = |hi;
      cur       = pos[l] ? hi : lo;
    end
  end

  assign valid = |vec;

endmodule
