// ppe_rotator: the PPE's rotator, four 16-bit rotators that work as four
// 16-bit, two 32-bit or one 64-bit rotator.
//
// The rotation is to the right, as in the rotator mode table; a left rotation
// by n is a right rotation by width-n.  Each output lane i has a neighbour
// lane N(i): lane i+1 (mod 4) when the lanes form one 64-bit word, and lane
// i^1 when they form 32-bit pairs.  The 11-bit mode reads:
//   mode[2i]   lane i takes the bits it rotates in from N(i), not from itself
//   mode[2i+1] N(i) is the pair partner i^1 (32-bit) instead of lane i+1
//   mode[8]    even lanes take the word of N(i) first (rotation by 16)
//   mode[9]    odd lanes take the word of N(i) first (rotation by 16)
//   mode[10]   lanes take the word two lanes up first (rotation by 32)
// after which lane i rotates by its own 4-bit count RCi.  Every row of the
// table decodes to the rotation it names: 00001010101 is a 64-bit rotation by
// RC, 01101010101 by 16+RC, 10001010101 by 32+RC, 11101010101 by 48+RC,
// 00011011101 and 01111011101 two 32-bit rotations by RC and 16+RC, and
// 00000000000 four 16-bit rotations by RC3..RC0.  The table's codes and
// counts are the published design's; the meaning given to each mode bit is this
// design's reading of them.  Combinational.
module ppe_rotator
  import ppe_pkg::*;
(
  input  logic [DATA_W-1:0] din,
  input  logic [10:0]       mode,
  input  logic [3:0]        rc [LANES],   // rc[i] is RCi, count of lane i
  output logic [DATA_W-1:0] dout
);
  logic [LANE_W-1:0] in_l  [LANES];
  logic [LANE_W-1:0] s16_l [LANES];
  logic [LANE_W-1:0] s32_l [LANES];
  logic [1:0]        nb    [LANES];

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      in_l[i] = din[i*LANE_W +: LANE_W];
      nb[i]   = mode[2*i+1] ? 2'(i ^ 1) : 2'(i + 1);
    end
    // coarse stage: rotation by one lane
    for (int i = 0; i < LANES; i++) begin
      if (((i % 2) == 0) ? mode[8] : mode[9]) s16_l[i] = in_l[nb[i]];
      else                                    s16_l[i] = in_l[i];
    end
    // coarse stage: rotation by two lanes
    for (int i = 0; i < LANES; i++) begin
      s32_l[i] = mode[10] ? s16_l[2'(i + 2)] : s16_l[i];
    end
    // fine stage: rotation by RCi inside the lane, refilled from N(i)
    for (int i = 0; i < LANES; i++) begin
      logic [2*LANE_W-1:0] pair;
      pair = {(mode[2*i] ? s32_l[nb[i]] : s32_l[i]), s32_l[i]} >> rc[i];
      dout[i*LANE_W +: LANE_W] = pair[LANE_W-1:0];
    end
  end
endmodule
