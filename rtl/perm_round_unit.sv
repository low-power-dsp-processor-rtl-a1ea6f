// perm_round_unit: reconfigurable permutation / rounding unit.
//
// Permutation: out lane i = in lane pattern[2i+1:2i], for the four 16-bit
// lanes of a 64-bit vector, so any order, including repeats, is possible.
// Rounding: turns a 40-bit accumulator into a memory value.
//   to 32 bits (sr32v): saturate the 40-bit value to the signed 32-bit range.
//   to 16 bits (sr16v): round to nearest at bit RND_SHIFT-1 (add half an
//     LSB, then arithmetic shift right by RND_SHIFT), then saturate to the
//     signed 16-bit range. With RND_SHIFT = 15 this turns a sum of Q15 x Q15
//     products back into a Q15 value.
// Purely combinational.
// Permuting four values in any order and storing a 40-bit register to 32 or
// 16 bits with rounding follow the core's instruction table; the pattern
// encoding, the Q15 shift and saturation are this design's own choices.
module perm_round_unit #(
  parameter int RND_SHIFT = 15
) (
  input  logic [63:0] vin,
  input  logic [7:0]  pattern,
  output logic [63:0] vperm,
  input  logic [39:0] acc,
  output logic [31:0] r32,
  output logic [15:0] r16,
  output logic        sat32,
  output logic        sat16
);
  localparam logic signed [40:0] MAX32 = 41'sd2147483647;
  localparam logic signed [40:0] MIN32 = -41'sd2147483648;
  localparam logic signed [40:0] MAX16 = 41'sd32767;
  localparam logic signed [40:0] MIN16 = -41'sd32768;

  logic signed [40:0] a, rounded;

  always_comb begin
    for (int i = 0; i < 4; i++)
      vperm[16*i +: 16] = vin[16*pattern[2*i +: 2] +: 16];

    a = 41'($signed(acc));
    sat32 = (a > MAX32) || (a < MIN32);
    r32   = (a > MAX32) ? 32'h7fff_ffff : (a < MIN32) ? 32'h8000_0000 : a[31:0];

    rounded = (a + (41'sd1 <<< (RND_SHIFT - 1))) >>> RND_SHIFT;
    sat16 = (rounded > MAX16) || (rounded < MIN16);
    r16   = (rounded > MAX16) ? 16'h7fff : (rounded < MIN16) ? 16'h8000 : rounded[15:0];
  end
endmodule
