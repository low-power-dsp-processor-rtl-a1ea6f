// simd_alu: the 80-bit SIMD ALU of the computation block.
//
// Works on four 20-bit lanes side by side (80 bits). Operands arrive as
// four 16-bit values (one 64-bit memory vector) and are sign-extended into
// the 20-bit lanes; each lane computes abs, add, sub, max, min, and, or or
// xor independently, and the low 16 bits of each lane form the 64-bit
// result, so sums wrap around modulo 2^16 (no saturation). Purely
// combinational.
// The operation set comes from the core's instruction table and the 80-bit
// width from its block diagram; the lane layout, the operation encoding
// (the opcode values of dsp_pkg) and the wrap-around are this design's own.
module simd_alu
  import dsp_pkg::*;
(
  input  logic [5:0]  op,
  input  logic [63:0] x,
  input  logic [63:0] y,
  output logic [63:0] z        // low 16 bits of each lane
);
  always_comb begin
    for (int k = 0; k < NLANE; k++) begin
      logic signed [LANE_W-1:0] a, b, r;
      a = LANE_W'($signed(x[16*k +: 16]));
      b = LANE_W'($signed(y[16*k +: 16]));
      case (opcode_e'(op))
        OP_ABSV: r = (a < 0) ? -a : a;
        OP_ADDV: r = a + b;
        OP_SUBV: r = a - b;
        OP_MAXV: r = (a > b) ? a : b;
        OP_MINV: r = (a < b) ? a : b;
        OP_ANDV: r = a & b;
        OP_ORV:  r = a | b;
        OP_XORV: r = a ^ b;
        default: r = '0;
      endcase
      z[16*k +: 16] = r[15:0];
    end
  end
endmodule
