// mac_unit: one 40/16-bit multiply-accumulate unit.
//
// acc_out = acc_in + x * y, where x and y are 16-bit operands taken as
// signed (macv) or unsigned (macuv) and acc is a 40-bit accumulator (32-bit
// product range plus 8 guard bits). The sum wraps modulo 2^40.
// Combinational; the computation block writes acc_out back into the
// register file at the clock edge. The core has two of these.
// Signed and unsigned multiply-accumulate and the 40/16-bit widths follow
// the core's description; wrap-around on overflow is this design's choice.
module mac_unit (
  input  logic        is_unsigned,
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic [39:0] acc_in,
  output logic [39:0] acc_out
);
  logic signed [33:0] sx, sy;
  logic signed [67:0] p;
  always_comb begin
    sx = is_unsigned ? $signed({18'd0, x}) : 34'($signed(x));
    sy = is_unsigned ? $signed({18'd0, y}) : 34'($signed(y));
    p  = sx * sy;
    acc_out = acc_in + p[39:0];
  end
endmodule
