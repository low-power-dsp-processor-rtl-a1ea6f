// tb_simd_alu: random test of the four-lane SIMD ALU against a lane-by-lane
// model using 16-bit two's-complement arithmetic.
module tb_simd_alu;
  import dsp_pkg::*;
  logic [5:0]  op;
  logic [63:0] x, y, z;
  int checks = 0, failures = 0;
  simd_alu dut (.op(op), .x(x), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(logic [5:0] o, logic signed [15:0] a, logic signed [15:0] b);
    case (o)
      6'h28: return (a < 0) ? 16'(-a) : a;
      6'h29: return a + b;
      6'h2A: return a - b;
      6'h2B: return (a > b) ? a : b;
      6'h2C: return (a < b) ? a : b;
      6'h2D: return a & b;
      6'h2E: return a | b;
      6'h2F: return a ^ b;
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = 6'(6'h28 + $urandom_range(7));
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (n % 10 == 0) x[15:0] = 16'h8000;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (z[16*k +: 16] !== model(op, x[16*k +: 16], y[16*k +: 16])) begin
          failures++;
          if (failures < 10) $display("FAIL op %h lane %0d: %h", op, k, z[16*k +: 16]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
