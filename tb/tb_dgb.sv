// tb_dgb: random adda / addia / mova instructions, with the unit enabled
// and disabled, against a model of the eight address registers.
module tb_dgb;
  import dsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  instr_t ins;
  logic [NUM_AREG-1:0][AREG_W-1:0] areg;
  logic [AREG_W-1:0] model [NUM_AREG];
  int checks = 0, failures = 0;
  dgb dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(2);
      en = ($urandom_range(9) != 0);
      ins.valid = ($urandom_range(9) != 0);
      ins.op = (k == 0) ? 6'(OP_ADDA) : (k == 1) ? 6'(OP_ADDIA) : 6'(OP_MOVA);
      ins.a = 4'($urandom_range(7));
      ins.b = 4'($urandom_range(7));
      ins.ext = 16'($urandom);
      if (en && ins.valid)
        case (k)
          0: model[ins.ext[2:0]] = model[ins.a] + model[ins.b];
          1: model[ins.b] = model[ins.a] + ins.ext;
          default: model[ins.a] = ins.ext;
        endcase
      @(posedge clk); #1;
      for (int i = 0; i < NUM_AREG; i++) begin
        checks++;
        if (areg[i] !== model[i]) begin
          failures++;
          if (failures < 5) $display("FAIL a%0d got %h exp %h", i, areg[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
