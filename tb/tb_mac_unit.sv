// tb_mac_unit: random test of the multiply-accumulate unit, signed and
// unsigned, against a 64-bit integer model wrapped to 40 bits.
module tb_mac_unit;
  logic        is_unsigned;
  logic [15:0] x, y;
  logic [39:0] acc_in, acc_out;
  int checks = 0, failures = 0;
  mac_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint ex;
      is_unsigned = 1'($urandom);
      x = 16'($urandom); y = 16'($urandom);
      acc_in = {8'($urandom), $urandom};
      if (n < 4) begin x = 16'h8000; y = 16'h8000; end
      #1;
      if (is_unsigned) ex = longint'($signed(acc_in)) + longint'(x) * longint'(y);
      else             ex = longint'($signed(acc_in)) + longint'($signed(x)) * longint'($signed(y));
      checks++;
      if (acc_out !== ex[39:0]) begin
        failures++;
        if (failures < 10) $display("FAIL u=%0d x=%h y=%h acc=%h got %h exp %h", is_unsigned, x, y, acc_in, acc_out, ex[39:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
