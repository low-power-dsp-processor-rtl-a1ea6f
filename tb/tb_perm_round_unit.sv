// tb_perm_round_unit: checks every lane pattern of the permutation and the
// 32-bit saturation and 16-bit round-and-saturate of the rounding path on
// random and edge values, against models written here.
module tb_perm_round_unit;
  logic [63:0] vin, vperm;
  logic [7:0]  pattern;
  logic [39:0] acc;
  logic [31:0] r32;
  logic [15:0] r16;
  logic        sat32, sat16;
  int checks = 0, failures = 0;
  perm_round_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < 256; p++) begin
      vin = {$urandom, $urandom};
      pattern = 8'(p);
      acc = '0;
      #1;
      for (int i = 0; i < 4; i++)
        chk("perm", vperm[16*i +: 16], vin[16*pattern[2*i +: 2] +: 16]);
    end
    for (int n = 0; n < 3000; n++) begin
      longint a, e32, e16;
      acc = {8'($urandom), $urandom};
      case (n % 6)
        0: acc = 40'h7f_ffff_ffff;
        1: acc = 40'h80_0000_0000;
        2: acc = 40'h00_3fff_c000;   // rounds up to 0x8000: saturates
        3: acc = 40'h00_3fff_bfff;   // rounds to 0x7fff
        default: ;
      endcase
      #1;
      a = longint'($signed(acc));
      e32 = (a > 64'sd2147483647) ? 64'sd2147483647 : (a < -64'sd2147483648) ? -64'sd2147483648 : a;
      e16 = (a + 16384) >>> 15;
      chk("sat32 flag", sat32, (e16 != e16) || (e32 != a));
      e16 = (e16 > 32767) ? 32767 : (e16 < -32768) ? -32768 : e16;
      chk("r32", r32, e32[31:0]);
      chk("r16", r16, e16[15:0]);
      chk("sat16 flag", sat16, e16 != ((a + 16384) >>> 15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
