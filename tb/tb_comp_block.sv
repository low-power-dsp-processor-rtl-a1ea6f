// tb_comp_block: drives the computation block slot by slot with a
// halfword memory model and a set of address registers held here. Random
// SIMD ALU operations, accumulator loads and stores (with rounding and
// saturation), permutations and dual MAC packets are checked against
// models written in this testbench, as is the enable gating.
module tb_comp_block;
  import dsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  instr_t ins_alu, ins_mac0, ins_mac1;
  logic [NUM_AREG-1:0][AREG_W-1:0] areg;
  logic [15:0] va_addr, vb_addr, vw_addr;
  logic [63:0] va_data, vb_data, vw_data;
  logic vw_en, sat_event;
  logic [3:0] vw_mask;
  logic [NUM_CREG-1:0][CREG_W-1:0] cregs;
  logic [15:0] mem [int];
  int checks = 0, failures = 0;
  comp_block dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] m(int byte_addr);
    return mem.exists(byte_addr) ? mem[byte_addr] : 16'h0;
  endfunction
  function automatic logic [63:0] mv(int byte_addr);
    return {m(byte_addr + 6), m(byte_addr + 4), m(byte_addr + 2), m(byte_addr)};
  endfunction

  always_comb begin
    va_data = mv(int'(va_addr));
    vb_data = mv(int'(vb_addr));
  end
  always @(posedge clk)
    if (vw_en)
      for (int k = 0; k < 4; k++)
        if (vw_mask[k]) mem[int'(vw_addr) + 2*k] = vw_data[16*k +: 16];

  initial begin
    #10000000;
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

  function automatic instr_t mk(opcode_e op, int a, int b, logic [15:0] ext);
    return '{valid: 1'b1, op: 6'(op), a: 4'(a), b: 4'(b), ext: ext};
  endfunction
  function automatic logic [15:0] c3(logic [4:0] x, logic [4:0] y, logic [4:0] z);
    return {1'b0, x, y, z};
  endfunction

  task automatic step(instr_t alu, instr_t m0 = '0, instr_t m1 = '0);
    @(negedge clk);
    ins_alu = alu; ins_mac0 = m0; ins_mac1 = m1;
    @(posedge clk); #1;
    ins_alu = '0; ins_mac0 = '0; ins_mac1 = '0;
  endtask

  function automatic logic [15:0] sop(opcode_e op, logic signed [15:0] a, logic signed [15:0] b);
    case (op)
      OP_ABSV: return (a < 0) ? -a : a;
      OP_ADDV: return a + b;
      OP_SUBV: return a - b;
      OP_MAXV: return (a > b) ? a : b;
      OP_MINV: return (a < b) ? a : b;
      OP_ANDV: return a & b;
      OP_ORV:  return a | b;
      default: return a ^ b;
    endcase
  endfunction

  initial begin
    opcode_e ops[8] = '{OP_ABSV, OP_ADDV, OP_SUBV, OP_MAXV, OP_MINV, OP_ANDV, OP_ORV, OP_XORV};
    ins_alu = '0; ins_mac0 = '0; ins_mac1 = '0;
    for (int i = 0; i < NUM_AREG; i++) areg[i] = 16'(1000 + 100 * i);
    #12 rst_n = 1'b1;
    // SIMD ALU, memory to memory
    for (int n = 0; n < 400; n++) begin
      logic [63:0] x, y, z;
      opcode_e op;
      for (int k = 0; k < 4; k++) begin
        mem[1000 + 2*k] = 16'($urandom);
        mem[1100 + 2*k] = 16'($urandom);
      end
      x = mv(1000); y = mv(1100);
      op = ops[n % 8];
      if (op == OP_ABSV) step(mk(op, 0, 2, 0));
      else               step(mk(op, 0, 1, 16'd3));
      z = (op == OP_ABSV) ? mv(1200) : mv(1300);
      for (int k = 0; k < 4; k++)
        chk($sformatf("simd %s lane %0d", op.name(), k), z[16*k +: 16], sop(op, x[16*k +: 16], y[16*k +: 16]));
    end
    // accumulator load, MAC, rounding store
    for (int n = 0; n < 300; n++) begin
      logic signed [15:0] a, b, c, d;
      logic signed [31:0] w;
      longint acc, r;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      w = $urandom;
      mem[1000] = a; mem[1002] = 16'h0; mem[1100] = b; mem[1200] = c; mem[1300] = d;
      mem[1400] = w[15:0]; mem[1402] = w[31:16];
      step(mk(OP_L16V, 0, 0, c3({3'd1, 2'd0}, 0, 0)));      // c1 lane0 = a
      step(mk(OP_L16V, 1, 0, c3({3'd1, 2'd1}, 0, 0)));      // c1 lane1 = b
      step(mk(OP_L16V, 2, 0, c3({3'd2, 2'd2}, 0, 0)));      // c2 lane2 = c
      step(mk(OP_L16V, 3, 0, c3({3'd2, 2'd3}, 0, 0)));      // c2 lane3 = d
      step(mk(OP_L32V, 4, 0, c3({3'd3, 2'd0}, 0, 0)));      // c3 L = w
      step(mk(OP_L32V, 4, 0, c3({3'd3, 2'd1}, 0, 0)));      // c3 H = w
      chk("l16v lane value", cregs[1][39:20], {20'($signed(b))});
      chk("l32v", cregs[3][39:0], {40'($signed(w))});
      // dual MAC: c3L += a*c (signed), c3H += b*d (unsigned)
      step('0, mk(OP_MACV, 0, 0, c3({3'd1, 2'd0}, {3'd2, 2'd2}, {3'd3, 2'd0})),
               mk(OP_MACUV, 0, 0, c3({3'd1, 2'd1}, {3'd2, 2'd3}, {3'd3, 2'd1})));
      acc = longint'(w) + longint'(a) * longint'(c);
      chk("macv", cregs[3][39:0], acc[39:0]);
      r = longint'(w) + longint'({16'h0, b[15:0]}) * longint'({16'h0, d[15:0]});
      chk("macuv", cregs[3][79:40], r[39:0]);
      // stores of the accumulator
      step(mk(OP_SR32V, 5, 0, c3({3'd3, 2'd1}, 0, 0)));
      r = longint'($signed(cregs[3][79:40]));
      r = (r > 64'sd2147483647) ? 64'sd2147483647 : r;
      chk("sr32v", {m(1502), m(1500)}, r[31:0]);
      step(mk(OP_SR16V, 6, 0, c3({3'd3, 2'd0}, 0, 0)));
      r = (acc + 16384) >>> 15;
      r = (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
      chk("sr16v", m(1600), r[15:0]);
      chk("sr16v leaves lane 1", m(1602), 16'h0);
    end
    // permutation in place
    for (int n = 0; n < 100; n++) begin
      logic [63:0] x, z;
      logic [7:0] pat;
      for (int k = 0; k < 4; k++) mem[1700 + 2*k] = 16'($urandom);
      x = mv(1700); pat = 8'($urandom);
      step(mk(OP_PERM, 7, 0, {8'h0, pat}));
      z = mv(1700);
      for (int k = 0; k < 4; k++) chk("perm", z[16*k +: 16], x[16*pat[2*k +: 2] +: 16]);
    end
    // disabled: nothing written
    mem[1000] = 16'h1234;
    en = 1'b0;
    step(mk(OP_ABSV, 0, 2, 0), mk(OP_MACV, 0, 0, c3({3'd1, 2'd0}, {3'd1, 2'd0}, {3'd4, 2'd0})));
    chk("disabled memory", m(1200) == 16'h1234, 0);
    chk("disabled mac", cregs[4], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
