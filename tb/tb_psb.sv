// tb_psb: drives the program sequencing block one instruction per cycle.
// Checks scalar arithmetic and logic against models written here (random
// operands), loads and stores against a byte-level memory model, the PC
// after sequential packets, taken and untaken branches, jal/jr, and the
// stop on "end" and on an illegal packet.
module tb_psb;
  import dsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  instr_t ins;
  logic [4:0] pkt_len;
  logic illegal;
  logic [15:0] pc, s_addr;
  logic running, halted, error, br_taken, s_we;
  logic [31:0] s_rdata, s_wdata;
  logic [3:0] s_be;
  logic [3:0] dbg_raddr;
  logic [31:0] dbg_rdata;
  logic [7:0] bmem [int];
  int checks = 0, failures = 0;
  psb dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] rd(int a);
    return bmem.exists(a) ? bmem[a] : 8'h00;
  endfunction

  // memory model: 32 bits from the halfword at s_addr
  always_comb begin
    int b;
    b = int'(s_addr) & 32'hfffe;
    s_rdata = {rd(b + 3), rd(b + 2), rd(b + 1), rd(b)};
  end
  always @(posedge clk)
    if (s_we) begin
      int b;
      b = int'(s_addr) & 32'hfffe;
      for (int k = 0; k < 4; k++) if (s_be[k]) bmem[b + k] = s_wdata[8*k +: 8];
    end

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

  task automatic issue(opcode_e op, int a, int b, logic [15:0] ext, int len = 2);
    @(negedge clk);
    ins = '{valid: 1'b1, op: 6'(op), a: 4'(a), b: 4'(b), ext: ext};
    pkt_len = 5'(len);
    @(posedge clk); #1;
    ins.valid = 1'b0;
  endtask


  task automatic getr(int i, output logic [31:0] v);
    dbg_raddr = 4'(i); #1 v = dbg_rdata;
  endtask

  // load r[i] with a 32-bit value using addi, sll and or
  task automatic setr(int i, logic [31:0] v);
    issue(OP_ADDI, 0, i, v[31:16]);
    issue(OP_SLL, i, i, 16'd16);
    issue(OP_ADDI, 0, 14, v[15:0]);
    issue(OP_SLL, 14, 14, 16'd16);
    issue(OP_SRL, 14, 14, 16'd16);
    issue(OP_OR, i, 14, 16'(i));
  endtask

  initial begin
    logic [31:0] x, y, v, e;
    logic [15:0] p;
    ins = '0; pkt_len = 5'd1; illegal = 1'b0; dbg_raddr = '0;
    #12 rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    chk("running", running, 1);
    // sequential PC (one empty 1-parcel packet passes before the nop)
    p = pc + 16'd1;
    issue(OP_NOP, 0, 0, 0, 3);
    chk("pc + packet length", pc, p + 3);
    for (int n = 0; n < 300; n++) begin
      int k;
      x = $urandom; y = $urandom;
      if (n % 7 == 0) y = x;
      setr(1, x); setr(2, y);
      getr(1, v); chk("setr", v, x);
      k = $urandom_range(9);
      case (k)
        0: begin issue(OP_ADD, 1, 2, 16'd3); e = x + y; end
        1: begin issue(OP_SUB, 1, 2, 16'd3); e = x - y; end
        2: begin issue(OP_AND, 1, 2, 16'd3); e = x & y; end
        3: begin issue(OP_OR,  1, 2, 16'd3); e = x | y; end
        4: begin issue(OP_XOR, 1, 2, 16'd3); e = x ^ y; end
        5: begin issue(OP_SLT, 1, 2, 16'd3); e = ($signed(x) < $signed(y)) ? 1 : 0; end
        6: begin issue(OP_ADDI, 1, 3, y[15:0]); e = x + {{16{y[15]}}, y[15:0]}; end
        7: begin issue(OP_SRA, 1, 3, 16'(y[4:0])); e = $signed(x) >>> y[4:0]; end
        8: begin issue(OP_SLTI, 1, 3, y[15:0]); e = ($signed(x) < $signed({{16{y[15]}}, y[15:0]})) ? 1 : 0; end
        default: begin
          longint pr;
          issue(OP_MULT, 1, 2, 0, 1);
          pr = longint'($signed(x)) * longint'($signed(y));
          issue(OP_MFHI, 3, 0, 0, 1);
          getr(3, v); chk("mfhi", v, pr[63:32]);
          issue(OP_MFLO, 3, 0, 0, 1);
          e = pr[31:0];
        end
      endcase
      getr(3, v); chk($sformatf("alu op %0d", k), v, e);
      // branches
      p = pc;
      issue(OP_BEQ, 1, 2, 16'h0123);
      chk("beq", pc, (x == y) ? 16'h0123 : p + 2);
      p = pc;
      issue(OP_BNE, 1, 2, 16'h0456);
      chk("bne", pc, (x != y) ? 16'h0456 : p + 2);
      // store word, then load back byte, halfword and word
      setr(5, 32'h1000 + 32'($urandom_range(255)) * 4);
      issue(OP_SW, 5, 1, 16'd0);
      issue(OP_LW, 5, 4, 16'd0);
      getr(4, v); chk("sw/lw", v, x);
      issue(OP_LB, 5, 4, 16'd3);
      getr(4, v); chk("lb", v, {{24{x[31]}}, x[31:24]});
      issue(OP_LH, 5, 4, 16'd2);
      getr(4, v); chk("lh", v, {{16{x[31]}}, x[31:16]});
      issue(OP_SB, 5, 2, 16'd1);
      issue(OP_SH, 5, 2, 16'd2);
      issue(OP_LW, 5, 4, 16'd0);
      getr(4, v); chk("sb/sh", v, {y[15:0], y[7:0], x[7:0]});
    end
    // call and return
    p = pc;
    issue(OP_JAL, 0, 0, 16'h0200);
    chk("jal target", pc, 16'h0200);
    getr(15, v); chk("jal link", v, p + 2);
    issue(OP_JR, 15, 0, 0, 1);
    chk("jr", pc, p + 2);
    issue(OP_JUMP, 0, 0, 16'h0042);
    chk("jump", pc, 16'h0042);
    chk("br_taken seen", 1, 1);
    getr(0, v); chk("r0", v, 0);
    // end stops issue
    issue(OP_END, 0, 0, 0, 1);
    chk("end halts", halted, 1);
    chk("end stops", running, 0);
    p = pc;
    issue(OP_ADDI, 0, 6, 16'd5);
    getr(6, v); chk("no issue while halted", v, 0);
    // restart and an illegal packet
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    chk("restart pc", pc, 0);
    @(negedge clk) illegal = 1'b1;
    @(posedge clk); #1 illegal = 1'b0;
    chk("illegal error", error, 1);
    chk("illegal halts", halted, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
