// tb_viterbi_listing: runs the 16-packet add-compare-select loop body of a
// Viterbi decoder on the full-size core, three times over, with every
// packet using the scalar, AGU and ALU slots as in the published listing:
// the scalar unit loads branch metrics, negates them and builds the
// branch-metric vectors with halfword stores, the AGU walks the path-metric
// pointers, and the SIMD ALU performs addv/subv and minv every cycle.
// The same packet list is assembled for the core and executed by a small
// instruction-level model written here; memory, registers and the cycle
// count (one ALU operation per cycle) must agree.
module tb_viterbi_listing;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

  typedef struct {
    int op;             // -1: slot empty
    int a, b, c;        // c: third register or immediate
  } ins_s;
  typedef struct {
    ins_s sc, ag, al;
  } pkt_s;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic running, halted, error;
  logic pm_we = 1'b0;
  logic [11:0] pm_waddr = '0;
  logic [15:0] pm_wdata = '0;
  logic dm_we = 1'b0;
  logic [14:0] dm_addr = '0;
  logic [15:0] dm_wdata = '0, dm_rdata;
  logic user_valid;
  instr_t user_instr;
  logic [15:0] pc;
  logic [4:0] pkt_len;
  logic br_taken, sat_event;
  instr_t [NSLOT-1:0] issued;
  logic [3:0] dbg_sreg_addr = '0;
  logic [31:0] dbg_sreg;
  logic [NUM_AREG-1:0][AREG_W-1:0] areg;
  logic [NUM_CREG-1:0][CREG_W-1:0] cregs;

  int checks = 0, failures = 0;
  pkt_s prog[$];
  logic [15:0] hw [int];          // model memory, halfwords by byte address
  logic [31:0] r [16];
  logic [15:0] am [8];

  dsp_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic ins_s I(int op = -1, int a = 0, int b = 0, int c = 0);
    ins_s x;
    x.op = op; x.a = a; x.b = b; x.c = c;
    return x;
  endfunction
  function automatic void P(ins_s sc, ins_s ag, ins_s al);
    pkt_s p;
    p.sc = sc; p.ag = ag; p.al = al;
    prog.push_back(p);
  endfunction

  // the loop body: a1 = r11 (metrics of this step), a4 = r11 + 8 (next)
  function automatic void body();
    P(I(OP_SH, 11, 3, 8),    I(),                       I(OP_ADDV, 0, 1, 2));
    P(I(OP_SH, 11, 4, 10),   I(OP_ADDIA, 3, 3, 4),      I(OP_MINV, 2, 3, 3));
    P(I(OP_SH, 11, 4, 12),   I(OP_ADDIA, 0, 0, 8),      I(OP_SUBV, 0, 1, 2));
    P(I(OP_SH, 11, 3, 14),   I(),                       I(OP_MINV, 2, 5, 5));
    P(I(OP_ADDI, 10, 10, 8), I(OP_ADDIA, 5, 5, 4),      I(OP_ADDV, 0, 1, 2));
    P(I(OP_LW, 10, 1, 0),    I(),                       I(OP_MINV, 2, 3, 3));
    P(I(OP_SUB, 0, 1, 2),    I(OP_ADDIA, 0, 0, 8),      I(OP_SUBV, 0, 1, 2));
    P(I(),                   I(OP_ADDIA, 3, 3, 4),      I(OP_MINV, 2, 5, 5));
    P(I(OP_LW, 10, 3, 4),    I(OP_ADDIA, 5, 5, 4),      I(OP_ADDV, 0, 4, 2));
    P(I(OP_SUB, 0, 3, 4),    I(OP_ADDIA, 3, 3, 4),      I(OP_MINV, 2, 3, 3));
    P(I(OP_SH, 11, 1, 0),    I(OP_ADDIA, 0, 0, 8),      I(OP_SUBV, 0, 4, 2));
    P(I(OP_SH, 11, 2, 2),    I(),                       I(OP_MINV, 2, 5, 5));
    P(I(OP_SH, 11, 2, 4),    I(OP_ADDIA, 5, 5, 4),      I(OP_ADDV, 0, 4, 2));
    P(I(OP_SH, 11, 1, 6),    I(OP_MOVA, 3, 0, 13100),   I(OP_MINV, 2, 3, 3));
    P(I(),                   I(OP_MOVA, 0, 0, 13000),   I(OP_SUBV, 0, 4, 2));
    P(I(),                   I(OP_MOVA, 5, 0, 13016),   I(OP_MINV, 2, 5, 5));
  endfunction

  function automatic void emit(Asm a, ins_s x);
    if (x.op < 0) return;
    case (opcode_e'(x.op))
      OP_SH, OP_LW, OP_ADDI, OP_ADDIA: a.l(6'(x.op), x.a, x.b, 16'(x.c));
      OP_MOVA:                         a.l(6'(x.op), x.a, 0, 16'(x.c));
      default:                         a.r3(6'(x.op), x.a, x.b, x.c);
    endcase
  endfunction

  function automatic logic [15:0] rh(int addr);
    return hw.exists(addr) ? hw[addr] : 16'h0;
  endfunction

  // instruction-level model: all slots read the state before the packet
  function automatic void model(pkt_s p);
    logic [31:0] r_o [16];
    logic [15:0] a_o [8];
    logic [15:0] x, y;
    r_o = r; a_o = am;
    case (p.sc.op)
      OP_SH:   hw[int'(r_o[p.sc.a]) + p.sc.c] = r_o[p.sc.b][15:0];
      OP_LW:   r[p.sc.b] = {rh(int'(r_o[p.sc.a]) + p.sc.c + 2), rh(int'(r_o[p.sc.a]) + p.sc.c)};
      OP_ADDI: r[p.sc.b] = r_o[p.sc.a] + 32'(p.sc.c);
      OP_SUB:  r[p.sc.c] = r_o[p.sc.a] - r_o[p.sc.b];
      default: ;
    endcase
    r[0] = '0;
    case (p.ag.op)
      OP_ADDIA: am[p.ag.b] = a_o[p.ag.a] + 16'(p.ag.c);
      OP_MOVA:  am[p.ag.a] = 16'(p.ag.c);
      default: ;
    endcase
    for (int k = 0; k < 4; k++) begin
      x = rh(int'(a_o[p.al.a]) + 2*k);
      y = rh(int'(a_o[p.al.b]) + 2*k);
      case (p.al.op)
        OP_ADDV: hw[int'(a_o[p.al.c]) + 2*k] = x + y;
        OP_SUBV: hw[int'(a_o[p.al.c]) + 2*k] = x - y;
        OP_MINV: hw[int'(a_o[p.al.c]) + 2*k] = ($signed(x) < $signed(y)) ? x : y;
        default: ;
      endcase
    end
  endfunction

  task automatic dm_write(int byte_addr, logic [15:0] v);
    @(negedge clk);
    dm_we = 1'b1; dm_addr = 15'(byte_addr >> 1); dm_wdata = v;
    hw[byte_addr] = v;
    @(negedge clk);
    dm_we = 1'b0;
  endtask

  initial begin
    Asm a = new();
    int iters = 3, cyc, n_alu = 0;
    logic [15:0] v;
    foreach (r[i]) r[i] = '0;
    foreach (am[i]) am[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // path metrics, survivors and branch metrics
    for (int i = 0; i < 80; i++) dm_write(13000 + 2*i, 16'($urandom_range(2000)));
    for (int i = 0; i < 4 * iters + 2; i++) begin
      dm_write(15000 + 4*i, 16'($urandom_range(300)));
      dm_write(15002 + 4*i, 16'h0000);
    end
    for (int i = 0; i < 8; i++) dm_write(14000 + 2*i, 16'($urandom_range(300)));
    // set-up: pointers as the listing resets them, r10, r11, a1, a4
    P(I(OP_ADDI, 0, 10, 15000 - 8), I(OP_MOVA, 3, 0, 13100), I());
    P(I(OP_ADDI, 0, 11, 14000),     I(OP_MOVA, 0, 0, 13000), I());
    P(I(OP_LW, 0, 3, 15000 + 4 * (4 * iters)), I(OP_MOVA, 5, 0, 13016), I());
    P(I(OP_SUB, 0, 3, 4),           I(OP_MOVA, 1, 0, 14000), I());
    P(I(),                          I(OP_MOVA, 4, 0, 14008), I());
    for (int it = 0; it < iters; it++) body();
    foreach (prog[i]) begin
      emit(a, prog[i].sc); emit(a, prog[i].ag); emit(a, prog[i].al);
      a.endp();
      if (prog[i].al.op >= 0) n_alu++;
    end
    a.s(OP_END); a.endp();
    foreach (a.code[i]) begin
      @(negedge clk);
      pm_we = 1'b1; pm_waddr = 12'(i); pm_wdata = a.code[i];
    end
    @(negedge clk) pm_we = 1'b0;
    foreach (prog[i]) model(prog[i]);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (running) begin
      @(negedge clk);
      if (running) cyc++;
    end
    check("error", 64'(error), 0);
    check("cycles: one packet per cycle", cyc, prog.size() + 1);
    check("one SIMD ALU op per loop cycle", n_alu, 16 * iters);
    for (int i = 0; i < 80; i++) begin
      dm_addr = 15'((13000 + 2*i) >> 1);
      #1 check($sformatf("path metric mem[%0d]", 13000 + 2*i), dm_rdata, rh(13000 + 2*i));
    end
    for (int i = 0; i < 8; i++) begin
      dm_addr = 15'((14000 + 2*i) >> 1);
      #1 check($sformatf("branch metric vector mem[%0d]", 14000 + 2*i), dm_rdata, rh(14000 + 2*i));
    end
    for (int i = 1; i < 16; i++) begin
      dbg_sreg_addr = 4'(i);
      #1 check($sformatf("r%0d", i), dbg_sreg, r[i]);
    end
    for (int i = 0; i < 8; i++) check($sformatf("a%0d", i), areg[i], am[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
