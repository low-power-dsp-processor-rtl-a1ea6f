// tb_dsp_core: end-to-end test of the DSP core at its default sizes.
//
// Assembles and runs five programs and checks memory, registers and cycle
// counts against values computed here:
//   1. the mean-absolute-error kernel of motion estimation: 64 pixels in a
//      3-packet loop, 0.75 cycles per pixel;
//   2. add-compare-select steps of a Viterbi decoder, one ACS per cycle;
//   3. a delayed-LMS filter update with both MACs, three cycles per tap;
//   4. scalar instructions, subroutine call and return, permutation,
//      rounding with saturation, 16-bit lane loads, unsigned MAC, the
//      remaining SIMD operations and the user-defined slot;
//   5. an illegal packet, which must stop the core with error set.
// It counts how often each mechanism happened and fails if one never did.
module tb_dsp_core;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

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
  int n_branch = 0, n_dual_mac = 0, n_wide = 0, n_long = 0, n_sat = 0, n_user = 0;
  int n_simd = 0, n_perm = 0, n_illegal = 0, n_halt = 0;

  dsp_core dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  always @(posedge clk) if (running) begin
    int n;
    n = 0;
    for (int s = 0; s < NSLOT; s++) if (issued[s].valid) n++;
    if (n >= 3) n_wide++;
    if (pkt_len > 5'(n)) n_long++;
    if (br_taken) n_branch++;
    if (issued[S_MAC0].valid && issued[S_MAC1].valid) n_dual_mac++;
    if (sat_event) n_sat++;
    if (user_valid) n_user++;
    if (issued[S_ALU].valid && issued[S_ALU].op inside {[6'h28:6'h2F]}) n_simd++;
    if (issued[S_ALU].valid && issued[S_ALU].op == 6'(OP_PERM)) n_perm++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] u32(int v);
    return v;
  endfunction
  function automatic logic [15:0] u16(int v);
    return v[15:0];
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h), expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic dm_write(int byte_addr, logic [15:0] v);
    @(negedge clk);
    dm_we = 1'b1; dm_addr = 15'(byte_addr >> 1); dm_wdata = v;
    @(negedge clk);
    dm_we = 1'b0;
  endtask

  task automatic dm_read(int byte_addr, output logic [15:0] v);
    @(negedge clk);
    dm_addr = 15'(byte_addr >> 1);
    #1 v = dm_rdata;
  endtask

  task automatic load_prog(Asm a);
    foreach (a.code[i]) begin
      @(negedge clk);
      pm_we = 1'b1; pm_waddr = 12'(i); pm_wdata = a.code[i];
    end
    @(negedge clk);
    pm_we = 1'b0;
  endtask

  // run from parcel 0 until halted; cycles = packets issued
  task automatic run(Asm a, output int cycles);
    load_prog(a);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (running) begin
      @(negedge clk);
      if (running) cycles++;
    end
    if (halted) n_halt++;
  endtask

  task automatic read_sreg(int i, output logic [31:0] v);
    dbg_sreg_addr = 4'(i);
    #1 v = dbg_sreg;
  endtask

  // ---------------------------------------------------------------- MAE
  task automatic test_mae();
    Asm a = new();
    int cyc, loop;
    logic [15:0] pa[64], pb[64], v;
    int lane_sum[4], total;
    for (int i = 0; i < 64; i++) begin
      pa[i] = 16'($urandom_range(255));
      pb[i] = 16'($urandom_range(255));
      dm_write(10000 + 2*i, pa[i]);
      dm_write(10128 + 2*i, pb[i]);
    end
    for (int k = 0; k < 4; k++) begin
      dm_write(30000 + 2*k, 16'h0000);
      lane_sum[k] = 0;
    end
    for (int i = 0; i < 64; i++)
      lane_sum[i % 4] += (pa[i] > pb[i]) ? int'(pa[i] - pb[i]) : int'(pb[i] - pa[i]);
    a.r3(OP_SUB, 1, 1, 1); a.l(OP_MOVA, 0, 0, 16'd10000); a.endp();
    a.l(OP_MOVA, 1, 0, 16'd10128); a.endp();
    a.l(OP_MOVA, 2, 0, 16'd20000); a.endp();
    a.l(OP_MOVA, 3, 0, 16'd30000); a.endp();
    loop = a.here();
    a.l(OP_ADDI, 1, 1, 16'd1); a.r3(OP_SUBV, 0, 1, 2); a.endp();
    a.l(OP_ADDI, 1, 2, -16'sd16); a.l(OP_ADDIA, 0, 0, 16'd8); a.s(OP_ABSV, 2, 2); a.endp();
    a.l(OP_BNE, 2, 0, 16'(loop)); a.l(OP_ADDIA, 1, 1, 16'd8); a.r3(OP_ADDV, 2, 3, 3); a.endp();
    a.s(OP_END); a.endp();
    run(a, cyc);
    total = 0;
    for (int k = 0; k < 4; k++) begin
      dm_read(30000 + 2*k, v);
      check($sformatf("MAE lane %0d", k), v, 16'(lane_sum[k]));
      total += int'(v);
    end
    check("MAE total", total, lane_sum[0] + lane_sum[1] + lane_sum[2] + lane_sum[3]);
    // 4 set-up packets, 16 iterations of 3 packets for 64 pixels, end
    check("MAE cycles", cyc, 4 + 48 + 1);
    check("MAE loop cycles per 4 pixels", 48 * 4 / 64, 3);
    check("MAE error", 64'(error), 0);
  endtask

  // ------------------------------------------------------------ Viterbi
  // Path metrics pm at 13000 (a0), branch metrics at 13200 (a1), candidate
  // buffer at 13300 (a2), survivors at 13100 (a3) and 13016.. (a5). Each
  // pair of packets performs add / compare-select for four states.
  task automatic test_viterbi();
    Asm a = new();
    int cyc;
    logic [15:0] mem[int];
    logic [15:0] v;
    int steps = 4;
    int a0 = 13000, a3 = 13100, a5 = 13400;
    for (int i = 0; i < 64; i++) begin
      mem[13000 + 2*i] = 16'($urandom_range(1000));
      mem[13100 + 2*i] = 16'($urandom_range(1000));
      mem[13400 + 2*i] = 16'($urandom_range(1000));
      dm_write(13000 + 2*i, mem[13000 + 2*i]);
      dm_write(13100 + 2*i, mem[13100 + 2*i]);
      dm_write(13400 + 2*i, mem[13400 + 2*i]);
    end
    for (int k = 0; k < 4; k++) begin
      mem[13200 + 2*k] = 16'($urandom_range(50));
      dm_write(13200 + 2*k, mem[13200 + 2*k]);
    end
    a.l(OP_MOVA, 0, 0, 16'(a0)); a.endp();
    a.l(OP_MOVA, 1, 0, 16'd13200); a.endp();
    a.l(OP_MOVA, 2, 0, 16'd13300); a.endp();
    a.l(OP_MOVA, 3, 0, 16'(a3)); a.endp();
    a.l(OP_MOVA, 5, 0, 16'(a5)); a.endp();
    for (int s = 0; s < steps; s++) begin
      a.r3(OP_ADDV, 0, 1, 2); a.endp();
      a.r3(OP_MINV, 2, 3, 3); a.l(OP_ADDIA, 3, 3, 16'd4); a.endp();
      a.r3(OP_SUBV, 0, 1, 2); a.l(OP_ADDIA, 0, 0, 16'd8); a.endp();
      a.r3(OP_MINV, 2, 5, 5); a.l(OP_ADDIA, 5, 5, 16'd4); a.endp();
    end
    a.s(OP_END); a.endp();
    run(a, cyc);
    // reference
    for (int s = 0; s < steps; s++) begin
      for (int k = 0; k < 4; k++) begin
        logic signed [15:0] p, b, c, o;
        p = mem[a0 + 2*k]; b = mem[13200 + 2*k];
        c = p + b; o = mem[a3 + 2*k];
        mem[a3 + 2*k] = (c < o) ? c : o;
      end
      for (int k = 0; k < 4; k++) begin
        logic signed [15:0] p, b, c, o;
        p = mem[a0 + 2*k]; b = mem[13200 + 2*k];
        c = p - b; o = mem[a5 + 2*k];
        mem[a5 + 2*k] = (c < o) ? c : o;
      end
      a3 += 4; a0 += 8; a5 += 4;
    end
    for (int i = 0; i < 24; i++) begin
      dm_read(13100 + 2*i, v); check($sformatf("ACS survivor a %0d", i), v, mem[13100 + 2*i]);
      dm_read(13400 + 2*i, v); check($sformatf("ACS survivor b %0d", i), v, mem[13400 + 2*i]);
    end
    // two ACS (add, compare-select) vector operations per two cycles
    check("Viterbi cycles", cyc, 5 + 4 * steps + 1);
  endtask

  // --------------------------------------------------------------- DLMS
  // Integer delayed LMS over T taps. x[i-j] 16-bit at 12000 + 2j, w[j]
  // 32-bit at 12100 + 4j, err at 12300, y stored to 12400.
  task automatic test_dlms();
    Asm a = new();
    int T = 8, cyc;
    int x[9], w[8], wn[8], err, y;
    logic [15:0] lo, hi;
    for (int j = 0; j <= T; j++) begin
      x[j] = $urandom_range(200) - 100;
      dm_write(12000 + 2*j, 16'(x[j]));
    end
    for (int j = 0; j < T; j++) begin
      w[j] = $urandom_range(2000) - 1000;
      dm_write(12100 + 4*j, 16'(w[j]));
      dm_write(12102 + 4*j, 16'(w[j] >>> 16));
    end
    err = $urandom_range(100) - 50;
    dm_write(12300, 16'(err));
    dm_write(12304, 16'h0000); dm_write(12306, 16'h0000);
    y = 0;
    for (int j = 0; j < T; j++) begin
      y += x[j] * w[j];
      wn[j] = w[j] + x[j+1] * err;
    end
    // set-up: pointers, err into c7 lane 0, clear y (c7 H), first x and w
    a.l(OP_MOVA, 0, 0, 16'd12000); a.endp();
    a.l(OP_MOVA, 1, 0, 16'd12100); a.endp();
    a.l(OP_MOVA, 2, 0, 16'd12100); a.endp();
    a.l(OP_MOVA, 3, 0, 16'd12300); a.endp();
    a.cr(OP_L16V, 3, cs(7, 0)); a.l(OP_ADDIA, 3, 3, 16'd4); a.endp();
    a.cr(OP_L32V, 3, cs(7, 1)); a.endp();
    a.cr(OP_L16V, 0, cs(2, 0)); a.l(OP_ADDIA, 0, 0, 16'd2); a.endp();
    a.cr(OP_L32V, 1, cs(0, 0)); a.l(OP_ADDIA, 1, 1, 16'd4); a.endp();
    for (int j = 0; j < T; j++) begin
      int xr = 2 + j % 2, xn = 2 + (j + 1) % 2, wr = j % 2, wnx = (j + 1) % 2;
      // y[i] += x[i-j] * w[j]; load x[i-j-1]
      a.cr(OP_MACV, 0, cs(xr, 0), cs(wr, 0), cs(7, 1));
      a.cr(OP_L16V, 0, cs(xn, 0)); a.l(OP_ADDIA, 0, 0, 16'd2); a.endp();
      // w[j] += x[i-j-1] * err; load w[j+1]
      a.cr(OP_MACV, 0, cs(xn, 0), cs(7, 0), cs(wr, 0));
      a.cr(OP_L32V, 1, cs(wnx, 0)); a.l(OP_ADDIA, 1, 1, 16'd4); a.endp();
      // store w[j]
      a.cr(OP_SR32V, 2, cs(wr, 0)); a.l(OP_ADDIA, 2, 2, 16'd4); a.endp();
    end
    a.l(OP_MOVA, 4, 0, 16'd12400); a.endp();
    a.cr(OP_SR32V, 4, cs(7, 1)); a.endp();
    a.s(OP_END); a.endp();
    run(a, cyc);
    for (int j = 0; j < T; j++) begin
      dm_read(12100 + 4*j, lo); dm_read(12102 + 4*j, hi);
      check($sformatf("DLMS w[%0d]", j), int'({hi, lo}), wn[j]);
    end
    dm_read(12400, lo); dm_read(12402, hi);
    check("DLMS y", int'({hi, lo}), y);
    check("DLMS cycles", cyc, 8 + 3 * T + 3);
  endtask

  // -------------------------------------------------- scalar and others
  task automatic test_misc();
    Asm a = new();
    int cyc, sub_addr, skip, link;
    logic [31:0] v;
    logic [15:0] h;
    int p0, p1, p2, p3;
    dm_write(14000, 16'h80F1); dm_write(14002, 16'h1234);
    p0 = 11; p1 = -22; p2 = 33; p3 = -44;
    dm_write(14100, 16'(p0)); dm_write(14102, 16'(p1));
    dm_write(14104, 16'(p2)); dm_write(14106, 16'(p3));
    dm_write(14200, 16'h7000); dm_write(14202, 16'h0000);
    dm_write(14204, 16'h7000); dm_write(14206, 16'h0000);
    // scalar arithmetic and memory
    a.l(OP_ADDI, 0, 3, 16'd1000); a.l(OP_MOVA, 0, 0, 16'd14100); a.endp();     // r3 = 1000
    a.l(OP_ADDI, 0, 4, -16'sd7); a.l(OP_MOVA, 1, 0, 16'd14200); a.endp();      // r4 = -7
    a.r3(OP_ADD, 3, 4, 5); a.endp();                                           // r5 = 993
    a.r3(OP_SUB, 4, 3, 6); a.endp();                                           // r6 = -1007
    a.s(OP_MULT, 3, 4); a.endp();                                              // -7000
    a.s(OP_MFLO, 7); a.endp();
    a.s(OP_MFHI, 8); a.endp();
    a.r3(OP_AND, 3, 4, 9); a.endp();
    a.r3(OP_OR, 3, 4, 10); a.endp();
    a.r3(OP_XOR, 3, 4, 11); a.endp();
    a.l(OP_SLL, 3, 12, 16'd4); a.endp();
    a.l(OP_SRA, 4, 13, 16'd1); a.endp();
    a.l(OP_SRL, 4, 14, 16'd28); a.endp();
    a.r3(OP_SLT, 4, 3, 1); a.endp();                                           // 1
    a.l(OP_SLTI, 4, 2, 16'd5); a.endp();                                       // 1
    a.l(OP_ADDI, 0, 5, 16'd14000); a.endp();                                   // r5 = 14000
    a.l(OP_LB, 5, 3, 16'd1); a.endp();                                         // 0xFFFFFF80
    a.l(OP_LH, 5, 4, 16'd0); a.endp();                                         // 0xFFFF80F1
    a.l(OP_LW, 5, 6, 16'd0); a.endp();                                         // 0x123480F1
    a.l(OP_SW, 5, 6, 16'd8); a.endp();
    a.l(OP_SH, 5, 3, 16'd12); a.endp();
    a.l(OP_SB, 5, 6, 16'd15); a.endp();
    // subroutine call and return, conditional branches, jump
    sub_addr = 200;
    a.l(OP_JAL, 0, 0, 16'(sub_addr)); a.endp();
    link = a.here();
    a.l(OP_BEQ, 0, 0, 16'(a.here() + 6)); a.endp();                            // taken, skips 2
    a.l(OP_ADDI, 0, 9, 16'd99); a.endp();                                      // skipped
    a.l(OP_ADDI, 0, 9, 16'd98); a.endp();                                      // skipped
    a.l(OP_BNE, 0, 0, 16'd0); a.endp();                                        // not taken
    skip = a.here() + 4;
    a.l(OP_JUMP, 0, 0, 16'(skip)); a.endp();
    a.l(OP_ADDI, 0, 10, 16'd77); a.endp();                                     // skipped
    // permutation, unsigned MAC and rounding with saturation
    a.l(OP_PERM, 0, 0, 16'b00_01_10_11); a.s(6'h3A, 1, 2); a.endp();          // reverse lanes; user op
    a.cr(OP_L16V, 1, cs(5, 0)); a.endp();                                      // c5 lane0 = 0x7000
    a.cr(OP_L16V, 1, cs(5, 2)); a.l(OP_ADDIA, 1, 6, 16'd8); a.endp();          // c5 lane2 = 0x7000
    a.cr(OP_MACUV, 0, cs(5, 0), cs(5, 0), cs(6, 0));
    a.cr(OP_MACV, 0, cs(5, 2), cs(5, 2), cs(6, 1)); a.endp();                  // dual MAC
    a.cr(OP_MACV, 0, cs(5, 2), cs(5, 2), cs(6, 1)); a.endp();
    a.cr(OP_SR16V, 6, cs(6, 1)); a.endp();                                     // saturates
    a.l(OP_ADDA, 0, 1, 16'd7); a.endp();                                       // a7 = a0 + a1
    a.r3(OP_MAXV, 0, 1, 7); a.endp();
    a.l(OP_MOVA, 0, 0, 16'd14300); a.endp();
    a.r3(OP_ANDV, 1, 1, 0); a.endp();
    a.s(OP_END); a.endp();
    while (a.here() < sub_addr) a.code.push_back(16'h0000);
    a.l(OP_ADDI, 2, 2, 16'd55); a.endp();
    a.s(OP_JR, LINK_REG); a.endp();
    run(a, cyc);
    read_sreg(3, v);  check("lb", v, 32'hFFFFFF80);
    read_sreg(4, v);  check("lh", v, 32'hFFFF80F1);
    read_sreg(6, v);  check("lw", v, 32'h123480F1);
    read_sreg(7, v);  check("mflo", v, u32(-7000));
    read_sreg(8, v);  check("mfhi", v, 32'hFFFFFFFF);
    read_sreg(9, v);  check("and", v, u32(1000 & -7));
    read_sreg(10, v); check("or / jump", v, u32(1000 | -7));
    read_sreg(11, v); check("xor", v, u32(1000 ^ -7));
    read_sreg(12, v); check("sll", v, 16000);
    read_sreg(13, v); check("sra", v, u32(-4));
    read_sreg(14, v); check("srl", v, 32'hF);
    read_sreg(1, v);  check("slt", v, 1);
    read_sreg(2, v);  check("slti / subroutine", v, 56);
    read_sreg(15, v); check("jal link", v, link);
    read_sreg(0, v);  check("r0 stays zero", v, 0);
    dm_read(14008, h); check("sw low", h, 16'h80F1);
    dm_read(14010, h); check("sw high", h, 16'h1234);
    dm_read(14012, h); check("sh", h, 16'hFF80);
    dm_read(14014, h); check("sb", h[15:8], 8'hF1);
    // perm reversed 11,-22,33,-44 at 14100
    dm_read(14100, h); check("perm lane0", h, u16(p3));
    dm_read(14106, h); check("perm lane3", h, u16(p0));
    // c6 L = 0x7000^2 unsigned, c6 H = 0x7000^2 signed; sr16v saturates
    check("macuv", cregs[6][39:0], 40'h0031000000);
    check("macv H", cregs[6][79:40], 40'h0062000000);
    dm_read(14208, h); check("sr16v saturated", h, 16'h7fff);
    check("adda", areg[7], 16'(14100 + 14200));
    // maxv of (-44,33,-22,11) and (0x7000,0,0x7000,0) into a7
    dm_read(28302, h); check("maxv lane1", h, u16(33));
    dm_read(28304, h); check("maxv lane2", h, 16'h7000);
    dm_read(14300, h); check("andv", h, 16'h7000);
    check("misc error", 64'(error), 0);
  endtask

  task automatic test_illegal();
    Asm a = new();
    int cyc;
    a.l(OP_MOVA, 0, 0, 16'd1); a.l(OP_MOVA, 1, 0, 16'd2); a.endp();   // two AGU ops
    a.s(OP_END); a.endp();
    run(a, cyc);
    check("illegal packet stops the core", 64'(error), 1);
    check("illegal packet cycles", cyc, 1);
    if (error) n_illegal++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    test_mae();
    test_viterbi();
    test_dlms();
    test_misc();
    test_illegal();
    $display("mechanisms: branch=%0d dual_mac=%0d wide_packet=%0d long_instr=%0d sat=%0d user=%0d simd=%0d perm=%0d illegal=%0d halt=%0d",
             n_branch, n_dual_mac, n_wide, n_long, n_sat, n_user, n_simd, n_perm, n_illegal, n_halt);
    check("mechanism taken branch", n_branch > 0, 1);
    check("mechanism dual MAC packet", n_dual_mac > 0, 1);
    check("mechanism 3-instruction packet", n_wide > 0, 1);
    check("mechanism long instruction", n_long > 0, 1);
    check("mechanism rounding saturation", n_sat > 0, 1);
    check("mechanism user-defined slot", n_user > 0, 1);
    check("mechanism SIMD ALU", n_simd > 0, 1);
    check("mechanism permutation", n_perm > 0, 1);
    check("mechanism illegal packet", n_illegal > 0, 1);
    check("mechanism end/halt", n_halt > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
