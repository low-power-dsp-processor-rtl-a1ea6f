// tb_dlms_program: a complete delayed-LMS adaptive filter program on the
// full-size core. For each input sample the core runs the three-cycle-per-
// tap schedule (y += x*w with the next x load; w += x*err with the next w
// load; store of w) in a loop of two taps whose counter and branch ride in
// the otherwise idle scalar slot, then stores y, and the scalar unit
// computes the error e = d - y, scales it by an arithmetic shift (2*mu as
// a power of two) and stores it for the next sample's updates.
// Outputs, final weights and cycle counts are checked against an integer
// model of the same algorithm written here.
module tb_dlms_program;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

  localparam int T  = 8;        // taps (even)
  localparam int NS = 6;        // samples
  localparam int S  = 12;       // error scaling shift
  localparam int X0 = 20000, W0 = 21000, Y0 = 22000, D0 = 23000;
  localparam int ERR = 24000, ZERO = 24100;

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
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic dm_write(int byte_addr, logic [15:0] v);
    @(negedge clk);
    dm_we = 1'b1; dm_addr = 15'(byte_addr >> 1); dm_wdata = v;
    @(negedge clk);
    dm_we = 1'b0;
  endtask
  task automatic dm_write32(int byte_addr, int v);
    dm_write(byte_addr, 16'(v));
    dm_write(byte_addr + 2, 16'(v >>> 16));
  endtask
  task automatic dm_read32(int byte_addr, output int v);
    logic [15:0] lo;
    @(negedge clk);
    dm_addr = 15'(byte_addr >> 1);
    #1 lo = dm_rdata;
    dm_addr = 15'((byte_addr + 2) >> 1);
    #1 v = {dm_rdata, lo};
  endtask

  function automatic int sat32(longint v);
    return (v > 64'sd2147483647) ? 32'h7fffffff : (v < -64'sd2147483648) ? 32'h80000000 : int'(v);
  endfunction

  initial begin
    Asm a = new();
    int x[int], w[T], d[NS], y[NS], yg, err, cyc, lbl_s, lbl_t, setup;
    longint acc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // data: x_n for n = -(T+1) .. NS-1 at X0 + 2*(NS - n)
    for (int n = -(T + 1); n < NS; n++) begin
      x[n] = $urandom_range(128) - 64;
      dm_write(X0 + 2 * (NS - n), 16'(x[n]));
    end
    for (int j = 0; j < T; j++) begin
      w[j] = $urandom_range(512) - 256;
      dm_write32(W0 + 4 * j, w[j]);
    end
    for (int i = 0; i < NS; i++) begin
      d[i] = $urandom_range(40000) - 20000;
      dm_write32(D0 + 4 * i, d[i]);
    end
    dm_write32(ERR, 0);
    dm_write32(ZERO, 0);
    // reference model
    err = 0;
    for (int i = 0; i < NS; i++) begin
      acc = 0;
      for (int j = 0; j < T; j++) begin
        acc += longint'(x[i - j]) * longint'(w[j]);
        w[j] += x[i - j - 1] * err;
      end
      y[i] = sat32(acc);
      err = int'(16'((d[i] - y[i]) >>> S));
      err = int'($signed(16'(err)));
    end
    // program
    a.l(OP_ADDI, 0, 6, 16'(NS)); a.l(OP_MOVA, 6, 0, 16'(X0 + 2 * NS)); a.endp();
    a.l(OP_ADDI, 0, 8, 16'(D0)); a.l(OP_MOVA, 3, 0, 16'(ERR)); a.endp();
    a.l(OP_ADDI, 0, 9, 16'(Y0)); a.l(OP_MOVA, 5, 0, 16'(ZERO)); a.endp();
    a.l(OP_ADDI, 0, 7, 16'(ERR)); a.l(OP_MOVA, 4, 0, 16'(Y0)); a.endp();
    a.l(OP_MOVA, 7, 0, 16'd0); a.endp();
    setup = 5;
    lbl_s = a.here();
    a.l(OP_ADDI, 0, 5, 16'(T / 2)); a.l(OP_ADDA, 6, 7, 16'd0); a.cr(OP_L16V, 3, cs(7, 0)); a.endp();
    a.l(OP_MOVA, 1, 0, 16'(W0)); a.cr(OP_L32V, 5, cs(7, 1)); a.endp();
    a.l(OP_ADDIA, 0, 0, 16'd2); a.cr(OP_L16V, 0, cs(2, 0)); a.endp();
    a.l(OP_ADDIA, 1, 1, 16'd4); a.cr(OP_L32V, 1, cs(0, 0)); a.endp();
    a.l(OP_MOVA, 2, 0, 16'(W0)); a.endp();
    lbl_t = a.here();
    for (int h = 0; h < 2; h++) begin
      automatic int xr = 2 + h, xn = 3 - h, wr = h, wn = 1 - h;
      a.cr(OP_MACV, 0, cs(xr, 0), cs(wr, 0), cs(7, 1));
      a.l(OP_ADDIA, 0, 0, 16'd2); a.cr(OP_L16V, 0, cs(xn, 0)); a.endp();
      a.cr(OP_MACV, 0, cs(xn, 0), cs(7, 0), cs(wr, 0));
      a.l(OP_ADDIA, 1, 1, 16'd4); a.cr(OP_L32V, 1, cs(wn, 0)); a.endp();
      if (h == 0) a.l(OP_ADDI, 5, 5, -16'sd1);
      else        a.l(OP_BNE, 5, 0, 16'(lbl_t));
      a.l(OP_ADDIA, 2, 2, 16'd4); a.cr(OP_SR32V, 2, cs(wr, 0)); a.endp();
    end
    a.l(OP_ADDIA, 6, 6, -16'sd2); a.cr(OP_SR32V, 4, cs(7, 1)); a.endp();
    a.l(OP_LW, 9, 1, 16'd0); a.l(OP_ADDIA, 4, 4, 16'd4); a.endp();
    a.l(OP_LW, 8, 2, 16'd0); a.endp();
    a.r3(OP_SUB, 2, 1, 3); a.endp();
    a.l(OP_SRA, 3, 4, 16'(S)); a.endp();
    a.l(OP_SH, 7, 4, 16'd0); a.endp();
    a.l(OP_ADDI, 8, 8, 16'd4); a.endp();
    a.l(OP_ADDI, 9, 9, 16'd4); a.endp();
    a.l(OP_ADDI, 6, 6, -16'sd1); a.endp();
    a.l(OP_BNE, 6, 0, 16'(lbl_s)); a.endp();
    a.s(OP_END); a.endp();
    foreach (a.code[i]) begin
      @(negedge clk);
      pm_we = 1'b1; pm_waddr = 12'(i); pm_wdata = a.code[i];
    end
    @(negedge clk) pm_we = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (running) begin
      @(negedge clk);
      if (running) cyc++;
    end
    check("error flag", 64'(error), 0);
    for (int i = 0; i < NS; i++) begin
      dm_read32(Y0 + 4 * i, yg);
      check($sformatf("y[%0d]", i), yg, y[i]);
    end
    for (int j = 0; j < T; j++) begin
      dm_read32(W0 + 4 * j, yg);
      check($sformatf("w[%0d]", j), yg, w[j]);
    end
    // per sample: 5 set-up packets, 3 per tap, 10 for output and error
    check("cycles", cyc, setup + NS * (5 + 3 * T + 10) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
