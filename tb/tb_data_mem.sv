// tb_data_mem: random traffic on all ports of the data memory (two vector
// reads, masked vector write, byte-enabled scalar write, host port) at
// halfword-aligned addresses, against a halfword array model with the
// documented write priority host > scalar > vector.
module tb_data_mem;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic [15:0] va_addr, vb_addr, vw_addr, s_addr;
  logic [63:0] va_data, vb_data, vw_data;
  logic vw_en, s_we, h_we;
  logic [3:0] vw_mask, s_be;
  logic [31:0] s_rdata, s_wdata;
  logic [7:0] h_addr;
  logic [15:0] h_wdata, h_rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  data_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(logic [15:0] a, int k);
    return (int'(a >> 1) + k) % DEPTH;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    vw_en = 0; s_we = 0; h_we = 0;
    // fill through the host port
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      h_we = 1'b1; h_addr = 8'(i); h_wdata = 16'($urandom); model[i] = h_wdata;
    end
    @(negedge clk) h_we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      va_addr = 16'($urandom_range(2 * DEPTH - 1)) & 16'hfffe;
      vb_addr = 16'($urandom_range(2 * DEPTH - 1)) & 16'hfffe;
      vw_addr = 16'($urandom_range(2 * DEPTH - 1)) & 16'hfffe;
      s_addr  = 16'($urandom_range(2 * DEPTH - 1)) & 16'hfffe;
      h_addr  = 8'($urandom);
      vw_en = 1'($urandom); vw_mask = 4'($urandom); vw_data = {$urandom, $urandom};
      s_we = 1'($urandom); s_be = 4'($urandom); s_wdata = $urandom;
      h_we = ($urandom_range(3) == 0); h_wdata = 16'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        chk("va", va_data[16*k +: 16], model[ix(va_addr, k)]);
        chk("vb", vb_data[16*k +: 16], model[ix(vb_addr, k)]);
      end
      chk("s", s_rdata, {model[ix(s_addr, 1)], model[ix(s_addr, 0)]});
      chk("h", h_rdata, model[h_addr]);
      if (vw_en)
        for (int k = 0; k < 4; k++)
          if (vw_mask[k]) model[ix(vw_addr, k)] = vw_data[16*k +: 16];
      if (s_we)
        for (int k = 0; k < 2; k++) begin
          if (s_be[2*k])   model[ix(s_addr, k)][7:0]  = s_wdata[16*k +: 8];
          if (s_be[2*k+1]) model[ix(s_addr, k)][15:8] = s_wdata[16*k+8 +: 8];
        end
      if (h_we) model[h_addr] = h_wdata;
    end
    @(negedge clk);
    vw_en = 0; s_we = 0; h_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      h_addr = 8'(i); #1;
      chk("final", h_rdata, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
