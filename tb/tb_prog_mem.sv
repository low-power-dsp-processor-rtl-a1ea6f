// tb_prog_mem: loads random parcels and checks the fetch window at random
// start addresses, including windows that wrap past the last parcel.
module tb_prog_mem;
  localparam int DEPTH = 256, WIN = 12;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0;
  logic [WIN-1:0][15:0] window;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  prog_mem #(.DEPTH(DEPTH), .WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      raddr = (n < 4) ? 8'(DEPTH - 1 - n) : 8'($urandom);
      #1;
      for (int k = 0; k < WIN; k++) begin
        checks++;
        if (window[k] !== model[(int'(raddr) + k) % DEPTH]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
