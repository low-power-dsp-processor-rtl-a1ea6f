// tb_split_regfile: random half and lane writes on all three ports, checked
// against a model that applies the writes one port after another.
module tb_split_regfile;
  import dsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  rf_wr_t wr [3];
  logic [NUM_CREG-1:0][CREG_W-1:0] regs, model;
  int checks = 0, failures = 0;
  split_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) wr[p] = '0;
    model = '0;
    #12 rst_n = 1'b1;
    checks++; if (regs !== '0) failures++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        wr[p].en      = 1'($urandom);
        wr[p].idx     = 3'($urandom);
        wr[p].is_lane = (p == 0) ? 1'($urandom) : 1'b0;
        wr[p].sel     = 2'($urandom);
        wr[p].data    = {8'($urandom), $urandom};
      end
      // different registers unless parts differ, as the core issues them
      if (wr[1].idx == wr[0].idx) wr[1].idx = wr[0].idx + 3'd1;
      if (wr[2].idx == wr[0].idx || wr[2].idx == wr[1].idx) begin
        wr[2].idx = wr[1].idx; wr[2].sel[0] = ~wr[1].sel[0];
        if (wr[2].idx == wr[0].idx) wr[2].en = 1'b0;
      end
      for (int p = 0; p < 3; p++)
        if (wr[p].en) begin
          if (wr[p].is_lane)
            model[wr[p].idx][LANE_W*wr[p].sel +: LANE_W] = LANE_W'($signed(wr[p].data[15:0]));
          else
            model[wr[p].idx][ACC_W*wr[p].sel[0] +: ACC_W] = wr[p].data;
        end
      @(posedge clk); #1;
      checks++;
      if (regs !== model) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
