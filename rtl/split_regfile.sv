// split_regfile: splittable register file of the computation block.
//
// NUM_CREG 80-bit registers c0..c7. Each register is either two 40-bit
// accumulators, L = bits [39:0] and H = bits [79:40], or four 16-bit
// registers, lane k held in the 20-bit quarter [20k+19:20k] with its value
// sign-extended into the quarter's top four bits. So lanes 0 and 1 lie in L
// and lanes 2 and 3 in H, and the lane 0 (or 2) value read as 16 bits is the
// low 16 bits of L (or H).
// Three write ports (one per issuing computation slot: ALU-slot loads,
// MAC 0, MAC 1) each write one half or one lane at the rising edge; if two
// ports write the same bits, the higher-numbered port wins (an assertion
// reports it). All registers are read combinationally. Reset clears them.
// The 80/40/16-bit split follows the core's description; the lane layout
// inside the 80 bits, the port count and the priority are this design's own.
module split_regfile
  import dsp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  rf_wr_t wr [3],
  output logic [NUM_CREG-1:0][CREG_W-1:0] regs
);
  function automatic logic [CREG_W-1:0] mask_of(rf_wr_t w);
    if (w.is_lane) return CREG_W'({LANE_W{1'b1}}) << (LANE_W * w.sel);
    else           return CREG_W'({ACC_W{1'b1}})  << (ACC_W * w.sel[0]);
  endfunction

  function automatic logic [CREG_W-1:0] data_of(rf_wr_t w);
    if (w.is_lane) return CREG_W'(LANE_W'($signed(w.data[15:0]))) << (LANE_W * w.sel);
    else           return CREG_W'(w.data) << (ACC_W * w.sel[0]);
  endfunction

  // Ports are merged in order, so writes to different parts of one
  // register in the same cycle all land.
  logic [NUM_CREG-1:0][CREG_W-1:0] regs_next;
  always_comb begin
    regs_next = regs;
    for (int p = 0; p < 3; p++)
      if (wr[p].en)
        regs_next[wr[p].idx] = (regs_next[wr[p].idx] & ~mask_of(wr[p])) |
                               (data_of(wr[p]) & mask_of(wr[p]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) regs <= '0;
    else        regs <= regs_next;

  // A later port overriding an earlier write to the same bits loses data.
  logic overlap;
  always_comb begin
    overlap = 1'b0;
    for (int p = 0; p < 3; p++)
      for (int q = p + 1; q < 3; q++)
        if (wr[p].en && wr[q].en && wr[p].idx == wr[q].idx &&
            (mask_of(wr[p]) & mask_of(wr[q])) != '0)
          overlap = 1'b1;
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !overlap)
    else $error("split_regfile: two write ports write the same bits");
endmodule
