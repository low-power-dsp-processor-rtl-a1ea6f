// tb_instr_queue: builds random packets of short and long instructions for
// random slot combinations (including two MACs and the user slot), places
// them in the fetch window with random trailing parcels, and checks slot
// contents, packet length and the illegal flag; also checks packets with a
// repeated slot, an unknown opcode and a missing end bit.
module tb_instr_queue;
  import dsp_pkg::*;
  logic [MAX_PARCELS-1:0][15:0] window;
  instr_t [NSLOT-1:0] slots, exp_slots;
  logic [4:0] pkt_len;
  logic illegal;
  int checks = 0, failures = 0;
  instr_queue dut (.*);

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

  function automatic logic [5:0] op_for(slot_e s);
    case (s)
      S_PSB:  return 6'($urandom_range(26));
      S_DGB:  return 6'(32 + $urandom_range(2));
      S_ALU:  return 6'(40 + $urandom_range(12));
      S_MAC0, S_MAC1: return 6'(54 + $urandom_range(1));
      default: return 6'(56 + $urandom_range(7));
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic slot_e order[$] = {};
      automatic int pos = 0;
      for (int s = 0; s < NSLOT; s++)
        if ($urandom_range(1)) order.push_back(slot_e'(s));
      if (order.size() == 0) order.push_back(S_PSB);
      order.shuffle();
      // MAC0 must come before MAC1 in the packet
      for (int i = 0, m = 0; i < order.size(); i++)
        if (order[i] == S_MAC0 || order[i] == S_MAC1) begin
          order[i] = m ? S_MAC1 : S_MAC0; m = 1;
        end
      for (int k = 0; k < MAX_PARCELS; k++) window[k] = 16'($urandom);
      exp_slots = '0;
      pos = 0;
      foreach (order[i]) begin
        logic lng;
        instr_t ins;
        lng = 1'($urandom);
        ins.valid = 1'b1; ins.op = op_for(order[i]);
        ins.a = 4'($urandom); ins.b = 4'($urandom);
        ins.ext = lng ? 16'($urandom) : 16'h0;
        window[pos] = {(i == order.size() - 1), lng, ins.op, ins.a, ins.b};
        if (lng) window[pos + 1] = ins.ext;
        exp_slots[order[i]] = ins;
        pos += lng ? 2 : 1;
      end
      #1;
      chk("len", pkt_len, pos);
      chk("illegal", illegal, 0);
      for (int s = 0; s < NSLOT; s++) chk($sformatf("slot %0d", s), slots[s], exp_slots[s]);
    end
    // two address instructions: illegal
    window = '0;
    window[0] = {1'b0, 1'b0, 6'(OP_MOVA), 8'h00};
    window[1] = {1'b1, 1'b0, 6'(OP_ADDIA), 8'h00};
    #1 chk("repeated slot", illegal, 1); chk("cleared", slots, 0);
    // third MAC: illegal
    window[0] = {1'b0, 1'b0, 6'(OP_MACV), 8'h00};
    window[1] = {1'b0, 1'b0, 6'(OP_MACV), 8'h00};
    window[2] = {1'b1, 1'b0, 6'(OP_MACUV), 8'h00};
    #1 chk("third mac", illegal, 1);
    // unknown opcode
    window[0] = {1'b1, 1'b0, 6'h24, 8'h00};
    #1 chk("unknown opcode", illegal, 1);
    // no end bit within six instructions
    for (int k = 0; k < MAX_PARCELS; k++) window[k] = {1'b0, 1'b0, 6'(OP_NOP), 8'h00};
    #1 chk("missing end", illegal, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
