// instr_queue: instruction fetch, alignment and predecoding.
//
// Each cycle it takes the window of parcels that starts at the current PC
// and finds the packet there: it walks the headers, steps over the
// extension parcel of each long instruction (X bit), and stops after the
// header whose E bit is set. Predecoding sorts every instruction by its
// opcode into a slot: program sequencing, address generation, SIMD ALU,
// first MAC, second MAC (a second MAC instruction in a packet goes to the
// second MAC) or the user-defined space. The aligned slots and the packet
// length in parcels leave combinationally, so a packet issues in the cycle
// it is fetched. A packet with two instructions for one slot, an unknown
// opcode, or no E bit within MAX_INSTR instructions is flagged illegal and
// its slots are cleared.
// Variable-length packets of 16-bit basic instructions follow the core's
// description; the E/X encoding and the slot rules are this design's own.
module instr_queue
  import dsp_pkg::*;
(
  input  logic [MAX_PARCELS-1:0][15:0] window,
  output instr_t [NSLOT-1:0]           slots,
  output logic [4:0]                   pkt_len,
  output logic                         illegal
);
  always_comb begin
    logic        done;
    logic [4:0]  pos;
    logic [15:0] hdr;
    logic [15:0] ext;
    logic        lng;
    instr_t      ins;
    unit_e       u;
    slot_e       s;

    slots   = '0;
    illegal = 1'b0;
    done    = 1'b0;
    pos     = '0;
    for (int i = 0; i < MAX_INSTR; i++) begin
      if (!done) begin
        hdr = window[pos];
        lng = hdr[14];
        ext = lng ? window[pos + 5'd1] : 16'h0000;
        ins = '{valid: 1'b1, op: hdr[13:8], a: hdr[7:4], b: hdr[3:0], ext: ext};
        u   = unit_of(hdr[13:8]);
        s   = S_PSB;
        case (u)
          U_PSB:  s = S_PSB;
          U_DGB:  s = S_DGB;
          U_ALU:  s = S_ALU;
          U_MAC:  s = slots[S_MAC0].valid ? S_MAC1 : S_MAC0;
          U_USER: s = S_USER;
          default: illegal = 1'b1;
        endcase
        if (u != U_BAD) begin
          if (slots[s].valid) illegal = 1'b1;
          else                slots[s] = ins;
        end
        pos  = pos + (lng ? 5'd2 : 5'd1);
        done = hdr[15];
      end
    end
    if (!done) illegal = 1'b1;
    if (illegal) slots = '0;
    pkt_len = pos;
  end
endmodule
