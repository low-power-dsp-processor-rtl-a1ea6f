// comp_block: computation block of the DSP core.
//
// Local decoder plus datapath for three slots of a packet: the ALU slot and
// two MAC slots. Inside: the 80-bit SIMD ALU, two 40/16-bit MAC units, the
// permutation/rounding unit and the splittable register file c0..c7.
// ALU-slot instructions address data memory through the address registers
// of the data generation block (fields A, B, C name a0..a7):
//   absv  aA aB        mem[aB] = |mem[aA]|                 (4 lanes)
//   addv/subv/maxv/minv/andv/orv/xorv aA aB aC
//                      mem[aC] = mem[aA] op mem[aB]        (4 lanes)
//   l32v  aA cX.h      40-bit half <- sign-extended 32-bit mem[aA]
//   l16v  aA cX.n      16-bit lane <- 16-bit mem[aA]
//   sr32v aA cX.h      32-bit mem[aA] <- saturated half
//   sr16v aA cX.h      16-bit mem[aA] <- rounded, saturated half
//   perm  aA pattern   mem[aA] <- its four lanes reordered
// MAC-slot instructions (macv signed, macuv unsigned) C1 C2 C3:
//   C3 (40-bit half) += C1 (16-bit lane) * C2 (16-bit lane)
// Memory operands are read combinationally and results are written at the
// rising edge closing the cycle, so each packet is a single-cycle,
// memory-to-memory SIMD operation and the next packet sees its result.
// The instructions and units follow the core's instruction table and block
// diagram; operand fields, lane/half selection and timing are this design's.
module comp_block
  import dsp_pkg::*;
#(
  parameter int RND_SHIFT = 15
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t ins_alu,
  input  instr_t ins_mac0,
  input  instr_t ins_mac1,
  input  logic [NUM_AREG-1:0][AREG_W-1:0] areg,
  // data memory vector ports
  output logic [15:0] va_addr,
  input  logic [63:0] va_data,
  output logic [15:0] vb_addr,
  input  logic [63:0] vb_data,
  output logic        vw_en,
  output logic [15:0] vw_addr,
  output logic [3:0]  vw_mask,
  output logic [63:0] vw_data,
  // status
  output logic        sat_event,
  output logic [NUM_CREG-1:0][CREG_W-1:0] cregs
);
  logic [63:0] alu_z;
  logic [63:0] vperm;
  logic [39:0] st_acc;
  logic [31:0] r32;
  logic [15:0] r16;
  logic        sat32, sat16;
  rf_wr_t      wr [3];
  logic [39:0] mac_out [2];
  instr_t      mac_ins [2];
  cspec_t      st_spec;

  function automatic logic [15:0] lane16(logic [NUM_CREG-1:0][CREG_W-1:0] r, cspec_t c);
    return r[c.idx][LANE_W*c.sel +: 16];
  endfunction
  function automatic logic [39:0] half40(logic [NUM_CREG-1:0][CREG_W-1:0] r, cspec_t c);
    return r[c.idx][ACC_W*c.sel[0] +: ACC_W];
  endfunction

  simd_alu u_alu (.op(ins_alu.op), .x(va_data), .y(vb_data), .z(alu_z));

  assign st_spec = c1_of(ins_alu.ext);
  assign st_acc  = half40(cregs, st_spec);

  perm_round_unit #(.RND_SHIFT(RND_SHIFT)) u_pr (
    .vin(va_data), .pattern(ins_alu.ext[7:0]), .vperm(vperm),
    .acc(st_acc), .r32(r32), .r16(r16), .sat32(sat32), .sat16(sat16)
  );

  assign mac_ins[0] = ins_mac0;
  assign mac_ins[1] = ins_mac1;

  for (genvar m = 0; m < 2; m++) begin : g_mac
    mac_unit u_mac (
      .is_unsigned(mac_ins[m].op == 6'(OP_MACUV)),
      .x(lane16(cregs, c1_of(mac_ins[m].ext))),
      .y(lane16(cregs, c2_of(mac_ins[m].ext))),
      .acc_in(half40(cregs, c3_of(mac_ins[m].ext))),
      .acc_out(mac_out[m])
    );
    always_comb begin
      cspec_t d;
      d = c3_of(mac_ins[m].ext);
      wr[m+1] = '{en: en && mac_ins[m].valid, idx: d.idx, is_lane: 1'b0,
                  sel: d.sel, data: mac_out[m]};
    end
  end

  // ALU-slot local decoder
  always_comb begin
    va_addr   = areg[ins_alu.a[2:0]];
    vb_addr   = areg[ins_alu.b[2:0]];
    vw_en     = 1'b0;
    vw_addr   = areg[ins_alu.b[2:0]];
    vw_mask   = 4'b1111;
    vw_data   = alu_z;
    sat_event = 1'b0;
    wr[0]     = '{en: 1'b0, idx: st_spec.idx, is_lane: 1'b0, sel: st_spec.sel, data: '0};
    if (en && ins_alu.valid)
      case (opcode_e'(ins_alu.op))
        OP_ABSV: vw_en = 1'b1;
        OP_ADDV, OP_SUBV, OP_MAXV, OP_MINV, OP_ANDV, OP_ORV, OP_XORV: begin
          vw_en = 1'b1; vw_addr = areg[ins_alu.ext[2:0]];
        end
        OP_L32V: begin
          wr[0].en = 1'b1; wr[0].data = 40'($signed(va_data[31:0]));
        end
        OP_L16V: begin
          wr[0].en = 1'b1; wr[0].is_lane = 1'b1; wr[0].data = {24'd0, va_data[15:0]};
        end
        OP_SR32V: begin
          vw_en = 1'b1; vw_addr = va_addr; vw_mask = 4'b0011;
          vw_data = {32'd0, r32}; sat_event = sat32;
        end
        OP_SR16V: begin
          vw_en = 1'b1; vw_addr = va_addr; vw_mask = 4'b0001;
          vw_data = {48'd0, r16}; sat_event = sat16;
        end
        OP_PERM: begin
          vw_en = 1'b1; vw_addr = va_addr; vw_data = vperm;
        end
        default: ;
      endcase
  end

  split_regfile u_rf (.clk(clk), .rst_n(rst_n), .wr(wr), .regs(cregs));
endmodule
