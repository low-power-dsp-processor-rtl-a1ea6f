// dsp_pkg: instruction encoding, opcodes and shared types of the
// variable-length VLIW DSP core.
//
// A program is a stream of 16-bit parcels. An instruction is one parcel
// (short form) or a header parcel followed by one extension parcel (long
// form). Several instructions form one VLIW packet that issues in a single
// cycle; the "E" bit of a header marks the last instruction of its packet.
// The instruction set (the mnemonics and what each does) follows the core's
// published instruction table; the bit-level encoding below is this design's
// own, as no encoding was published.
//
//   header parcel : [15] E  end of packet
//                   [14] X  long form, one extension parcel follows
//                   [13:8]  opcode
//                   [7:4]   field A (register number)
//                   [3:0]   field B (register number)
//   extension     : immediate / branch target (16 bits), or
//                   [3:0] field C (third register), or
//                   for accumulator-register operations three 5-bit
//                   register specifiers {reg[2:0], sel[1:0]}:
//                   C1 = [14:10], C2 = [9:5], C3 = [4:0]
//
// Operand order follows the published assembly: sources first, the
// destination last ("add r0 r1 r2" writes r2).
package dsp_pkg;

  localparam int PARCEL_W    = 16;
  localparam int MAX_INSTR   = 6;            // one per slot
  localparam int MAX_PARCELS = 2 * MAX_INSTR;

  localparam int NUM_SREG = 16;              // scalar registers r0..r15
  localparam int NUM_AREG = 8;               // address registers a0..a7
  localparam int NUM_CREG = 8;               // 80-bit registers c0..c7
  localparam int SREG_W   = 32;
  localparam int AREG_W   = 16;
  localparam int CREG_W   = 80;
  localparam int ACC_W    = 40;
  localparam int LANE_W   = 20;              // quarter of an 80-bit register
  localparam int DATA_W   = 16;              // SIMD lane data width in memory
  localparam int NLANE    = 4;
  localparam int LINK_REG = 15;              // jal writes the return address here

  typedef enum logic [5:0] {
    // program sequencing and scalar operations
    OP_NOP   = 6'h00, OP_END   = 6'h01, OP_JUMP  = 6'h02, OP_JAL   = 6'h03,
    OP_JR    = 6'h04, OP_BEQ   = 6'h05, OP_BNE   = 6'h06, OP_LB    = 6'h07,
    OP_LH    = 6'h08, OP_LW    = 6'h09, OP_SB    = 6'h0A, OP_SH    = 6'h0B,
    OP_SW    = 6'h0C, OP_ADD   = 6'h0D, OP_SUB   = 6'h0E, OP_ADDI  = 6'h0F,
    OP_MULT  = 6'h10, OP_MFHI  = 6'h11, OP_MFLO  = 6'h12, OP_AND   = 6'h13,
    OP_OR    = 6'h14, OP_XOR   = 6'h15, OP_SLL   = 6'h16, OP_SRL   = 6'h17,
    OP_SRA   = 6'h18, OP_SLT   = 6'h19, OP_SLTI  = 6'h1A,
    // address generation
    OP_ADDA  = 6'h20, OP_ADDIA = 6'h21, OP_MOVA  = 6'h22,
    // SIMD ALU, accumulator load/store, permutation
    OP_ABSV  = 6'h28, OP_ADDV  = 6'h29, OP_SUBV  = 6'h2A, OP_MAXV  = 6'h2B,
    OP_MINV  = 6'h2C, OP_ANDV  = 6'h2D, OP_ORV   = 6'h2E, OP_XORV  = 6'h2F,
    OP_L32V  = 6'h30, OP_L16V  = 6'h31, OP_SR32V = 6'h32, OP_SR16V = 6'h33,
    OP_PERM  = 6'h34,
    // multiply-accumulate
    OP_MACV  = 6'h36, OP_MACUV = 6'h37
    // 6'h38..6'h3F: user-defined instruction space
  } opcode_e;

  typedef enum logic [2:0] {
    U_PSB, U_DGB, U_ALU, U_MAC, U_USER, U_BAD
  } unit_e;

  // Slot of a packet: at most one instruction per slot.
  typedef enum logic [2:0] {
    S_PSB = 3'd0, S_DGB = 3'd1, S_ALU = 3'd2, S_MAC0 = 3'd3, S_MAC1 = 3'd4, S_USER = 3'd5
  } slot_e;
  localparam int NSLOT = 6;

  // One decoded instruction as delivered to a unit's local decoder.
  typedef struct packed {
    logic        valid;
    logic [5:0]  op;
    logic [3:0]  a;
    logic [3:0]  b;
    logic [15:0] ext;
  } instr_t;

  // Accumulator-register specifier: register number and part select.
  // For a 40-bit operand sel[0] picks the half (0 = L, 1 = H);
  // for a 16-bit operand sel picks the lane 0..3.
  typedef struct packed {
    logic [2:0] idx;
    logic [1:0] sel;
  } cspec_t;

  // One write into the splittable register file: a 40-bit half
  // (is_lane = 0, sel[0] = half) or one 16-bit lane (is_lane = 1, sel = lane,
  // data[15:0] sign-extended into the 20-bit lane).
  typedef struct packed {
    logic        en;
    logic [2:0]  idx;
    logic        is_lane;
    logic [1:0]  sel;
    logic [39:0] data;
  } rf_wr_t;

  function automatic unit_e unit_of(logic [5:0] op);
    if (op <= 6'h1A)                  return U_PSB;
    if (op >= 6'h20 && op <= 6'h22)   return U_DGB;
    if (op >= 6'h28 && op <= 6'h34)   return U_ALU;
    if (op == 6'h36 || op == 6'h37)   return U_MAC;
    if (op >= 6'h38)                  return U_USER;
    return U_BAD;
  endfunction

  function automatic cspec_t c1_of(logic [15:0] ext);
    return cspec_t'(ext[14:10]);
  endfunction
  function automatic cspec_t c2_of(logic [15:0] ext);
    return cspec_t'(ext[9:5]);
  endfunction
  function automatic cspec_t c3_of(logic [15:0] ext);
    return cspec_t'(ext[4:0]);
  endfunction

endpackage
