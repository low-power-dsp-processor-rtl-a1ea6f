// dsp_core: variable-length VLIW DSP core with SIMD datapath.
//
// A packet of one to six 16-bit-based instructions issues every cycle. The
// instruction queue reads a window of parcels at the PC from program memory,
// finds where the packet ends and hands each instruction to its unit:
//   program sequencing block (PC, branches, scalar ALU, scalar load/store),
//   data generation block (address registers a0..a7),
//   computation block (SIMD ALU slot plus two MAC slots),
//   the user-defined slot, brought out of the core for an external unit.
// All units of a packet read state as it was before the packet and update
// at the same rising edge, so a packet behaves like one wide instruction and
// a loop runs at one packet per cycle with no branch penalty.
// Interface: pulse start to run from parcel 0 until an "end" instruction;
// halted then rises (error too if a packet was illegal). Program memory is
// loaded through pm_*, data memory read and written through dm_* (use both
// only while the core is not running). Debug outputs show the registers.
// The unit partitioning follows the core's block diagram; the single-cycle
// issue and the load/debug ports are this design's choices.
module dsp_core
  import dsp_pkg::*;
#(
  parameter int PM_DEPTH  = 4096,    // program memory, 16-bit parcels
  parameter int DM_DEPTH  = 32768,   // data memory, 16-bit words
  parameter int RND_SHIFT = 15,
  localparam int PAW = $clog2(PM_DEPTH),
  localparam int DAW = $clog2(DM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            running,
  output logic            halted,
  output logic            error,
  // program memory load port
  input  logic            pm_we,
  input  logic [PAW-1:0]  pm_waddr,
  input  logic [15:0]     pm_wdata,
  // data memory host port
  input  logic            dm_we,
  input  logic [DAW-1:0]  dm_addr,
  input  logic [15:0]     dm_wdata,
  output logic [15:0]     dm_rdata,
  // user-defined instruction slot (opcodes 0x38..0x3F)
  output logic            user_valid,
  output instr_t          user_instr,
  // observation
  output logic [15:0]     pc,
  output logic [4:0]      pkt_len,
  output logic            br_taken,
  output logic            sat_event,
  output instr_t [NSLOT-1:0] issued,
  input  logic [3:0]      dbg_sreg_addr,
  output logic [31:0]     dbg_sreg,
  output logic [NUM_AREG-1:0][AREG_W-1:0] areg,
  output logic [NUM_CREG-1:0][CREG_W-1:0] cregs
);
  logic [MAX_PARCELS-1:0][15:0] window;
  instr_t [NSLOT-1:0] slots;
  logic        illegal;

  logic [15:0] va_addr, vb_addr, vw_addr, s_addr;
  logic [63:0] va_data, vb_data, vw_data;
  logic [3:0]  vw_mask, s_be;
  logic        vw_en, s_we;
  logic [31:0] s_rdata, s_wdata;

  prog_mem #(.DEPTH(PM_DEPTH)) u_pm (
    .clk(clk), .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pc[PAW-1:0]), .window(window)
  );

  instr_queue u_iq (.window(window), .slots(slots), .pkt_len(pkt_len), .illegal(illegal));

  assign issued     = running ? slots : '0;
  assign user_valid = issued[S_USER].valid;
  assign user_instr = issued[S_USER];

  psb u_psb (
    .clk(clk), .rst_n(rst_n), .start(start), .ins(slots[S_PSB]), .pkt_len(pkt_len),
    .illegal(illegal), .pc(pc), .running(running), .halted(halted), .error(error),
    .br_taken(br_taken), .s_addr(s_addr), .s_rdata(s_rdata), .s_we(s_we), .s_be(s_be),
    .s_wdata(s_wdata), .dbg_raddr(dbg_sreg_addr), .dbg_rdata(dbg_sreg)
  );

  dgb u_dgb (.clk(clk), .rst_n(rst_n), .en(running), .ins(slots[S_DGB]), .areg(areg));

  comp_block #(.RND_SHIFT(RND_SHIFT)) u_cb (
    .clk(clk), .rst_n(rst_n), .en(running),
    .ins_alu(slots[S_ALU]), .ins_mac0(slots[S_MAC0]), .ins_mac1(slots[S_MAC1]),
    .areg(areg),
    .va_addr(va_addr), .va_data(va_data), .vb_addr(vb_addr), .vb_data(vb_data),
    .vw_en(vw_en), .vw_addr(vw_addr), .vw_mask(vw_mask), .vw_data(vw_data),
    .sat_event(sat_event), .cregs(cregs)
  );

  data_mem #(.DEPTH(DM_DEPTH)) u_dm (
    .clk(clk),
    .va_addr(va_addr), .va_data(va_data), .vb_addr(vb_addr), .vb_data(vb_data),
    .vw_en(vw_en), .vw_addr(vw_addr), .vw_mask(vw_mask), .vw_data(vw_data),
    .s_addr(s_addr), .s_rdata(s_rdata), .s_we(s_we), .s_be(s_be), .s_wdata(s_wdata),
    .h_we(dm_we), .h_addr(dm_addr), .h_wdata(dm_wdata), .h_rdata(dm_rdata)
  );
endmodule
