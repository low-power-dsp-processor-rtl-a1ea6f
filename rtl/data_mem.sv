// data_mem: data memory subsystem of the DSP core.
//
// Byte-addressed, little-endian, stored as DEPTH 16-bit words. Vector ports
// move four 16-bit lanes (64 bits) at any halfword-aligned byte address, so
// address steps of 2, 4 or 8 bytes all work. Ports, all usable in the same
// cycle:
//   va / vb  : two combinational 64-bit vector reads (SIMD operands)
//   vw       : one 64-bit vector write with per-lane enables
//   s        : scalar port, combinational 32-bit read of the two halfwords at
//              s_addr, and a write with byte enables over those 32 bits
//   h        : host port, one halfword read/write, for loading and unloading
// Writes take effect at the rising clock edge. When writes overlap, the
// scalar port wins over the vector port and the host port over both.
// The block diagram names the data memory subsystem only; its size, port
// set and organisation are this design's own choices.
module data_mem #(
  parameter int DEPTH = 32768,              // 16-bit words (64 KiB)
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [15:0] va_addr,
  output logic [63:0] va_data,
  input  logic [15:0] vb_addr,
  output logic [63:0] vb_data,
  input  logic        vw_en,
  input  logic [15:0] vw_addr,
  input  logic [3:0]  vw_mask,
  input  logic [63:0] vw_data,
  input  logic [15:0] s_addr,
  output logic [31:0] s_rdata,
  input  logic        s_we,
  input  logic [3:0]  s_be,
  input  logic [31:0] s_wdata,
  input  logic        h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [15:0] h_wdata,
  output logic [15:0] h_rdata
);
  logic [15:0] mem [DEPTH];

  function automatic logic [AW-1:0] widx(logic [15:0] byte_addr, int k);
    return AW'((byte_addr >> 1) + 16'(k));
  endfunction

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      va_data[16*k +: 16] = mem[widx(va_addr, k)];
      vb_data[16*k +: 16] = mem[widx(vb_addr, k)];
    end
    s_rdata = {mem[widx(s_addr, 1)], mem[widx(s_addr, 0)]};
    h_rdata = mem[h_addr];
  end

  always_ff @(posedge clk) begin
    if (vw_en)
      for (int k = 0; k < 4; k++)
        if (vw_mask[k]) mem[widx(vw_addr, k)] <= vw_data[16*k +: 16];
    if (s_we)
      for (int k = 0; k < 2; k++) begin
        if (s_be[2*k])   mem[widx(s_addr, k)][7:0]  <= s_wdata[16*k +: 8];
        if (s_be[2*k+1]) mem[widx(s_addr, k)][15:8] <= s_wdata[16*k+8 +: 8];
      end
    if (h_we) mem[h_addr] <= h_wdata;
  end
endmodule
