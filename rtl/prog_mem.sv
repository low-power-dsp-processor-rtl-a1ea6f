// prog_mem: on-chip program memory of 16-bit instruction parcels.
//
// The fetch side reads a window of WIN consecutive parcels starting at any
// parcel address in the same cycle, so that the instruction queue can align
// a variable-length packet that starts anywhere (no alignment restriction).
// Reads are combinational; addresses wrap at DEPTH. A host write port loads
// the program (one parcel per clock). The memory's existence follows the
// core's block diagram; its size, the window read and the load port are this
// design's own choices.
module prog_mem #(
  parameter int DEPTH = 4096,
  parameter int WIN   = dsp_pkg::MAX_PARCELS,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [15:0]         wdata,
  input  logic [AW-1:0]       raddr,
  output logic [WIN-1:0][15:0] window
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int k = 0; k < WIN; k++)
      window[k] = mem[AW'(raddr + AW'(k))];
endmodule
