// dgb: data generation block (address generation unit).
//
// Holds the address registers a0..a7 (16-bit byte addresses) used by the
// SIMD instructions of the computation block, and executes the address
// instructions of a packet:
//   adda  aA aB aC    aC = aA + aB
//   addia aA aB imm   aB = aA + sign-extended imm
//   mova  aA imm      aA = imm
// The register array is read combinationally by the computation block; an
// update is written at the rising edge ending the packet's cycle, so every
// unit of a packet sees the address registers as they were before it.
// The three operations come from the core's published instruction table;
// the register count and width and the reset value 0 are this design's own.
module dgb
  import dsp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t ins,
  output logic [NUM_AREG-1:0][AREG_W-1:0] areg
);
  logic [2:0]        wr_idx;
  logic [AREG_W-1:0] wr_val;
  logic              wr_en;

  always_comb begin
    wr_en  = 1'b0;
    wr_idx = ins.b[2:0];
    wr_val = '0;
    if (en && ins.valid)
      case (opcode_e'(ins.op))
        OP_ADDA:  begin
          wr_en = 1'b1; wr_idx = ins.ext[2:0];
          wr_val = areg[ins.a[2:0]] + areg[ins.b[2:0]];
        end
        OP_ADDIA: begin wr_en = 1'b1; wr_val = areg[ins.a[2:0]] + ins.ext; end
        OP_MOVA:  begin wr_en = 1'b1; wr_idx = ins.a[2:0]; wr_val = ins.ext; end
        default: ;
      endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     areg <= '0;
    else if (wr_en) areg[wr_idx] <= wr_val;
endmodule
