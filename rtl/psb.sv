// psb: program sequencing block with the scalar unit.
//
// It owns the program counter and the run state, and executes the program
// sequencing and scalar instructions of a packet: jump, jal, jr, beq, bne,
// end, scalar loads and stores (byte, halfword, word), add, sub, addi, and,
// or, xor, sll, srl, sra, slt, slti, and mult with mfhi/mflo. Scalar
// registers are 32 bits, r0 always reads zero, and jal links into r15.
// Everything happens in the cycle the packet issues: the register file,
// HI/LO and the PC update at the next rising edge, loads read the data
// memory combinationally, stores are written at that edge. Branch and jump
// targets are absolute parcel addresses taken from the extension parcel, so
// a taken branch costs no extra cycle.
// Run control: a start pulse sets the PC to zero and starts issuing; "end"
// (or an illegal packet) stops issue after the current packet and raises
// halted. A debug port reads any scalar register.
// The instruction list follows the core's published instruction table; the
// register count, the link register, r0 as zero, absolute branch targets
// and the run control are this design's own choices.
module psb
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  instr_t      ins,
  input  logic [4:0]  pkt_len,
  input  logic        illegal,
  output logic [15:0] pc,
  output logic        running,
  output logic        halted,
  output logic        error,
  output logic        br_taken,
  // scalar data memory port
  output logic [15:0] s_addr,
  input  logic [31:0] s_rdata,
  output logic        s_we,
  output logic [3:0]  s_be,
  output logic [31:0] s_wdata,
  // debug read of a scalar register
  input  logic [3:0]  dbg_raddr,
  output logic [31:0] dbg_rdata
);
  logic [SREG_W-1:0] r [NUM_SREG];
  logic [SREG_W-1:0] hi, lo;

  logic [31:0] ra, rb, rc_val, simm, addr;
  logic        exec;
  logic        wr_en;
  logic [3:0]  wr_idx;
  logic [31:0] wr_val;
  logic        mul_en;
  logic [63:0] prod;
  logic [15:0] pc_seq, pc_next;
  logic        stop;

  assign exec   = running && ins.valid;
  assign ra     = (ins.a == 4'd0) ? 32'd0 : r[ins.a];
  assign rb     = (ins.b == 4'd0) ? 32'd0 : r[ins.b];
  assign simm   = {{16{ins.ext[15]}}, ins.ext};
  assign addr   = ra + simm;
  assign pc_seq = pc + 16'(pkt_len);
  assign prod   = $signed(ra) * $signed(rb);
  assign dbg_rdata = (dbg_raddr == 4'd0) ? 32'd0 : r[dbg_raddr];

  always_comb begin
    wr_en    = 1'b0;
    wr_idx   = ins.b;
    wr_val   = '0;
    mul_en   = 1'b0;
    pc_next  = pc_seq;
    br_taken = 1'b0;
    stop     = illegal;
    s_addr   = addr[15:0];
    s_we     = 1'b0;
    s_be     = 4'b0000;
    s_wdata  = '0;
    rc_val   = '0;
    if (exec) begin
      case (opcode_e'(ins.op))
        OP_END:  stop = 1'b1;
        OP_JUMP: begin pc_next = ins.ext; br_taken = 1'b1; end
        OP_JAL:  begin
          pc_next = ins.ext; br_taken = 1'b1;
          wr_en = 1'b1; wr_idx = 4'(LINK_REG); wr_val = 32'(pc_seq);
        end
        OP_JR:   begin pc_next = ra[15:0]; br_taken = 1'b1; end
        OP_BEQ:  if (ra == rb) begin pc_next = ins.ext; br_taken = 1'b1; end
        OP_BNE:  if (ra != rb) begin pc_next = ins.ext; br_taken = 1'b1; end
        OP_LB:   begin
          wr_en = 1'b1;
          wr_val = addr[0] ? {{24{s_rdata[15]}}, s_rdata[15:8]}
                           : {{24{s_rdata[7]}},  s_rdata[7:0]};
        end
        OP_LH:   begin wr_en = 1'b1; wr_val = {{16{s_rdata[15]}}, s_rdata[15:0]}; end
        OP_LW:   begin wr_en = 1'b1; wr_val = s_rdata; end
        OP_SB:   begin
          s_we = 1'b1; s_be = addr[0] ? 4'b0010 : 4'b0001; s_wdata = {4{rb[7:0]}};
        end
        OP_SH:   begin s_we = 1'b1; s_be = 4'b0011; s_wdata = {2{rb[15:0]}}; end
        OP_SW:   begin s_we = 1'b1; s_be = 4'b1111; s_wdata = rb; end
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT: begin
          case (opcode_e'(ins.op))
            OP_ADD:  rc_val = ra + rb;
            OP_SUB:  rc_val = ra - rb;
            OP_AND:  rc_val = ra & rb;
            OP_OR:   rc_val = ra | rb;
            OP_XOR:  rc_val = ra ^ rb;
            default: rc_val = {31'd0, $signed(ra) < $signed(rb)};
          endcase
          wr_en = 1'b1; wr_idx = ins.ext[3:0]; wr_val = rc_val;
        end
        OP_ADDI: begin wr_en = 1'b1; wr_val = addr; end
        OP_SLTI: begin wr_en = 1'b1; wr_val = {31'd0, $signed(ra) < $signed(simm)}; end
        OP_SLL:  begin wr_en = 1'b1; wr_val = ra << ins.ext[4:0]; end
        OP_SRL:  begin wr_en = 1'b1; wr_val = ra >> ins.ext[4:0]; end
        OP_SRA:  begin wr_en = 1'b1; wr_val = $signed(ra) >>> ins.ext[4:0]; end
        OP_MULT: mul_en = 1'b1;
        OP_MFHI: begin wr_en = 1'b1; wr_idx = ins.a; wr_val = hi; end
        OP_MFLO: begin wr_en = 1'b1; wr_idx = ins.a; wr_val = lo; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      halted  <= 1'b0;
      error   <= 1'b0;
      hi      <= '0;
      lo      <= '0;
      for (int i = 0; i < NUM_SREG; i++) r[i] <= '0;
    end else if (!running) begin
      if (start) begin
        pc      <= '0;
        running <= 1'b1;
        halted  <= 1'b0;
        error   <= 1'b0;
      end
    end else begin
      pc <= pc_next;
      if (stop) begin
        running <= 1'b0;
        halted  <= 1'b1;
        error   <= illegal;
      end
      if (wr_en && wr_idx != 4'd0) r[wr_idx] <= wr_val;
      if (mul_en) {hi, lo} <= prod;
    end
  end
endmodule
