// dsp_asm_pkg: a small assembler for testbenches of the DSP core.
//
// Builds the parcel stream of a program. Call the instruction functions to
// add instructions to the open packet and endp() to close it: endp() sets
// the E bit on the header of the packet's last instruction. here() returns
// the parcel address of the next packet, used as a branch target.
package dsp_asm_pkg;
  import dsp_pkg::*;

  // Register specifier for accumulator operands: register, half or lane.
  function automatic logic [4:0] cs(int idx, int sel);
    return {3'(idx), 2'(sel)};
  endfunction

  class Asm;
    logic [15:0] code[$];
    int          last_hdr;
    int          n_in_pkt;

    function new();
      last_hdr = -1;
      n_in_pkt = 0;
    endfunction

    function int here();
      return code.size();
    endfunction

    function void s(logic [5:0] op, int a = 0, int b = 0);
      last_hdr = code.size();
      code.push_back({1'b0, 1'b0, op, 4'(a), 4'(b)});
      n_in_pkt++;
    endfunction

    function void l(logic [5:0] op, int a, int b, logic [15:0] ext);
      last_hdr = code.size();
      code.push_back({1'b0, 1'b1, op, 4'(a), 4'(b)});
      code.push_back(ext);
      n_in_pkt++;
    endfunction

    // scalar three-register form: op rA rB rC
    function void r3(logic [5:0] op, int a, int b, int c);
      l(op, a, b, 16'(c));
    endfunction

    // accumulator-register form
    function void cr(logic [5:0] op, int a, logic [4:0] c1, logic [4:0] c2 = 0, logic [4:0] c3 = 0);
      l(op, a, 0, {1'b0, c1, c2, c3});
    endfunction

    function void endp();
      if (n_in_pkt == 0) s(6'(OP_NOP));
      code[last_hdr][15] = 1'b1;
      n_in_pkt = 0;
    endfunction
  endclass
endpackage
