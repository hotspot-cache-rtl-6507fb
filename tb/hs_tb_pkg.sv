// hs_tb_pkg: helpers shared by the testbenches. instr_of gives the instruction word
// that the memory model stores at a byte address, so that a testbench can check any
// fetched word without keeping a copy of the memory; line_of packs the eight words
// of a 32-byte line, lowest address in the lowest bits.
package hs_tb_pkg;
  import hs_pkg::*;

  function automatic instr_t instr_of(addr_t a);
    addr_t w = {a[ADDR_W-1:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F ^ {w[15:0], w[31:16]};
  endfunction

  function automatic line_t line_of(addr_t a);
    line_t l;
    for (int i = 0; i < int'(LINE_WORDS); i++)
      l[i*INSTR_W +: INSTR_W] = instr_of({a[ADDR_W-1:OFF_W], OFF_W'(i * 4)});
    return l;
  endfunction
endpackage
