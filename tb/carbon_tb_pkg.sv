// carbon_tb_pkg: instruction builders shared by the CARBON testbenches.
//
// Each function returns a complete 81-bit instruction (carbon_pkg::instr_t)
// that writes nothing unless asked to: i_nop (full width, no writes),
// i_alu (R[rd] = op(A, B) with operand sources and addresses), i_ldi
// (R[rd] = 16-bit immediate) and with_out (add a write of the ALU result or
// the crossbar value into one neighbour's facing memory).  The builders only
// fill fields; the encoding itself is defined in carbon_pkg.
package carbon_tb_pkg;
  import carbon_pkg::*;

  function automatic instr_t i_nop();
    instr_t i;
    i = '0;
    i.op = OP_NOP;
    i.width_m1 = 5'd31;
    return i;
  endfunction

  // R[rd] = op(A, B) with full width
  function automatic instr_t i_alu(op_e op, src_e as, addr_t aa, src_e bs, addr_t ba, addr_t rd);
    instr_t i;
    i = i_nop();
    i.op = op; i.a_sel = as; i.a_addr = aa; i.b_sel = bs; i.b_addr = ba;
    i.r_we = 1'b1; i.r_addr = rd;
    return i;
  endfunction

  function automatic instr_t i_ldi(addr_t rd, logic [15:0] imm);
    instr_t i;
    i = i_nop();
    i.op = OP_LDI; i.imm = imm; i.r_we = 1'b1; i.r_addr = rd;
    return i;
  endfunction

  // add a neighbour write to an instruction: side d gets ALU result or crossbar value
  function automatic instr_t with_out(instr_t i0, int d, logic use_x, addr_t addr);
    instr_t i;
    i = i0;
    i.out[d].we = 1'b1; i.out[d].use_x = use_x; i.out[d].addr = addr;
    return i;
  endfunction
endpackage
