// remorph_asm_pkg: helpers the testbenches use to build grain instructions.
//
// mk() assembles one remorph_pkg::instr_t from its fields; unnamed fields stay
// zero (no write, go to pc+1). The op* functions give the control words of the
// operations the test programs use; halt() is the jump-to-self HALT.
package remorph_asm_pkg;
  import remorph_pkg::*;

  function automatic ctrl_t op_add();     // A:B + C  = operand1 + operand2
    return '{carryinsel: 3'b000, alumode: ALU_ADD, opmode: OPM_AB_PLUS_C};
  endfunction
  function automatic ctrl_t op_sub();     // C - A:B  = operand2 - operand1
    return '{carryinsel: 3'b000, alumode: ALU_ZSUB, opmode: OPM_AB_PLUS_C};
  endfunction
  function automatic ctrl_t op_mul();     // A*B      = operand1 * operand2
    return '{carryinsel: 3'b000, alumode: ALU_ADD, opmode: OPM_MUL};
  endfunction
  function automatic ctrl_t op_pass();    // A:B      = operand1, C = operand2 for the EQ flag
    return '{carryinsel: 3'b000, alumode: ALU_ADD, opmode: 7'b000_00_11};
  endfunction
  function automatic ctrl_t op_nop();
    return '0;
  endfunction

  function automatic instr_t mk(
      input ctrl_t     op,
      input int        s1 = 0,
      input bit        i1 = 1'b0,
      input int        s2 = 0,
      input bit        i2 = 1'b0,
      input bit        we = 1'b0,
      input int        dst = 0,
      input bit        di = 1'b0,
      input bit        nbwe = 1'b0,
      input int        nba = 0,
      input bit        jen = 1'b0,
      input flag_sel_e fl = FL_ALWAYS,
      input bit        inv = 1'b0,
      input int        ja = 0);
    instr_t t;
    t          = '0;
    t.op       = op;
    t.s1.addr  = addr_t'(s1);
    t.s1.ind   = i1;
    t.s2.addr  = addr_t'(s2);
    t.s2.ind   = i2;
    t.own_we   = we;
    t.own_addr = addr_t'(dst);
    t.own_ind  = di;
    t.nb_we    = nbwe;
    t.nb_addr  = addr_t'(nba);
    t.nx_en    = jen;
    t.nx_flag  = fl;
    t.nx_inv   = inv;
    t.nx_addr  = addr_t'(ja);
    return t;
  endfunction

  function automatic instr_t halt(input int at);
    return mk(.op(op_nop()), .jen(1'b1), .ja(at));
  endfunction
endpackage
