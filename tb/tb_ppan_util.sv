// tb_ppan_util: helpers shared by the testbenches - building microwords and
// a software model of the 4-bit slice ALU for expected values.
package tb_ppan_util;
  import ppan_pkg::*;

  function automatic uword_t mk(op_e op, alu_fn_e fn = ALU_PASS, src_e src = SRC_OWN,
                                int addr = 0, int imm = 0, bit gang = 0, int wid = 0,
                                int base = 0, int mslv = 0, int tgrp = 0, int tslv = 0);
    uword_t u;
    u      = '0;
    u.op   = op;
    u.fn   = fn;
    u.src  = src;
    u.addr = addr_t'(addr);
    u.imm  = 16'(imm);
    u.gang = gang;
    u.wid  = 2'(wid);
    u.base = 4'(base);
    u.mslv = 4'(mslv);
    u.tgrp = 4'(tgrp);
    u.tslv = 4'(tslv);
    return u;
  endfunction

  // Reference ALU on a word of nbytes bytes (carry chained), independent of the RTL.
  function automatic longint unsigned ref_alu(alu_fn_e fn, longint unsigned a, longint unsigned b,
                                              int nbytes);
    longint unsigned m;
    m = (nbytes >= 8) ? '1 : ((64'd1 << (8 * nbytes)) - 1);
    case (fn)
      ALU_PASS: return b & m;
      ALU_ADD:  return (a + b) & m;
      ALU_SUB:  return (a - b) & m;
      ALU_AND:  return a & b & m;
      ALU_OR:   return (a | b) & m;
      ALU_XOR:  return (a ^ b) & m;
      default:  return 0;
    endcase
  endfunction
endpackage
