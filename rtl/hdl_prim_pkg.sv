// hdl_prim_pkg: the sixteen primitive gates of the circuit description
// language the adders and the ALU were written in, with their input counts.
// Every primitive has one output. Used by b_gate.
package hdl_prim_pkg;

  typedef enum logic [3:0] {
    B_BUF, B_NOT,
    B_NAND, B_NAND3, B_NAND4,
    B_OR, B_OR3, B_OR4,
    B_EQV, B_XOR,
    B_AND, B_AND3, B_AND4,
    B_NOR, B_NOR3, B_NOR4
  } prim_e;

  function automatic int unsigned prim_arity(prim_e fn);
    case (fn)
      B_BUF, B_NOT:                  return 1;
      B_NAND3, B_OR3, B_AND3, B_NOR3: return 3;
      B_NAND4, B_OR4, B_AND4, B_NOR4: return 4;
      default:                       return 2;
    endcase
  endfunction

endpackage
