// ternary_pkg: three-valued logic (0, 1, unknown) for testbenches.
//
// Used to show that a cyclic network is combinational: the feedback wires
// start as UNKNOWN and the gates are evaluated repeatedly. A gate whose
// output is forced by one known input (a 0 into AND, a 1 into OR) gives a
// known value even when its other input is unknown; if every output of the
// network becomes known, the loop never has to carry information that the
// inputs do not already fix. The gate rules are the standard ternary
// extension of AND, OR and NOT.
package ternary_pkg;

  typedef enum logic [1:0] {
    T0 = 2'b00,
    T1 = 2'b01,
    TU = 2'b10   // unknown
  } tern_e;

  function automatic tern_e t_of(logic b);
    return b ? T1 : T0;
  endfunction

  function automatic tern_e t_not(tern_e a);
    case (a)
      T0:      return T1;
      T1:      return T0;
      default: return TU;
    endcase
  endfunction

  function automatic tern_e t_and(tern_e a, tern_e b);
    if (a == T0 || b == T0) return T0;
    if (a == T1 && b == T1) return T1;
    return TU;
  endfunction

  function automatic tern_e t_or(tern_e a, tern_e b);
    if (a == T1 || b == T1) return T1;
    if (a == T0 && b == T0) return T0;
    return TU;
  endfunction

endpackage
