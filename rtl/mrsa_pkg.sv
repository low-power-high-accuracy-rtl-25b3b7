// mrsa_pkg -- variants of the rounding-based (MRSA) approximate multiplier.
//
//   S_MRSA  : signed two's-complement operands, exact negation (~X + 1) of the
//             result in the sign-set stage.
//   AS_MRSA : signed, approximate negation (~X only, the +1 is skipped).
//   U_MRSA  : unsigned operands; sign detector and sign set are left out.
package mrsa_pkg;
  typedef enum logic [1:0] {
    S_MRSA  = 2'd0,
    AS_MRSA = 2'd1,
    U_MRSA  = 2'd2
  } mrsa_variant_e;
endpackage
