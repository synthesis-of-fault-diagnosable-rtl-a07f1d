// Shared types of the fault diagnosable circuit.
//
// Every external c terminal of a block carries one of four values: the constant 0,
// the constant 1, the last input variable x_n or its complement. The circuit itself
// only sees the resulting bit; the 2-bit code below is how the wanted function is
// programmed (one code per c terminal, the vector a_j of a block) and cval_resolve()
// turns a code into the bit for the current value of x_n. The four values follow the
// design; the encoding is this implementation's own.
package fd_pkg;

  typedef enum logic [1:0] {
    CV_ZERO = 2'd0,  // terminal tied to 0
    CV_ONE  = 2'd1,  // terminal tied to 1
    CV_XN   = 2'd2,  // terminal driven by x_n
    CV_XN_N = 2'd3   // terminal driven by the complement of x_n
  } cval_e;

  function automatic logic cval_resolve(cval_e code, logic xn);
    case (code)
      CV_ZERO: return 1'b0;
      CV_ONE:  return 1'b1;
      CV_XN:   return xn;
      default: return ~xn;
    endcase
  endfunction

endpackage
