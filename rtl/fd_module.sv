// Building element of the diagnosable circuit, used in the block part and in the
// collector part alike.
//
// It is a 2-to-1 selector with two override lines: q = s | (r & (y ? d1 : d0)).
// In normal operation (r, s) = (1, 0) and the element selects d0 or d1 with y.
// Setting (r, s) = (0, 0) forces q to 0 and s = 1 forces q to 1 whatever r is; this
// is how a tester drives all outputs of one level of the circuit to a known value.
// In the collector the same element is used with r as the block enable p_j and s as
// the chained input from the previous element, which makes it an AND-OR stage.
// The override behaviour follows the design; the gate-level form is the simplest
// one that has it. Purely combinational.
module fd_module (
  input  logic d0,  // data selected when y = 0
  input  logic d1,  // data selected when y = 1
  input  logic y,   // select
  input  logic r,   // enable: 0 with s = 0 forces q = 0
  input  logic s,   // set: 1 forces q = 1
  output logic q
);

  always_comb q = s | (r & (y ? d1 : d0));

endmodule
