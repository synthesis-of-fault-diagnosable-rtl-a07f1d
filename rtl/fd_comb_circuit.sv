// The fault diagnosable combinational circuit.
//
// S working blocks and M_SPARE spare blocks (fd_block) share the bus lines y, r and
// s of every level; each block has its own c terminals and its own selector
// variable xs. N_COLL independent collector chains (fd_collector) read the same
// block outputs, p terminals and C terminal and give the output terminals
// F1 .. F_N_COLL; a second chain is what lets a faulty collector be bypassed.
// For a function of N variables whose first S variables (the selector set) are
// applied to xs, the next N-S-1 to the bus y, and the last through the c terminal
// values, the normal setting r = 1, s = 0, p = 1 for working and 0 for spare blocks,
// C = 0 gives F = OR_j (~x_j f0_j | x_j f1_j).
// The block outputs are named f0_line / f1_line: these are the lines that the
// level-1 tests diagnose. The module count is (S+M_SPARE)(2**(N-S)-2) in the blocks
// plus N_COLL(S+M_SPARE) in the collectors. Purely combinational.
module fd_comb_circuit #(
  parameter int unsigned N       = 8,  // number of input variables
  parameter int unsigned S       = 5,  // selector variables = working blocks
  parameter int unsigned M_SPARE = 1,  // spare blocks
  parameter int unsigned N_COLL  = 2   // collector chains / output terminals
) (
  input  logic [S+M_SPARE-1:0]                xs,    // selector variable per block
  input  logic [S+M_SPARE-1:0][2**(N-S)-1:0]  c,     // c terminals per block
  input  logic [N-S-2:0]                      y,     // bus y_1 .. y_{N-S-1}
  input  logic [N-S-2:0]                      r,
  input  logic [N-S-2:0]                      s,
  input  logic [S+M_SPARE-1:0]                p,
  input  logic                                c_in,  // terminal C
  output logic [N_COLL-1:0]                   f_out  // F1 is bit 0
);

  localparam int unsigned NB = S + M_SPARE;
  localparam int unsigned L  = N - S - 1;

  logic [NB-1:0] f0_line, f1_line;

  for (genvar j = 0; j < NB; j++) begin : g_blk
    fd_block #(.LEVELS(L)) u_blk (
      .c(c[j]), .y(y), .r(r), .s(s), .f0(f0_line[j]), .f1(f1_line[j])
    );
  end

  for (genvar k = 0; k < N_COLL; k++) begin : g_coll
    fd_collector #(.NB(NB)) u_coll (
      .xs(xs), .f0(f0_line), .f1(f1_line), .p(p), .c_in(c_in), .f_out(f_out[k])
    );
  end

endmodule
