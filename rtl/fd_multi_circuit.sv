// Multi-output form of the diagnosable circuit.
//
// Each of the NOUT outputs f_i is realised as OR_k g_i^k, where every g_i^k depends
// on one selector variable and on a set K of variables common to all outputs. The
// K variables are the ones carried by the bus lines (and by x_n at the c
// terminals), so all blocks of all outputs share the y, r and s bus lines, while
// each output has its own blocks, spare blocks, c terminals, p terminals, C
// terminal and N_COLL collector chains. Each output can therefore be diagnosed and
// repaired exactly like the single-output circuit, one output at a time through
// its own p and C terminals (see fd_multi_repairable).
// The block outputs are named f0_line / f1_line, indexed by output and block.
// That the outputs share the bus is this implementation's reading of the design.
// Purely combinational.
module fd_multi_circuit #(
  parameter int unsigned N       = 8,  // input variables
  parameter int unsigned S       = 4,  // selector variables = N - |K|
  parameter int unsigned NOUT    = 2,  // outputs
  parameter int unsigned M_SPARE = 1,  // spare blocks per output
  parameter int unsigned N_COLL  = 2   // collector chains per output
) (
  input  logic [NOUT-1:0][S+M_SPARE-1:0]               xs,
  input  logic [NOUT-1:0][S+M_SPARE-1:0][2**(N-S)-1:0] c,
  input  logic [N-S-2:0]                               y,
  input  logic [N-S-2:0]                               r,
  input  logic [N-S-2:0]                               s,
  input  logic [NOUT-1:0][S+M_SPARE-1:0]               p,
  input  logic [NOUT-1:0]                              c_in,
  output logic [NOUT-1:0][N_COLL-1:0]                  f_out
);

  localparam int unsigned NB = S + M_SPARE;
  localparam int unsigned L  = N - S - 1;

  logic [NOUT-1:0][NB-1:0] f0_line, f1_line;

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    for (genvar j = 0; j < NB; j++) begin : g_blk
      fd_block #(.LEVELS(L)) u_blk (
        .c(c[o][j]), .y(y), .r(r), .s(s), .f0(f0_line[o][j]), .f1(f1_line[o][j])
      );
    end
    for (genvar k = 0; k < N_COLL; k++) begin : g_coll
      fd_collector #(.NB(NB)) u_coll (
        .xs(xs[o]), .f0(f0_line[o]), .f1(f1_line[o]), .p(p[o]), .c_in(c_in[o]),
        .f_out(f_out[o][k])
      );
    end
  end

endmodule
