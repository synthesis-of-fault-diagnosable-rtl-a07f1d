// Sequential circuit of the shift-register type.
//
// A shift register y[0..NY-1] (y_1 .. y_m) takes the transient function
// f(X, Y) into y[0] and moves y[i] to y[i+1] on every clock with en = 1. f is
// computed by a self-diagnosing fd_repairable circuit over the variable vector
//   v = { X2 = x[0..NX2-1], Y2 = y[0..NY2-1], X1 = x[NX2..NX-1], Y1 = y[NY2..NY-1] }
// (v[0] first): X2 and Y2 are the selector variables of the blocks, X1 and Y1 go
// to the bus lines, and the last variable of Y1 (or X1 if NY2 = NY) is x_n at the
// c terminals. Because the state is held in a plain shift register, the
// combinational part can be diagnosed in place: while a diagnosis runs (busy) the
// register holds its state. Reset clears the register. f is combinational from x
// and y; the register updates one clock after en.
// The shift-register structure follows the design; the register length, the split
// of the variables and the hold during diagnosis are this implementation's own.
module fd_shift_seq
  import fd_pkg::*;
#(
  parameter int unsigned NX      = 4,  // external inputs
  parameter int unsigned NY      = 4,  // shift-register stages
  parameter int unsigned NX2     = 2,  // external inputs used as selector variables
  parameter int unsigned NY2     = 2,  // state variables used as selector variables
  parameter int unsigned M_SPARE = 1
) (
  input  logic                                                 clk,
  input  logic                                                 rst_n,
  input  logic                                                 en,
  input  logic  [NX-1:0]                                       x,
  input  cval_e [NX2+NY2-1:0][2**(NX+NY-NX2-NY2)-1:0]          a_code,
  input  logic                                                 diag_start,
  output logic  [NY-1:0]                                       y,
  output logic                                                 f,
  output logic                                                 diag_busy,
  output logic                                                 diag_done,
  output logic                                                 coll_faulty,
  output logic  [NX2+NY2-1:0]                                  faulty_blocks,
  output logic                                                 unrepaired
);

  localparam int unsigned N = NX + NY;
  localparam int unsigned S = NX2 + NY2;

  logic [N-1:0] v;
  logic [S-1:0] f0_sa1, f1_sa1, f0_sa0, f1_sa0;

  always_comb begin
    for (int i = 0; i < NX2; i++)      v[i]                 = x[i];
    for (int i = 0; i < NY2; i++)      v[NX2+i]             = y[i];
    for (int i = NX2; i < NX; i++)     v[S+i-NX2]           = x[i];
    for (int i = NY2; i < NY; i++)     v[S+NX-NX2+i-NY2]    = y[i];
  end

  fd_repairable #(.N(N), .S(S), .M_SPARE(M_SPARE)) u_comb (
    .clk(clk), .rst_n(rst_n), .diag_start(diag_start), .x(v), .a_code(a_code),
    .f(f), .diag_busy(diag_busy), .diag_done(diag_done), .coll_faulty(coll_faulty),
    .f0_sa1(f0_sa1), .f1_sa1(f1_sa1), .f0_sa0(f0_sa0), .f1_sa0(f1_sa0),
    .unrepaired(unrepaired)
  );

  assign faulty_blocks = f0_sa1 | f1_sa1 | f0_sa0 | f1_sa0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 y <= '0;
    else if (en && !diag_busy)  y <= {y[NY-2:0], f};
  end

endmodule
