// Self-diagnosing, self-repairing single-output circuit.
//
// Wraps fd_comb_circuit with the normal-operation terminal map (fd_term_map) and
// the test sequencer (fd_diag_ctrl). While the sequencer is busy it owns the
// selector, p and C terminals and the y/r/s bus lines; otherwise the terminal
// map drives everything from x and the programmed a_code. The results of the last
// diagnosis steer the repair: a block with any faulty line is exchanged for a
// spare, and if the collector test failed the output is taken from terminal F2
// instead of F1. The same choice of
// terminal is what the sequencer observes, so the block tests that follow a failed
// collector test already read F2. Reset clears the results (no repair).
// f is combinational from x and a_code; a diagnosis takes 2 + R(2 + 2S) to
// 2 + R(2 + 4S) clocks, R = 2**(N-S-1) - 1 rounds (see fd_diag_ctrl).
module fd_repairable
  import fd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned S       = 5,
  parameter int unsigned M_SPARE = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         diag_start,
  input  logic  [N-1:0]                x,
  input  cval_e [S-1:0][2**(N-S)-1:0]  a_code,
  output logic                         f,
  output logic                         diag_busy,
  output logic                         diag_done,
  output logic                         coll_faulty,
  output logic  [S-1:0]                f0_sa1,
  output logic  [S-1:0]                f1_sa1,
  output logic  [S-1:0]                f0_sa0,
  output logic  [S-1:0]                f1_sa0,
  output logic                         unrepaired
);

  localparam int unsigned NB = S + M_SPARE;
  localparam int unsigned NC = 2**(N-S);
  localparam int unsigned L  = N - S - 1;

  logic [NB-1:0]         n_xs, t_xs, xs;
  logic [NB-1:0][NC-1:0] n_c;
  logic [L-1:0]          n_y, t_y, t_r, t_s, y, r, s;
  logic [NB-1:0]         n_p, t_p, p;
  logic                  t_c, c_in;
  logic [1:0]            f_term;
  logic [S-1:0]          faulty;

  assign faulty = f0_sa1 | f1_sa1 | f0_sa0 | f1_sa0;

  fd_term_map #(.N(N), .S(S), .M_SPARE(M_SPARE)) u_map (
    .x(x), .a_code(a_code), .faulty(faulty),
    .xs(n_xs), .c(n_c), .y(n_y), .p(n_p), .unrepaired(unrepaired)
  );

  fd_diag_ctrl #(.S(S), .M_SPARE(M_SPARE), .L(L)) u_diag (
    .clk(clk), .rst_n(rst_n), .start(diag_start), .f_in(f),
    .busy(diag_busy), .done(diag_done),
    .t_xs(t_xs), .t_p(t_p), .t_c(t_c), .t_y(t_y), .t_r(t_r), .t_s(t_s),
    .coll_faulty(coll_faulty),
    .f0_sa1(f0_sa1), .f1_sa1(f1_sa1), .f0_sa0(f0_sa0), .f1_sa0(f1_sa0)
  );

  always_comb begin
    if (diag_busy) begin
      xs   = t_xs;
      p    = t_p;
      c_in = t_c;
      y    = t_y;
      r    = t_r;
      s    = t_s;
    end else begin
      xs   = n_xs;
      p    = n_p;
      c_in = 1'b0;
      y    = n_y;
      r    = '1;
      s    = '0;
    end
  end

  fd_comb_circuit #(.N(N), .S(S), .M_SPARE(M_SPARE), .N_COLL(2)) u_circ (
    .xs(xs), .c(n_c), .y(y), .r(r), .s(s), .p(p), .c_in(c_in), .f_out(f_term)
  );

  assign f = coll_faulty ? f_term[1] : f_term[0];

endmodule
