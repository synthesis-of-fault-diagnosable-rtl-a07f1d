// Self-diagnosing, self-repairing multi-output circuit.
//
// fd_multi_circuit with one terminal map (fd_term_map) per output and a single
// test sequencer (fd_diag_ctrl) that diagnoses the outputs one after the other.
// A diag_start pulse runs a complete diagnosis of output 0, then of output 1, and
// so on. While output o is under test the sequencer drives its selector, p and C
// terminals and the shared y/r/s bus, observes its output terminal, and every other
// output has all p = 0. After each run the results of that output are kept:
// a broken F1 collector switches that output to F2, and each block with a faulty
// line is exchanged for that output's spare. Reset clears all results.
// Timing: f is combinational from x and a_code outside diagnosis; a diagnosis
// lasts NOUT runs of fd_diag_ctrl plus one clock per output to start it.
// Diagnosing the outputs in turn through their own p and C terminals is this
// implementation's own arrangement.
module fd_multi_repairable
  import fd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned S       = 4,
  parameter int unsigned NOUT    = 2,
  parameter int unsigned M_SPARE = 1
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    diag_start,
  input  logic  [N-1:0]                           x,
  input  cval_e [NOUT-1:0][S-1:0][2**(N-S)-1:0]   a_code,
  output logic  [NOUT-1:0]                        f,
  output logic                                    diag_busy,
  output logic                                    diag_done,
  output logic  [NOUT-1:0]                        coll_faulty,
  output logic  [NOUT-1:0][S-1:0]                 faulty_blocks,
  output logic  [NOUT-1:0]                        unrepaired
);

  localparam int unsigned NB = S + M_SPARE;
  localparam int unsigned NC = 2**(N-S);
  localparam int unsigned L  = N - S - 1;
  localparam int unsigned OW = (NOUT > 1) ? $clog2(NOUT) : 1;

  typedef enum logic [1:0] {M_IDLE, M_START, M_RUN, M_DONE} mstate_e;

  mstate_e                   mst;
  logic [OW-1:0]             cur;        // output under test
  logic                      run_start, run_done, run_busy, run_coll;
  logic [NB-1:0]             t_xs, t_p;
  logic                      t_c;
  logic [L-1:0]              t_y, t_r, t_s;
  logic [S-1:0]              r_f0_sa1, r_f1_sa1, r_f0_sa0, r_f1_sa0;
  logic                      f_obs;

  logic [NOUT-1:0][NB-1:0]         n_xs, n_p, xs, p;
  logic [NOUT-1:0][NB-1:0][NC-1:0] n_c;
  logic [NOUT-1:0][L-1:0]          n_y;
  logic [NOUT-1:0]                 c_in;
  logic [L-1:0]                    y, r, s;
  logic [NOUT-1:0][1:0]            f_term;

  for (genvar o = 0; o < NOUT; o++) begin : g_map
    fd_term_map #(.N(N), .S(S), .M_SPARE(M_SPARE)) u_map (
      .x(x), .a_code(a_code[o]), .faulty(faulty_blocks[o]),
      .xs(n_xs[o]), .c(n_c[o]), .y(n_y[o]), .p(n_p[o]), .unrepaired(unrepaired[o])
    );
    assign f[o] = coll_faulty[o] ? f_term[o][1] : f_term[o][0];
  end

  assign diag_busy = (mst == M_START) || (mst == M_RUN);
  assign diag_done = (mst == M_DONE);
  assign run_start = (mst == M_START);

  // The sequencer watches the output under test through the collector it has
  // found sound so far in this run.
  assign f_obs = run_coll ? f_term[cur][1] : f_term[cur][0];

  fd_diag_ctrl #(.S(S), .M_SPARE(M_SPARE), .L(L)) u_diag (
    .clk(clk), .rst_n(rst_n), .start(run_start), .f_in(f_obs),
    .busy(run_busy), .done(run_done),
    .t_xs(t_xs), .t_p(t_p), .t_c(t_c), .t_y(t_y), .t_r(t_r), .t_s(t_s),
    .coll_faulty(run_coll),
    .f0_sa1(r_f0_sa1), .f1_sa1(r_f1_sa1), .f0_sa0(r_f0_sa0), .f1_sa0(r_f1_sa0)
  );

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      xs[o]   = n_xs[o];
      p[o]    = diag_busy ? '0 : n_p[o];
      c_in[o] = 1'b0;
      if (diag_busy && (OW'(o) == cur)) begin
        xs[o]   = t_xs;
        p[o]    = t_p;
        c_in[o] = t_c;
      end
    end
    if (diag_busy) begin
      y = t_y;
      r = t_r;
      s = t_s;
    end else begin
      y = n_y[0];
      r = '1;
      s = '0;
    end
  end

  fd_multi_circuit #(.N(N), .S(S), .NOUT(NOUT), .M_SPARE(M_SPARE), .N_COLL(2)) u_circ (
    .xs(xs), .c(n_c), .y(y), .r(r), .s(s), .p(p), .c_in(c_in), .f_out(f_term)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst           <= M_IDLE;
      cur           <= '0;
      coll_faulty   <= '0;
      faulty_blocks <= '0;
    end else begin
      unique case (mst)
        M_IDLE, M_DONE: if (diag_start) begin
          mst           <= M_START;
          cur           <= '0;
          coll_faulty   <= '0;
          faulty_blocks <= '0;
        end
        M_START: mst <= M_RUN;
        M_RUN: if (run_done) begin
          coll_faulty[cur]   <= run_coll;
          faulty_blocks[cur] <= r_f0_sa1 | r_f1_sa1 | r_f0_sa0 | r_f1_sa0;
          if (cur == OW'(NOUT - 1)) begin
            mst <= M_DONE;
          end else begin
            cur <= cur + 1'b1;
            mst <= M_START;
          end
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

  // Every terminal map derives the bus value from the same x, so output 0's copy
  // drives the shared bus.
  always_comb
    for (int o = 1; o < NOUT; o++) a_bus_same: assert (n_y[o] == n_y[0]);

  // The sequencer stays busy for the whole of every run it is started for.
  always_comb
    if (mst == M_RUN && !run_done) a_run_busy: assert (run_busy);

endmodule
