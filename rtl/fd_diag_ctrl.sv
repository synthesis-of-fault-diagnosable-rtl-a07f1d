// Test sequencer for the collector and the lines of every block level of
// fd_comb_circuit.
//
// After a `start` pulse it takes over the terminals xs, p, C and the y/r/s bus
// lines (busy = 1) and applies one test pattern per clock, sampling the observed
// output terminal f_in at the end of that clock. First the collector:
//   A1 / A2   C = 1 / 0, all p = 0: a sound collector answers 1 then 0.
// Then, for each level i = 1 .. L and each path u through levels 1 .. i-1
// (the bus lines y_1 .. y_{i-1} carry u, y_1 as its top bit, with those levels in
// normal operation), one round of tests on the level-i lines that u selects:
//   T1 / T2   all x_j = 0 / 1, p = 1 for working blocks, (r_i, s_i) = (0, 0):
//             a 1 means some f0 / f1 line of the round is stuck at 1.
//   H_j       only if T2 gave 1: x_j = 1, only p_j = 1, (r_i, s_i) = (0, 0);
//             a 1 marks the f1 tree of block j as having a line stuck at 1.
//   J_j       only if T1 gave 1: as H_j with x_j = 0, for the f0 tree.
//   D_j / E_j x_j = 1 / 0, only p_j = 1, s_i = 1: a 0 marks the f1 / f0 tree of
//             block j as having a line stuck at 0.
// Level 1 has one round (its lines are the block outputs f0, f1); level i has
// 2**(i-1). A round takes 2 + 2S clocks, plus S for the H tests and S for the J
// tests when they are needed; the whole run adds 2 for A1/A2. `done` rises in the
// cycle after the last test and the results stay until the next start.
// The level-1 patterns and their conclusions follow the design, which states that
// the deeper levels are diagnosed in the same way; the rounds per path for the
// deeper levels, and running all of it from a clocked sequencer, are this
// implementation's own arrangement.
module fd_diag_ctrl #(
  parameter int unsigned S       = 5,
  parameter int unsigned M_SPARE = 1,
  parameter int unsigned L       = 2   // block levels, n - s - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  f_in,        // output terminal under observation
  output logic                  busy,
  output logic                  done,
  output logic [S+M_SPARE-1:0]  t_xs,
  output logic [S+M_SPARE-1:0]  t_p,
  output logic                  t_c,
  output logic [L-1:0]          t_y,
  output logic [L-1:0]          t_r,
  output logic [L-1:0]          t_s,
  output logic                  coll_faulty,
  output logic [S-1:0]          f0_sa1,
  output logic [S-1:0]          f1_sa1,
  output logic [S-1:0]          f0_sa0,
  output logic [S-1:0]          f1_sa0
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_A1, ST_A2, ST_T1, ST_T2, ST_H, ST_J, ST_D, ST_E, ST_DONE
  } state_e;

  localparam int unsigned IW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned NB = S + M_SPARE;

  state_e        state;
  logic [IW-1:0] idx;        // block under test
  logic [LW-1:0] lv;         // level under test, 0 = level 1
  logic [L-1:0]  path;       // path through the levels above, lv bits used
  logic          a1_res, t1_res, t2_res;
  logic          last, last_path, last_level;

  assign last       = (idx == IW'(S - 1));
  assign last_path  = (path == L'((1 << lv) - 1));
  assign last_level = (lv == LW'(L - 1));
  assign busy       = (state != ST_IDLE) && (state != ST_DONE);
  assign done       = (state == ST_DONE);

  // Test pattern of the current state.
  always_comb begin
    t_xs = '0;
    t_p  = '0;
    t_c  = 1'b0;
    t_y  = '0;
    t_r  = '1;
    t_s  = '0;
    for (int m = 0; m < L; m++)
      if (m < int'(lv)) t_y[m] = path[int'(lv) - 1 - m];
    unique case (state)
      ST_A1: t_c = 1'b1;
      ST_A2: ;
      ST_T1, ST_T2: begin
        t_p[S-1:0]  = '1;
        t_xs[S-1:0] = (state == ST_T2) ? '1 : '0;
        t_r[lv]     = 1'b0;
      end
      ST_H, ST_J: begin
        t_p     = NB'(1) << idx;
        t_xs    = (state == ST_H) ? t_p : '0;
        t_r[lv] = 1'b0;
      end
      ST_D, ST_E: begin
        t_p     = NB'(1) << idx;
        t_xs    = (state == ST_D) ? t_p : '0;
        t_s[lv] = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      idx         <= '0;
      lv          <= '0;
      path        <= '0;
      a1_res      <= 1'b0;
      t1_res      <= 1'b0;
      t2_res      <= 1'b0;
      coll_faulty <= 1'b0;
      f0_sa1      <= '0;
      f1_sa1      <= '0;
      f0_sa0      <= '0;
      f1_sa0      <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: if (start) begin
          state       <= ST_A1;
          idx         <= '0;
          lv          <= '0;
          path        <= '0;
          coll_faulty <= 1'b0;
          f0_sa1      <= '0;
          f1_sa1      <= '0;
          f0_sa0      <= '0;
          f1_sa0      <= '0;
        end
        ST_A1: begin
          a1_res <= f_in;
          state  <= ST_A2;
        end
        ST_A2: begin
          coll_faulty <= !(a1_res && !f_in);
          state       <= ST_T1;
        end
        ST_T1: begin
          t1_res <= f_in;
          state  <= ST_T2;
        end
        ST_T2: begin
          t2_res <= f_in;
          idx    <= '0;
          if (f_in)        state <= ST_H;
          else if (t1_res) state <= ST_J;
          else             state <= ST_D;
        end
        ST_H: begin
          f1_sa1 <= f1_sa1 | (S'(f_in) << idx);
          idx    <= last ? '0 : idx + 1'b1;
          if (last) state <= t1_res ? ST_J : ST_D;
        end
        ST_J: begin
          f0_sa1 <= f0_sa1 | (S'(f_in) << idx);
          idx    <= last ? '0 : idx + 1'b1;
          if (last) state <= ST_D;
        end
        ST_D: begin
          f1_sa0 <= f1_sa0 | (S'(!f_in) << idx);
          idx    <= last ? '0 : idx + 1'b1;
          if (last) state <= ST_E;
        end
        ST_E: begin
          f0_sa0 <= f0_sa0 | (S'(!f_in) << idx);
          idx    <= last ? '0 : idx + 1'b1;
          if (last) begin
            // next path of this level, else first path of the next level
            if (!last_path) begin
              path  <= path + 1'b1;
              state <= ST_T1;
            end else if (!last_level) begin
              path  <= '0;
              lv    <= lv + 1'b1;
              state <= ST_T1;
            end else begin
              state <= ST_DONE;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The H tests are run only after T2 found a stuck-at-1 line, the J tests only
  // after T1 did.
  property p_h_needs_t2;
    @(posedge clk) disable iff (!rst_n) (state == ST_H) |-> t2_res;
  endproperty
  property p_j_needs_t1;
    @(posedge clk) disable iff (!rst_n) (state == ST_J) |-> t1_res;
  endproperty
  a_h_needs_t2: assert property (p_h_needs_t2);
  a_j_needs_t1: assert property (p_j_needs_t1);

endmodule
