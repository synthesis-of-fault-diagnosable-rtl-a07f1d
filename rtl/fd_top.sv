// Top level: the fault diagnosable logic of the design, three circuits side by side.
//
//  * Single-output circuit (fd_repairable, N = 8 variables, S = 5 blocks, one spare):
//    computes f(x) from the programmed terminal codes a_code, diagnoses its collector
//    and the lines of every block level on diag_start, and repairs itself from
//    the result.
//  * Multi-output circuit (fd_multi_repairable, two outputs over N = 8 variables,
//    4 blocks and one spare per output, shared bus): output o computes its
//    function of m_x from m_a_code[o]; m_diag_start diagnoses the outputs one
//    after the other and repairs each from its own result.
//  * Shift-register sequential circuit (fd_shift_seq, 4 inputs, 4 stages).
// The three only share clock and reset. Timing: the combinational outputs follow
// their inputs in the same cycle; diagnosis and the shift register are clocked on
// the rising edge with an asynchronous active-low reset.
module fd_top
  import fd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned S       = 5,
  parameter int unsigned M_SPARE = 1,
  parameter int unsigned MN      = 8,  // multi-output: variables
  parameter int unsigned MS      = 4,  // multi-output: selector variables
  parameter int unsigned MOUT    = 2   // multi-output: outputs
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // single-output circuit
  input  logic                                  diag_start,
  input  logic  [N-1:0]                         x,
  input  cval_e [S-1:0][2**(N-S)-1:0]           a_code,
  output logic                                  f,
  output logic                                  diag_busy,
  output logic                                  diag_done,
  output logic                                  coll_faulty,
  output logic  [S-1:0]                         f0_sa1,
  output logic  [S-1:0]                         f1_sa1,
  output logic  [S-1:0]                         f0_sa0,
  output logic  [S-1:0]                         f1_sa0,
  output logic                                  unrepaired,
  // multi-output circuit
  input  logic  [MN-1:0]                        m_x,
  input  cval_e [MOUT-1:0][MS-1:0][2**(MN-MS)-1:0] m_a_code,
  input  logic                                  m_diag_start,
  output logic  [MOUT-1:0]                      m_f,
  output logic                                  m_diag_busy,
  output logic                                  m_diag_done,
  output logic  [MOUT-1:0]                      m_coll_faulty,
  output logic  [MOUT-1:0][MS-1:0]              m_faulty_blocks,
  output logic  [MOUT-1:0]                      m_unrepaired,
  // shift-register sequential circuit
  input  logic                                  q_en,
  input  logic  [3:0]                           q_x,
  input  cval_e [3:0][15:0]                     q_a_code,
  input  logic                                  q_diag_start,
  output logic  [3:0]                           q_y,
  output logic                                  q_f,
  output logic                                  q_diag_busy,
  output logic                                  q_diag_done,
  output logic                                  q_coll_faulty,
  output logic  [3:0]                           q_faulty_blocks,
  output logic                                  q_unrepaired
);

  // ---- single-output circuit ---------------------------------------------------
  fd_repairable #(.N(N), .S(S), .M_SPARE(M_SPARE)) u_single (
    .clk(clk), .rst_n(rst_n), .diag_start(diag_start), .x(x), .a_code(a_code),
    .f(f), .diag_busy(diag_busy), .diag_done(diag_done), .coll_faulty(coll_faulty),
    .f0_sa1(f0_sa1), .f1_sa1(f1_sa1), .f0_sa0(f0_sa0), .f1_sa0(f1_sa0),
    .unrepaired(unrepaired)
  );

  // ---- multi-output circuit ----------------------------------------------------
  fd_multi_repairable #(.N(MN), .S(MS), .NOUT(MOUT), .M_SPARE(1)) u_multi (
    .clk(clk), .rst_n(rst_n), .diag_start(m_diag_start), .x(m_x), .a_code(m_a_code),
    .f(m_f), .diag_busy(m_diag_busy), .diag_done(m_diag_done),
    .coll_faulty(m_coll_faulty), .faulty_blocks(m_faulty_blocks),
    .unrepaired(m_unrepaired)
  );

  // ---- shift-register sequential circuit ---------------------------------------
  fd_shift_seq #(.NX(4), .NY(4), .NX2(2), .NY2(2), .M_SPARE(1)) u_seq (
    .clk(clk), .rst_n(rst_n), .en(q_en), .x(q_x), .a_code(q_a_code),
    .diag_start(q_diag_start), .y(q_y), .f(q_f), .diag_busy(q_diag_busy),
    .diag_done(q_diag_done), .coll_faulty(q_coll_faulty),
    .faulty_blocks(q_faulty_blocks), .unrepaired(q_unrepaired)
  );

endmodule
