// Normal-operation terminal settings, with repair by spare blocks.
//
// Maps the input variables x[0..N-1] (x_1 .. x_n) onto the terminals of
// fd_comb_circuit: x[0..S-1] drive the selector variable of the working blocks,
// x[S..N-2] the bus lines y, and x[N-1] (x_n) resolves the programmed codes a_code
// into c terminal values. Working blocks get p = 1. A block marked in `faulty` is
// exchanged for a spare: its p goes to 0 while the spare gets p = 1, the faulty
// block's selector variable and the faulty block's programming a_j. Spares are handed
// out in increasing block order; a faulty block left without a spare keeps p = 1 and
// raises `unrepaired`. Unused spares get p = 0 and all-zero c terminals.
// The exchange rule follows the design; the allocation order is this
// implementation's own. Purely combinational.
module fd_term_map
  import fd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned S       = 5,
  parameter int unsigned M_SPARE = 1
) (
  input  logic  [N-1:0]                        x,
  input  cval_e [S-1:0][2**(N-S)-1:0]          a_code,
  input  logic  [S-1:0]                        faulty,
  output logic  [S+M_SPARE-1:0]                xs,
  output logic  [S+M_SPARE-1:0][2**(N-S)-1:0]  c,
  output logic  [N-S-2:0]                      y,
  output logic  [S+M_SPARE-1:0]                p,
  output logic                                 unrepaired
);

  localparam int unsigned NC = 2**(N-S);

  logic [S-1:0][NC-1:0] c_work;  // resolved programming of the working blocks

  always_comb begin
    for (int j = 0; j < S; j++)
      for (int k = 0; k < NC; k++)
        c_work[j][k] = cval_resolve(a_code[j][k], x[N-1]);
  end

  assign y = x[N-2:S];

  always_comb begin
    int unsigned used;
    used       = 0;
    unrepaired = 1'b0;
    xs         = '0;
    c          = '0;
    p          = '0;
    for (int j = 0; j < S; j++) begin
      xs[j] = x[j];
      c[j]  = c_work[j];
      p[j]  = 1'b1;
    end
    for (int j = 0; j < S; j++) begin
      if (faulty[j]) begin
        if (used < M_SPARE) begin
          p[j]        = 1'b0;
          p[S+used]   = 1'b1;
          xs[S+used]  = x[j];
          c[S+used]   = c_work[j];
          used        = used + 1;
        end else begin
          unrepaired = 1'b1;
        end
      end
    end
  end

endmodule
