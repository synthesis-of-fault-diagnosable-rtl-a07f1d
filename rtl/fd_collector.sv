// Collector part: combines the block outputs into one output terminal.
//
// A chain of NB fd_module elements. Element j selects f0[j] or f1[j] with the
// block's variable xs[j], is enabled by p[j] through its r line, and takes the
// previous element's output on its s line; the head of the chain is the terminal C.
// The result is F = C | OR_j p[j] & (xs[j] ? f1[j] : f0[j]). With all p = 0 the
// chain is a path from C to F, which is what the collector test uses.
// Purely combinational; the delay grows with NB.
module fd_collector #(
  parameter int unsigned NB = 6  // blocks feeding the chain (working + spare)
) (
  input  logic [NB-1:0] xs,
  input  logic [NB-1:0] f0,
  input  logic [NB-1:0] f1,
  input  logic [NB-1:0] p,
  input  logic          c_in,
  output logic          f_out
);

  logic [NB:0] chain;  // chain[j] enters element j; chain[NB] is F

  assign chain[0] = c_in;
  for (genvar j = 0; j < NB; j++) begin : g_elem
    fd_module u_mod (
      .d0(f0[j]), .d1(f1[j]), .y(xs[j]), .r(p[j]), .s(chain[j]), .q(chain[j+1])
    );
  end
  assign f_out = chain[NB];

endmodule
