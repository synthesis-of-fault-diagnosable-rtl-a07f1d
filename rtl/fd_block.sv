// One block of the block part.
//
// A block realises two functions of the bus variables, f0 and f1, each as a binary
// tree of fd_module selectors. The 2**(LEVELS+1) c terminals are split in halves:
// c[0 .. H-1] feed the f0 tree and c[H .. 2H-1] the f1 tree (H = 2**LEVELS), so
// f0 = OR_k c[k] m_k and f1 = OR_k c[H+k] m_k with m_k a minterm of the bus
// variables. Level 1 is the output level (the modules driving f0 and f1) and
// level LEVELS the one fed by the c terminals; all modules of level i share the bus
// lines y[i-1], r[i-1], s[i-1]. Within a half, terminal index k has the level-1
// variable as its most significant bit. A block holds 2**(LEVELS+1) - 2 modules.
// LEVELS must be at least 1. Purely combinational.
module fd_block #(
  parameter int unsigned LEVELS = 2   // bus levels, n - s - 1
) (
  input  logic [2**(LEVELS+1)-1:0] c,  // external terminals c_j^k
  input  logic [LEVELS-1:0]        y,  // y[i-1] is bus line y_i
  input  logic [LEVELS-1:0]        r,
  input  logic [LEVELS-1:0]        s,
  output logic                     f0,
  output logic                     f1
);

  localparam int unsigned H = 2**LEVELS;  // terminals per half

  // Heap-numbered tree nodes per half: node 1 is the root (level 1), the children of
  // node k are 2k and 2k+1, nodes H .. 2H-1 are the c terminals of that half.
  logic [1:0][2*H-1:0] node;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar k = 0; k < H; k++) begin : g_leaf
      assign node[h][H+k] = c[h*H+k];
    end
    for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
      for (genvar k = 0; k < 2**lv; k++) begin : g_mod
        fd_module u_mod (
          .d0(node[h][2*(2**lv+k)]),
          .d1(node[h][2*(2**lv+k)+1]),
          .y (y[lv]),
          .r (r[lv]),
          .s (s[lv]),
          .q (node[h][2**lv+k])
        );
      end
    end
    assign node[h][0] = 1'b0;  // heap slot 0 is unused
  end

  assign f0 = node[0][1];
  assign f1 = node[1][1];

endmodule
