// mac_tree: binary multiply-accumulate tree of the parallel processing
// architecture.
//
// K = 2^DEPTH multipliers form the leaves; K-1 adders, arranged in DEPTH
// levels, sum their products pairwise. Nodes are numbered as a heap: node 1
// is the root (level 0, Adder(0)), nodes 2 and 3 are level 1 (Adder(1),
// Adder(2)), and in general level L holds nodes 2^L .. 2^(L+1)-1; the product
// of multiplier j is the (virtual) node K+j. Every adder output is brought
// out on node_o so that the controller can tap results at any level: a tap
// at level L delivers 2^L independent dot products of length K/2^L per cycle
// (the merge mechanism), a tap at the root one dot product of length K.
//
// Timing: a matrix/vector pair applied in cycle t reaches level L at
// t + LAT_MUL + (DEPTH-L)*LAT_ADD, the root at t + LAT_MUL + DEPTH*LAT_ADD
// (L_total = L_M + depth*L_A). One new pair of K operands per cycle. The
// structure, the tap points and the latency follow the document; the heap
// numbering of the taps is this design's.
module mac_tree #(
  parameter int unsigned DEPTH   = 6,
  parameter int unsigned LAT_MUL = 6,
  parameter int unsigned LAT_ADD = 11,
  localparam int unsigned K      = 1 << DEPTH
) (
  input  logic        clk,
  input  logic [31:0] mat_i  [K],       // row elements of T, one per multiplier
  input  logic [31:0] vec_i  [K],       // vector elements (y or xhat), one per multiplier
  output logic [31:0] node_o [1:K-1]    // every adder output, heap order
);

  logic [31:0] h [1:2*K-1];             // heap: 1..K-1 adders, K..2K-1 products

  for (genvar j = 0; j < K; j++) begin : g_mul
    fp_mul #(.LAT(LAT_MUL)) u_mul (.clk(clk), .a(mat_i[j]), .b(vec_i[j]), .y(h[K+j]));
  end

  for (genvar i = 1; i < K; i++) begin : g_add
    fp_add #(.LAT(LAT_ADD)) u_add (.clk(clk), .a(h[2*i]), .b(h[2*i+1]), .y(h[i]));
    assign node_o[i] = h[i];
  end

endmodule
