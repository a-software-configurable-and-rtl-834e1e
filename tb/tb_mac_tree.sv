// tb_mac_tree: self-checking testbench for the multiply-accumulate tree.
// A new random matrix row and vector is applied every cycle. Every adder
// node is compared with a reference tree evaluated in the testbench (each
// product and each pairwise sum rounded to single precision), exactly
// LAT_MUL + (DEPTH-level)*LAT_ADD cycles after the operands were applied.
module tb_mac_tree;
  import fp_ref_pkg::*;

  localparam int unsigned DEPTH = 3;
  localparam int unsigned LM = 3;
  localparam int unsigned LA = 4;
  localparam int unsigned K = 1 << DEPTH;
  localparam int NVEC = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] mat [K];
  logic [31:0] vec [K];
  logic [31:0] node [1:K-1];
  int checks = 0, failures = 0;

  mac_tree #(.DEPTH(DEPTH), .LAT_MUL(LM), .LAT_ADD(LA)) dut (
    .clk(clk), .mat_i(mat), .vec_i(vec), .node_o(node));

  logic [31:0] ref_node [NVEC][1:2*K-1];

  function automatic int level_of(input int i);
    int l;
    l = 0;
    while ((1 << (l + 1)) <= i) l++;
    return l;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    logic [31:0] m_s [NVEC][K];
    logic [31:0] v_s [NVEC][K];
    for (int n = 0; n < NVEC; n++) begin
      for (int j = 0; j < K; j++) begin
        m_s[n][j] = rand_f32(122, 132);
        v_s[n][j] = rand_f32(122, 132);
        ref_node[n][K+j] = real_to_f32(f32_to_real(m_s[n][j]) * f32_to_real(v_s[n][j]));
      end
      for (int i = K - 1; i >= 1; i--)
        ref_node[n][i] = real_to_f32(f32_to_real(ref_node[n][2*i]) + f32_to_real(ref_node[n][2*i+1]));
    end
    // Apply vector n during cycle n (captured at the edge that ends it).
    @(negedge clk);
    for (int n = 0; n < NVEC + int'(LM + DEPTH * LA) + 2; n++) begin
      for (int j = 0; j < K; j++) begin
        mat[j] = (n < NVEC) ? m_s[n][j] : 32'h0;
        vec[j] = (n < NVEC) ? v_s[n][j] : 32'h0;
      end
      @(posedge clk);
      #1;
      // After this edge, node i holds the result of vector n+1-latency(i).
      for (int i = 1; i < K; i++) begin
        int lat, src;
        lat = int'(LM) + (int'(DEPTH) - level_of(i)) * int'(LA);
        src = n + 1 - lat;
        if (src >= 0 && src < NVEC) begin
          checks++;
          if (node[i] !== ref_node[src][i]) begin
            failures++;
            if (failures < 10) $display("node %0d vec %0d: got %h expected %h", i, src, node[i], ref_node[src][i]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
