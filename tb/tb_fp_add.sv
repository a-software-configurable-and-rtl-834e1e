// tb_fp_add: self-checking testbench for the pipelined single-precision
// multiplier. A new operand pair is applied every cycle; each result must
// appear exactly LAT cycles later and equal the product computed in double
// precision and rounded to single precision (exact, since a product of two
// 24-bit mantissas fits a double). Special cases: zeros, infinities, NaN,
// overflow and underflow to zero.
module tb_fp_add;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 11;
  localparam int NRAND = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  logic [31:0] va [$];
  logic [31:0] vb [$];
  logic [31:0] exp_q [$];

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z);
    logic xn, zn, xi, zi, x0, z0;
    xn = x[30:23] == 8'hFF && x[22:0] != 0;
    zn = z[30:23] == 8'hFF && z[22:0] != 0;
    xi = x[30:23] == 8'hFF && x[22:0] == 0;
    zi = z[30:23] == 8'hFF && z[22:0] == 0;
    x0 = x[30:23] == 8'h00;
    z0 = z[30:23] == 8'h00;
    if (xn || zn || (xi && zi && x[31] != z[31])) return 32'h7FC0_0000;
    if (xi) return x;
    if (zi) return z;
    if (x0 && z0) return {x[31] & z[31], 31'h0};
    if (x0) return z;
    if (z0) return x;
    return real_to_f32(f32_to_real(x) + f32_to_real(z));
  endfunction

  initial begin
    va.push_back(32'h3F80_0000); vb.push_back(32'h4000_0000);   // 1+2
    va.push_back(32'h3F80_0000); vb.push_back(32'hBF80_0000);   // 1-1
    va.push_back(32'h4049_0FDB); vb.push_back(32'hC049_0FDA);   // near cancellation
    va.push_back(32'h0000_0000); vb.push_back(32'hC120_0000);   // 0+(-10)
    va.push_back(32'h8000_0000); vb.push_back(32'h8000_0000);   // -0+-0
    va.push_back(32'h7F80_0000); vb.push_back(32'hFF80_0000);   // inf-inf
    va.push_back(32'h7F80_0000); vb.push_back(32'h4000_0000);   // inf+2
    va.push_back(32'h7F7F_FFFF); vb.push_back(32'h7F7F_FFFF);   // overflow
    va.push_back(32'h3F80_0000); vb.push_back(32'h3380_0000);   // tie to even
    va.push_back(32'h3F80_0001); vb.push_back(32'h3380_0000);   // tie, odd
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] r;
      r = rand_f32(100, 150);
      va.push_back(r);
      vb.push_back(rand_f32(int'(r[30:23]) - 24, int'(r[30:23]) + 24));
    end
    for (int i = 0; i < NRAND / 4; i++) begin
      // equal magnitudes with opposite or equal sign, close exponents
      logic [31:0] r;
      r = rand_f32(100, 150);
      va.push_back(r);
      vb.push_back({$urandom_range(1, 0) == 1 ? ~r[31] : r[31], r[30:23], r[22:0] ^ 23'($urandom_range(255, 0))});
    end
    foreach (va[i]) exp_q.push_back(ref_add(va[i], vb[i]));
  end

  // Stimulus and latency-exact comparison.
  initial begin
    int n;
    n = 0;
    a = '0; b = '0;
    @(negedge clk);
    for (int cyc = 0; cyc < va.size() + LAT; cyc++) begin
      if (cyc < va.size()) begin a = va[cyc]; b = vb[cyc]; end
      @(posedge clk);
      #1;
      if (cyc + 1 >= LAT) begin
        int k;
        k = cyc + 1 - LAT;
        if (k < va.size()) begin
          checks++;
          if (y !== exp_q[k]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH %h + %h: got %h expected %h", va[k], vb[k], y, exp_q[k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
