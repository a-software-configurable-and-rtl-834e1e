// tb_fp_mul: self-checking testbench for the pipelined single-precision
// multiplier. A new operand pair is applied every cycle; each result must
// appear exactly LAT cycles later and equal the product computed in double
// precision and rounded to single precision (exact, since a product of two
// 24-bit mantissas fits a double). Special cases: zeros, infinities, NaN,
// overflow and underflow to zero.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 6;
  localparam int NRAND = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  logic [31:0] va [$];
  logic [31:0] vb [$];
  logic [31:0] exp_q [$];

  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] z);
    logic xn, zn, xi, zi, x0, z0;
    xn = x[30:23] == 8'hFF && x[22:0] != 0;
    zn = z[30:23] == 8'hFF && z[22:0] != 0;
    xi = x[30:23] == 8'hFF && x[22:0] == 0;
    zi = z[30:23] == 8'hFF && z[22:0] == 0;
    x0 = x[30:23] == 8'h00;
    z0 = z[30:23] == 8'h00;
    if (xn || zn || (xi && z0) || (zi && x0)) return 32'h7FC0_0000;
    if (xi || zi) return {x[31] ^ z[31], 8'hFF, 23'h0};
    if (x0 || z0) return {x[31] ^ z[31], 31'h0};
    return real_to_f32(f32_to_real(x) * f32_to_real(z));
  endfunction

  initial begin
    va.push_back(32'h3F80_0000); vb.push_back(32'h4000_0000);   // 1*2
    va.push_back(32'hBFC0_0000); vb.push_back(32'h4040_0000);   // -1.5*3
    va.push_back(32'h0000_0000); vb.push_back(32'h4120_0000);   // 0*10
    va.push_back(32'h7F80_0000); vb.push_back(32'hC000_0000);   // inf*-2
    va.push_back(32'h7F80_0000); vb.push_back(32'h0000_0000);   // inf*0
    va.push_back(32'h7F00_0000); vb.push_back(32'h7F00_0000);   // overflow
    va.push_back(32'h0080_0000); vb.push_back(32'h0080_0000);   // underflow
    va.push_back(32'h3F7F_FFFF); vb.push_back(32'h3F80_0001);   // rounding near 1
    for (int i = 0; i < NRAND; i++) begin
      va.push_back(rand_f32(60, 190));
      vb.push_back(rand_f32(60, 190));
    end
    foreach (va[i]) exp_q.push_back(ref_mul(va[i], vb[i]));
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
              $display("MISMATCH %h * %h: got %h expected %h", va[k], vb[k], y, exp_q[k]);
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
