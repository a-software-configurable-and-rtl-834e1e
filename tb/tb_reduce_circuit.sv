// tb_reduce_circuit: self-checking testbench for the reduction circuit.
// For every N_g from 1 to MAX_NG, rows of N_g random partial sums are fed
// back to back, one per cycle. Each row must produce exactly one output,
// equal to ((p0+p1)+p2)+... rounded after every addition, and it must appear
// (N_g-1)*(L_A+2) cycles after the row's first partial sum.
module tb_reduce_circuit;
  import fp_ref_pkg::*;

  localparam int unsigned MAX_NG = 4;
  localparam int unsigned LA = 3;
  localparam int NROWS = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [7:0] ng;
  logic in_valid, in_first;
  logic [31:0] in_data;
  logic out_valid;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  reduce_circuit #(.MAX_NG(MAX_NG), .LAT_ADD(LA)) dut (
    .clk(clk), .rst_n(rst_n), .ng_i(ng), .in_valid(in_valid), .in_first(in_first),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] exp_q [$];
  int          due_q [$];
  int          outs;

  // Output monitor: samples the outputs at each rising edge (before the edge's updates).
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      outs++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("unexpected output %h", out_data);
      end else begin
        logic [31:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (out_data !== e) begin
          failures++;
          if (failures < 10) $display("ng=%0d value: got %h expected %h", ng, out_data, e);
        end
        if (cyc != d) begin
          failures++;
          if (failures < 10) $display("ng=%0d timing: out in cycle %0d expected %0d", ng, cyc, d);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_first = 1'b0; in_data = '0; ng = 8'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 1; g <= int'(MAX_NG); g++) begin
      @(negedge clk);
      ng = 8'(g);
      outs = 0;
      for (int r = 0; r < NROWS; r++) begin
        logic [31:0] accb;
        logic [31:0] p [MAX_NG];
        for (int k = 0; k < g; k++) begin
          p[k] = rand_f32(124, 130);
          accb = (k == 0) ? p[k] : real_to_f32(f32_to_real(accb) + f32_to_real(p[k]));
        end
        exp_q.push_back(accb);
        due_q.push_back(cyc + (g - 1) * int'(LA + 2));
        for (int k = 0; k < g; k++) begin
          in_valid = 1'b1; in_first = (k == 0); in_data = p[k];
          @(negedge clk);
        end
      end
      in_valid = 1'b0; in_first = 1'b0;
      repeat (int'(MAX_NG * (LA + 2)) + 4) @(negedge clk);
      checks++;
      if (outs != NROWS) begin
        failures++;
        $display("ng=%0d: %0d outputs for %0d rows", g, outs, NROWS);
      end
      exp_q.delete(); due_q.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
