// tb_lqr_output: self-checking testbench for output arrangement and the
// output hold register (4-multiplier tree: nodes 1..3). Merge mode with two
// rows per valid cycle (results on nodes 2 and 3), including a padded last
// fetch, and reduce mode with one row per valid cycle. Rows below M must
// land in u, which is copied to the hold register with one u_valid pulse
// one cycle after its last row; rows from M on must be issued as estimate
// writes of column P+row-M in the same cycle and appear on xhat_o; u_valid
// and the new held u must appear two cycles after the last control row, done
// must pulse once, two cycles after the last row, and the hold register must
// not change before the next iteration's u is complete.
module tb_lqr_output;
  import lqr_pkg::*;

  localparam int unsigned DEPTH = 2, M_MAX = 4, N_MAX = 4;
  localparam int unsigned K = 1 << DEPTH, NW = K / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, tap_valid, red_valid, u_valid, done;
  mech_e mech;
  logic [3:0] glog;
  logic [7:0] m, n, p;
  logic [31:0] node [1:K-1];
  logic [31:0] red_data;
  logic xw_valid [NW];
  logic [9:0] xw_col [NW];
  logic [31:0] xw_data [NW];
  logic [31:0] u [M_MAX];
  logic [31:0] xhat [N_MAX];
  int checks = 0, failures = 0;
  int n_uv = 0, n_done = 0, cyc = 0, cyc_uv = 0, cyc_done = 0;

  lqr_output #(.DEPTH(DEPTH), .M_MAX(M_MAX), .N_MAX(N_MAX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mech(mech), .glog(glog), .m(m), .n(n), .p(p),
    .tap_valid(tap_valid), .node_i(node), .red_valid(red_valid), .red_data(red_data),
    .xw_valid(xw_valid), .xw_col(xw_col), .xw_data(xw_data),
    .u_o(u), .u_valid(u_valid), .xhat_o(xhat), .done(done));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (u_valid) begin n_uv++; cyc_uv <= cyc; end
    if (done) begin n_done++; cyc_done <= cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] val(input int it, input int row);
    return 32'h4000_0000 + 32'(it * 256 + row);
  endfunction

  // one iteration; rows arrive nf per valid cycle, with a gap cycle between
  task automatic iteration(input int it, input bit red);
    int rows, nf, last_cyc, u_cyc;
    logic [31:0] held [M_MAX];
    rows = int'(m) + int'(n);
    nf = red ? 1 : (1 << (DEPTH - int'(glog)));
    held = u;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_uv = 0; n_done = 0;
    u_cyc = -1;
    for (int base = 0; base < rows; base += nf) begin
      @(negedge clk);
      for (int k = 0; k < nf; k++) if (!red) node[nf + k] = (base + k < rows) ? val(it, base + k) : 32'hDEAD_0000;
      red_data = val(it, base);
      tap_valid = !red; red_valid = red;
      #1;
      for (int k = 0; k < nf; k++) begin
        int r;
        r = base + k;
        if (r < rows && r >= int'(m)) begin
          check(xw_valid[k] && xw_col[k] == 10'(int'(p) + r - int'(m)) && xw_data[k] == val(it, r),
                $sformatf("it %0d row %0d: estimate write %0b col %0d data %h", it, r, xw_valid[k], xw_col[k], xw_data[k]));
        end else
          check(!xw_valid[k], $sformatf("it %0d row %0d: no estimate write", it, r));
      end
      if (u_cyc < 0 && base + nf >= int'(m)) u_cyc = cyc;
      last_cyc = cyc;
      @(negedge clk);
      tap_valid = 1'b0; red_valid = 1'b0;
      check(u == held || base + nf > int'(m) || n_uv == 1, "hold register stable before u is complete");
    end
    repeat (4) @(negedge clk);
    check(n_uv == 1, $sformatf("it %0d: %0d u_valid pulses", it, n_uv));
    check(n_done == 1, $sformatf("it %0d: %0d done pulses", it, n_done));
    check(cyc_uv == u_cyc + 2, $sformatf("it %0d: u_valid in cycle %0d, last u row in %0d", it, cyc_uv, u_cyc));
    check(cyc_done == last_cyc + 2 || (cyc_done == cyc_uv + 1 && last_cyc == u_cyc),
          $sformatf("it %0d: done in cycle %0d, last row in %0d", it, cyc_done, last_cyc));
    for (int i = 0; i < int'(m); i++) check(u[i] == val(it, i), $sformatf("it %0d u[%0d] %h", it, i, u[i]));
    for (int i = 0; i < int'(n); i++) check(xhat[i] == val(it, int'(m) + i), $sformatf("it %0d xhat[%0d]", it, i));
  endtask

  initial begin
    rst_n = 1'b0; start = 0; tap_valid = 0; red_valid = 0; red_data = '0;
    for (int i = 1; i < int'(K); i++) node[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mech = MECH_MERGE; glog = 4'd1; m = 8'd1; n = 8'd2; p = 8'd1;   // 3 rows, 2 per cycle, padded
    iteration(1, 1'b0);
    m = 8'd3; n = 8'd3; p = 8'd2;                                     // u spans two cycles
    iteration(2, 1'b0);
    mech = MECH_REDUCE; glog = 4'd0; m = 8'd2; n = 8'd4; p = 8'd3;
    iteration(3, 1'b1);
    iteration(4, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
