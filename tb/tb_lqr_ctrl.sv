// tb_lqr_ctrl: self-checking testbench for the controller FSM (tree depth
// 3, configured latencies L_M = 2, L_A = 3). For merge and reduce
// configurations it checks the number of fetches (ceil((M+N)/N_f) or
// (M+N)*N_g), that they are issued on consecutive cycles starting one cycle
// after start, their addresses (base + offset), the group sequence, and
// that the result strobes follow each fetch by exactly 1 + L_M + glog*L_A
// (merge tap) or 1 + L_M + depth*L_A (root, with "first" on group 0), and
// that busy stays high until the output block reports done.
module tb_lqr_ctrl;
  import lqr_pkg::*;

  localparam int unsigned DEPTH = 3, TDEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, out_done, busy, rd_en, tap_valid, red_valid, red_first;
  logic [5:0] rd_addr;
  logic [7:0] rd_group;
  lqr_cfg_t cfg;
  int checks = 0, failures = 0;
  int cyc = 0;

  lqr_ctrl #(.DEPTH(DEPTH), .TDEPTH(TDEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg), .out_done(out_done), .busy(busy),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_group(rd_group), .tap_valid(tap_valid),
    .red_valid(red_valid), .red_first(red_first));

  int fetch_cyc [$];
  int fetch_grp [$];
  int tap_cyc [$];
  int red_cyc [$];
  int first_cyc [$];
  int addr_seen [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && rd_en) begin
      fetch_cyc.push_back(cyc);
      fetch_grp.push_back(int'(rd_group));
      addr_seen.push_back(int'(rd_addr));
    end
    if (rst_n && tap_valid) tap_cyc.push_back(cyc);
    if (rst_n && red_valid) red_cyc.push_back(cyc);
    if (rst_n && red_valid && red_first) first_cyc.push_back(cyc);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int n, input int m, input mech_e mech, input int glog, input int ng, input int base);
    int l, nf, fetches, start_cyc, d;
    l = n + m;
    nf = (mech == MECH_MERGE) ? (1 << (int'(DEPTH) - glog)) : 1;
    fetches = (mech == MECH_MERGE) ? (l + nf - 1) / nf : l * ng;
    d = (mech == MECH_MERGE) ? 1 + 2 + glog * 3 : 1 + 2 + int'(DEPTH) * 3;
    fetch_cyc.delete(); fetch_grp.delete(); tap_cyc.delete(); red_cyc.delete(); first_cyc.delete(); addr_seen.delete();
    @(negedge clk);
    cfg.n = 8'(n); cfg.m = 8'(m); cfg.p = 8'd1; cfg.mech = mech; cfg.glog = 4'(glog); cfg.ng = 8'(ng);
    cfg.t_base = 16'(base);
    start = 1'b1;
    start_cyc = cyc;
    @(negedge clk);
    start = 1'b0;
    cfg.n = 8'd99;                        // sampled at start: later changes must not matter
    repeat (fetches + d + 10) @(negedge clk);
    check(busy, "busy until the output block is done");
    out_done = 1'b1;
    @(negedge clk);
    out_done = 1'b0;
    @(negedge clk);
    check(!busy, "idle after done");
    check(fetch_cyc.size() == fetches, $sformatf("%0d fetches, expected %0d", fetch_cyc.size(), fetches));
    foreach (fetch_cyc[i]) begin
      check(fetch_cyc[i] == start_cyc + 1 + i, $sformatf("fetch %0d in cycle %0d", i, fetch_cyc[i]));
      check(addr_seen[i] == (base + i) % int'(TDEPTH), $sformatf("fetch %0d address %0d", i, addr_seen[i]));
      check(fetch_grp[i] == ((mech == MECH_REDUCE) ? i % ng : 0), $sformatf("fetch %0d group %0d", i, fetch_grp[i]));
    end
    if (mech == MECH_MERGE) begin
      check(tap_cyc.size() == fetches && red_cyc.size() == 0, "merge strobes only");
      foreach (tap_cyc[i]) check(tap_cyc[i] == fetch_cyc[i] + d, $sformatf("tap strobe %0d at +%0d", i, tap_cyc[i] - fetch_cyc[i]));
    end else begin
      check(red_cyc.size() == fetches && tap_cyc.size() == 0, "reduce strobes only");
      foreach (red_cyc[i]) check(red_cyc[i] == fetch_cyc[i] + d, $sformatf("root strobe %0d at +%0d", i, red_cyc[i] - fetch_cyc[i]));
      check(first_cyc.size() == l, "one first flag per row");
      foreach (first_cyc[i]) check(first_cyc[i] == fetch_cyc[i * ng] + d, "first flag on group 0");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 0; out_done = 0;
    cfg = '0; cfg.depth = 4'(DEPTH); cfg.lat_mul = 5'd2; cfg.lat_add = 5'd3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(3, 2, MECH_MERGE, 2, 1, 0);     // N_f = 2: 3 fetches
    run(2, 1, MECH_MERGE, 1, 1, 5);     // N_f = 4: 1 fetch, base 5
    run(4, 4, MECH_MERGE, 3, 1, 0);     // N_f = 1: 8 fetches
    run(2, 1, MECH_REDUCE, 0, 3, 60);   // N_g = 3: 9 fetches, address wraps
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
