// tb_lqr_coprocessor: end-to-end test of the LQR coprocessor through its
// AXI4-Lite port and its direct plant connection, at reduced size
// (8 multipliers, L_M = 3, L_A = 4).
//
// For each configuration (N, M, P) the testbench acts as the driver
// software: it chooses merge (with the resulting N_f) or reduce (with N_g)
// by the rules of the architecture, writes the configuration registers, lays
// out a random T in the per-multiplier BRAMs by the memory map, writes
// xhat_0 and then runs several iterations, started by software or by the
// sensor strobe. After each iteration it compares u (hold register port and
// register read-back) and xhat_{k+1} bit-exactly with a model that forms
// every product and tree sum in the same order and rounding as the
// hardware, and checks the cycle counts from start to u ready and to done
// against the pipeline formula. The mechanisms exercised are counted and
// each must have occurred.
module tb_lqr_coprocessor;
  import fp_ref_pkg::*;
  import lqr_pkg::*;

  localparam int unsigned DEPTH = 3, LM = 3, LA = 4;
  localparam int unsigned N_MAX = 16, M_MAX = 8, P_MAX = 8, TDEPTH = 128;
  localparam int unsigned K = 1 << DEPTH;
  localparam int unsigned AW = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic [31:0] y [P_MAX];
  logic y_valid;
  logic [31:0] u [M_MAX];
  logic u_valid, busy, done;

  lqr_coprocessor #(.DEPTH(DEPTH), .LAT_MUL(LM), .LAT_ADD(LA), .N_MAX(N_MAX), .M_MAX(M_MAX),
                    .P_MAX(P_MAX), .TDEPTH(TDEPTH), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(4'hF), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .y_i(y), .y_valid_i(y_valid), .u_o(u), .u_valid_o(u_valid), .busy_o(busy), .done_o(done));

  int checks = 0, failures = 0;
  int n_merge_multi = 0, n_merge_single = 0, n_reduce = 0, n_feedback = 0, n_auto = 0, n_u_pulse = 0;

  always @(posedge clk) if (u_valid) n_u_pulse++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [17:0] waddr, input logic [31:0] d);
    @(negedge clk);
    awaddr = {waddr, 2'b00}; wdata = d; awvalid = 1'b1; wvalid = 1'b1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    bready = 1'b1;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [17:0] raddr, output logic [31:0] d);
    @(negedge clk);
    araddr = {raddr, 2'b00}; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    rready = 1'b1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

  function automatic logic [17:0] reg_a(input logic [7:0] idx);
    return {2'(RGN_REGS), 8'b0, idx};
  endfunction

  // ---------------- reference model ----------------
  function automatic logic [31:0] fm(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction
  function automatic logic [31:0] fa(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  logic [31:0] T [24][32];      // rows x columns, sized for the largest case
  logic [31:0] xh [N_MAX];
  logic [31:0] yv [P_MAX];

  // sum of products of row r over columns [c0, c0+w) by a pairwise tree
  function automatic logic [31:0] tree_sum(input int r, input int c0, input int w, input int c, input int p);
    logic [31:0] h [64];
    for (int j = 0; j < w; j++) begin
      int col;
      logic [31:0] v;
      col = c0 + j;
      v = (col < p) ? yv[col] : (col < c) ? xh[col - p] : 32'h0;
      h[w + j] = (col < c) ? fm(T[r][col], v) : 32'h0;
    end
    for (int i = w - 1; i >= 1; i--) h[i] = fa(h[2*i], h[2*i+1]);
    return h[1];
  endfunction

  function automatic logic [31:0] row_value(input int r, input bit red, input int g, input int ng, input int c, input int p);
    logic [31:0] acc;
    if (!red) return tree_sum(r, 0, 1 << g, c, p);
    acc = tree_sum(r, 0, K, c, p);
    for (int k = 1; k < ng; k++) acc = fa(acc, tree_sum(r, k * K, K, c, p));
    return acc;
  endfunction

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // ---------------- one configuration ----------------
  task automatic run_cfg(input int n, input int m, input int p, input int iters, input bit use_auto);
    int c, l, g, nf, ng, fetches, d_lat, f_u, f_last, exp_u, exp_end;
    bit red;
    logic [31:0] rv;
    logic [31:0] exp_u_v [M_MAX];
    logic [31:0] exp_x [N_MAX];
    c = n + p;
    l = m + n;
    g = clog2i(c);
    red = (g > int'(DEPTH));
    nf = red ? 1 : (1 << (int'(DEPTH) - g));
    ng = red ? (c + int'(K) - 1) / int'(K) : 1;
    fetches = red ? l * ng : (l + nf - 1) / nf;
    $display("config N=%0d M=%0d P=%0d: %s, N_f=%0d N_g=%0d, %0d fetches", n, m, p,
             red ? "reduce" : "merge", nf, ng, fetches);

    for (int r = 0; r < l; r++)
      for (int col = 0; col < c; col++) T[r][col] = rand_f32(125, 127);

    axi_write(reg_a(REG_N), 32'(n));
    axi_write(reg_a(REG_M), 32'(m));
    axi_write(reg_a(REG_P), 32'(p));
    axi_write(reg_a(REG_DEPTH), DEPTH);
    axi_write(reg_a(REG_LAT_ADD), LA);
    axi_write(reg_a(REG_LAT_MUL), LM);
    axi_write(reg_a(REG_MECH), {16'b0, 8'(ng), 4'(red ? 0 : g), 3'b0, red});
    axi_write(reg_a(REG_T_BASE), 32'd0);
    axi_read(reg_a(REG_MECH), rv);
    check(rv == {16'b0, 8'(ng), 4'(red ? 0 : g), 3'b0, red}, "MECH register read-back");

    // memory map of T
    if (!red) begin
      int G;
      G = 1 << g;
      for (int f = 0; f < fetches; f++)
        for (int k = 0; k < nf; k++)
          for (int j = 0; j < G; j++) begin
            int r;
            r = k + f * nf;
            axi_write({2'(RGN_T), 16'((k * G + j) * TDEPTH + f)},
                      (r < l && j < c) ? T[r][j] : 32'h0);
          end
    end else begin
      for (int r = 0; r < l; r++)
        for (int k = 0; k < ng; k++)
          for (int j = 0; j < int'(K); j++)
            axi_write({2'(RGN_T), 16'(j * TDEPTH + r * ng + k)},
                      (j + k * int'(K) < c) ? T[r][j + k * int'(K)] : 32'h0);
    end

    // initial estimate
    for (int i = 0; i < n; i++) begin
      xh[i] = rand_f32(125, 127);
      axi_write({2'(RGN_XHAT), 8'b0, 8'(i)}, xh[i]);
    end
    if (use_auto) axi_write(reg_a(REG_CTRL), 32'h2);
    else          axi_write(reg_a(REG_CTRL), 32'h0);

    d_lat  = red ? 1 + int'(LM) + int'(DEPTH) * int'(LA) + (ng - 1) * int'(LA + 2)
                 : 1 + int'(LM) + g * int'(LA);
    f_u    = red ? (m - 1) * ng : (m - 1) / nf;
    f_last = red ? (l - 1) * ng : (l - 1) / nf;
    exp_u  = 3 + f_u + d_lat;
    exp_end = 3 + f_last + d_lat;
    if (f_last == f_u) exp_end = exp_u + 1;

    for (int it = 0; it < iters; it++) begin
      int pulses0;
      for (int i = 0; i < p; i++) yv[i] = rand_f32(125, 127);
      // expected results
      for (int r = 0; r < l; r++) begin
        logic [31:0] v;
        v = row_value(r, red, g, ng, c, p);
        if (r < m) exp_u_v[r] = v; else exp_x[r - m] = v;
      end
      pulses0 = n_u_pulse;
      @(negedge clk);
      for (int i = 0; i < int'(P_MAX); i++) y[i] = (i < p) ? yv[i] : 32'h0;
      if (use_auto) begin
        y_valid = 1'b1;
        @(negedge clk);
        y_valid = 1'b0;
        n_auto++;
      end else begin
        axi_write(reg_a(REG_CTRL), 32'h1);
      end
      // wait for done
      while (!done) @(negedge clk);
      @(negedge clk);
      check(n_u_pulse == pulses0 + 1, "one u_valid pulse per iteration");
      for (int i = 0; i < m; i++) begin
        check(u[i] === exp_u_v[i], $sformatf("u[%0d] port: got %h expected %h", i, u[i], exp_u_v[i]));
        axi_read({2'(RGN_U), 8'b0, 8'(i)}, rv);
        check(rv === exp_u_v[i], $sformatf("u[%0d] read-back: got %h expected %h", i, rv, exp_u_v[i]));
      end
      for (int i = 0; i < n; i++) begin
        axi_read({2'(RGN_XHAT), 8'b0, 8'(i)}, rv);
        check(rv === exp_x[i], $sformatf("xhat[%0d]: got %h expected %h", i, rv, exp_x[i]));
      end
      axi_read(reg_a(REG_CYC_U), rv);
      check(int'(rv) == exp_u, $sformatf("cycles to u: got %0d expected %0d", rv, exp_u));
      axi_read(reg_a(REG_CYC_END), rv);
      check(int'(rv) == exp_end, $sformatf("cycles to done: got %0d expected %0d", rv, exp_end));
      axi_read(reg_a(REG_STATUS), rv);
      check(rv[2:0] == 3'b110, $sformatf("status after iteration: %h", rv));
      // feed the estimate forward
      for (int i = 0; i < n; i++) xh[i] = exp_x[i];
      if (it > 0) n_feedback++;
      if (red) n_reduce++;
      else if (nf > 1) n_merge_multi++;
      else n_merge_single++;
    end
    axi_write(reg_a(REG_CTRL), 32'h0);
  endtask

  initial begin
    rst_n = 1'b0;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = '0; araddr = '0; wdata = '0;
    y_valid = 1'b0;
    for (int i = 0; i < int'(P_MAX); i++) y[i] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    begin
      logic [31:0] rv;
      axi_read(reg_a(REG_LAT_ADD), rv);
      check(rv == LA, "adder latency resets to the built value");
      axi_read(reg_a(REG_DEPTH), rv);
      check(rv == DEPTH, "depth resets to the built value");
    end
    run_cfg(1, 1, 1, 3, 1'b0);    // c=2: merge, 4 rows per fetch
    run_cfg(2, 1, 1, 3, 1'b1);    // c=3: merge, 2 rows per fetch, sensor-started
    run_cfg(4, 1, 2, 3, 1'b1);    // pendulum sizes, c=6: 1 row per fetch
    run_cfg(4, 4, 4, 2, 1'b0);    // c=8: normal mode
    run_cfg(8, 4, 8, 3, 1'b0);    // c=16: reduce, N_g=2
    run_cfg(16, 8, 8, 2, 1'b1);   // c=24: reduce, N_g=3
    check(n_merge_multi > 0, "merge with several rows per fetch happened");
    check(n_merge_single > 0, "one row per fetch happened");
    check(n_reduce > 0, "reduction happened");
    check(n_feedback > 0, "estimate fed back between iterations");
    check(n_auto > 0, "sensor-started iteration happened");
    $display("mechanisms: merge(N_f>1)=%0d single=%0d reduce=%0d feedback=%0d sensor_start=%0d",
             n_merge_multi, n_merge_single, n_reduce, n_feedback, n_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
