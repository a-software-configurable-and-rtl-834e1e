// tb_lqr_system: closed-loop test of the whole platform at its default
// size (64-multiplier coprocessor, 8-state Plant-on-Chip, UART logger).
//
// The Plant-on-Chip is loaded with an inverted pendulum on a cart (cart
// 2.725 kg, pendulum 1.09 kg, friction 0.1 N/m/s, 0.2 m to the centre of
// mass, inertia 0.006 kg m^2), linearised about the upright position and
// discretised with a zero-order hold at 10 ms; it measures cart position and
// pendulum angle (N = 4, M = 1, P = 2). The coprocessor gets
//   T = [ -KG  KGC-K ; (A-BK)G  (A-BK)-(A-BK)GC ]
// with K the discrete LQR gain for Q = diag(100,0,100,0), R = 1 and G the
// steady-state current-estimator gain for process noise 1e-3 I and sensor
// noise 1e-4 I. These constants are rounded to single precision below.
// The pendulum starts at -5 degrees; the coprocessor is started by the
// plant's sensor strobe (auto-start) and answers with u directly.
//
// Checks: after every sample the plant state and the control value are
// compared bit-exactly with a model that repeats the hardware's operation
// order and rounding; the pendulum must be upright within 1 degree after
// 3 s; the first UART frame must carry the logged state; and the
// mechanisms (sensor-started iterations, merge of all five T rows into one
// fetch, estimate feedback, UART transmission, frames dropped while the
// UART is busy) must each have happened.
//
// A second phase then stops the plant and reconfigures the same coprocessor
// over AXI for the largest size it is built for, N = M = P = 128 (T is
// 256 x 256, so every row spans N_g = 4 fetches and the reduction circuit
// is used with all three stages). T and the initial estimate are random;
// two software-started iterations are compared bit-exactly with a model of
// the tree and reduction order, the second one reading the estimate the
// first wrote back, and the cycle counters are checked. Both merge and
// reduce iterations are counted and must have happened.
module tb_lqr_system;
  import fp_ref_pkg::*;
  import lqr_pkg::*;

  localparam int AW = 20;
  localparam int STEPS = 300;
  localparam int CPB = 868;               // default UART divider of the top

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [AW-1:0] c_awaddr, c_araddr, p_awaddr, p_araddr;
  logic c_awvalid, c_awready, c_wvalid, c_wready, c_bvalid, c_bready, c_arvalid, c_arready, c_rvalid, c_rready;
  logic p_awvalid, p_awready, p_wvalid, p_wready, p_bvalid, p_bready, p_arvalid, p_arready, p_rvalid, p_rready;
  logic [31:0] c_wdata, c_rdata, p_wdata, p_rdata;
  logic [1:0] c_bresp, c_rresp, p_bresp, p_rresp;
  logic busy, done, step, txd;

  lqr_system dut (
    .clk(clk), .rst_n(rst_n),
    .c_awaddr(c_awaddr), .c_awvalid(c_awvalid), .c_awready(c_awready), .c_wdata(c_wdata), .c_wstrb(4'hF),
    .c_wvalid(c_wvalid), .c_wready(c_wready), .c_bresp(c_bresp), .c_bvalid(c_bvalid), .c_bready(c_bready),
    .c_araddr(c_araddr), .c_arvalid(c_arvalid), .c_arready(c_arready), .c_rdata(c_rdata), .c_rresp(c_rresp),
    .c_rvalid(c_rvalid), .c_rready(c_rready),
    .p_awaddr(p_awaddr), .p_awvalid(p_awvalid), .p_awready(p_awready), .p_wdata(p_wdata), .p_wstrb(4'hF),
    .p_wvalid(p_wvalid), .p_wready(p_wready), .p_bresp(p_bresp), .p_bvalid(p_bvalid), .p_bready(p_bready),
    .p_araddr(p_araddr), .p_arvalid(p_arvalid), .p_arready(p_arready), .p_rdata(p_rdata), .p_rresp(p_rresp),
    .p_rvalid(p_rvalid), .p_rready(p_rready),
    .ctl_busy_o(busy), .ctl_done_o(done), .plant_step_o(step), .uart_txd_o(txd));

  // pendulum model, single precision
  localparam logic [31:0] PA [4][4] = '{
    '{32'h3f800000, 32'h3c23cfb3, 32'h392c6245, 32'h351313b6},
    '{32'h00000000, 32'h3f7fe90f, 32'h3d06bb49, 32'h392c6245},
    '{32'h00000000, 32'hb7011a31, 32'h3f805e48, 32'h3c23ff42},
    '{32'h00000000, 32'hbac9ceaa, 32'h3f1361ca, 32'h3f805e48}};
  localparam logic [31:0] PB [4] = '{32'h3792d0e4, 32'h3b656a0a, 32'h38a160be, 32'h3c7c4255};
  localparam logic [31:0] PC [2][4] = '{
    '{32'h3f800000, 32'h00000000, 32'h00000000, 32'h00000000},
    '{32'h00000000, 32'h00000000, 32'h3f800000, 32'h00000000}};
  localparam logic [31:0] TT [5][6] = '{
    '{32'h41945df4, 32'hc2d65c63, 32'hc1162981, 32'h412b67fa, 32'h4118bedf, 32'hc155a964},
    '{32'h3f6d0d32, 32'hbb15fa72, 32'h3d97ea81, 32'h3c26e21c, 32'h3a4310ae, 32'hb9747ed3},
    '{32'h3f71366e, 32'hbecaee87, 32'hbf6900d3, 32'h3f84c160, 32'h3db32305, 32'hbd3ecca5},
    '{32'h3a562ed6, 32'h3f6ca7e4, 32'hb8eb1f4e, 32'h3a5615ec, 32'h3d914263, 32'h3c13293a},
    '{32'h3e6a179c, 32'h3e23fa21, 32'hbdb35309, 32'h3e275326, 32'hbf8b386d, 32'h3f4c1a09}};

  int checks = 0, failures = 0;
  int n_sensor_start = 0, n_u = 0, n_steps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- AXI4-Lite masters ----------------
  task automatic c_write(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    c_awaddr = {a, 2'b00}; c_wdata = d; c_awvalid = 1; c_wvalid = 1;
    do @(posedge clk); while (!c_awready);
    @(negedge clk);
    c_awvalid = 0; c_wvalid = 0; c_bready = 1;
    while (!c_bvalid) @(negedge clk);
    @(negedge clk);
    c_bready = 0;
  endtask
  task automatic p_write(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    p_awaddr = {a, 2'b00}; p_wdata = d; p_awvalid = 1; p_wvalid = 1;
    do @(posedge clk); while (!p_awready);
    @(negedge clk);
    p_awvalid = 0; p_wvalid = 0; p_bready = 1;
    while (!p_bvalid) @(negedge clk);
    @(negedge clk);
    p_bready = 0;
  endtask
  task automatic c_read(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    c_araddr = {a, 2'b00}; c_arvalid = 1;
    do @(posedge clk); while (!c_arready);
    @(negedge clk);
    c_arvalid = 0; c_rready = 1;
    while (!c_rvalid) @(negedge clk);
    d = c_rdata;
    @(negedge clk);
    c_rready = 0;
  endtask

  function automatic logic [31:0] fm(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction
  function automatic logic [31:0] fa(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  // ---------------- reference closed loop ----------------
  logic [31:0] mx [4];       // plant state
  logic [31:0] my [2];
  logic [31:0] mu;
  logic [31:0] mxh [4];      // controller estimate

  task automatic model_sense();
    for (int i = 0; i < 2; i++) begin
      logic [31:0] acc;
      acc = 32'h0;
      for (int j = 0; j < 4; j++) acc = fa(acc, fm(PC[i][j], mx[j]));
      my[i] = acc;
    end
  endtask

  task automatic model_control();
    logic [31:0] v [6];
    logic [31:0] r [5];
    v[0] = my[0]; v[1] = my[1];
    for (int i = 0; i < 4; i++) v[2 + i] = mxh[i];
    for (int row = 0; row < 5; row++) begin
      logic [31:0] h [16];
      for (int j = 0; j < 8; j++) h[8 + j] = (j < 6) ? fm(TT[row][j], v[j]) : 32'h0;
      for (int i = 7; i >= 1; i--) h[i] = fa(h[2*i], h[2*i+1]);
      r[row] = h[1];
    end
    mu = r[0];
    for (int i = 0; i < 4; i++) mxh[i] = r[1 + i];
  endtask

  task automatic model_update();
    logic [31:0] xn [4];
    for (int i = 0; i < 4; i++) begin
      logic [31:0] acc;
      acc = 32'h0;
      for (int j = 0; j < 4; j++) acc = fa(acc, fm(PA[i][j], mx[j]));
      acc = fa(acc, fm(PB[i], mu));
      xn[i] = acc;
    end
    mx = xn;
  endtask

  // ---------------- reduce phase model ----------------
  localparam int RN = 128, RL = 256, RC = 256, RK = 64, RG = 4;
  logic [31:0] RT [RL][RC];
  logic [31:0] rv_vec [RC];
  int n_merge_it = 0, n_reduce_it = 0;

  function automatic logic [31:0] r_tree(input int r, input int c0);
    logic [31:0] h [2*RK];
    for (int j = 0; j < RK; j++) h[RK + j] = fm(RT[r][c0 + j], rv_vec[c0 + j]);
    for (int i = RK - 1; i >= 1; i--) h[i] = fa(h[2*i], h[2*i+1]);
    return h[1];
  endfunction

  function automatic logic [31:0] r_row(input int r);
    logic [31:0] acc;
    acc = r_tree(r, 0);
    for (int g = 1; g < RG; g++) acc = fa(acc, r_tree(r, g * RK));
    return acc;
  endfunction

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n && dut.y_valid && !dut.ctl_busy_o && dut.i_ctl.auto_start) n_sensor_start++;
    if (rst_n && dut.u_valid) n_u++;
    if (rst_n && dut.ctl_done_o) begin
      if (dut.i_ctl.cfg.mech == MECH_REDUCE) n_reduce_it++;
      else n_merge_it++;
    end
  end

  // UART receiver for the first frame (sync byte and the first two state words)
  logic [7:0] rx_bytes [$];
  initial begin
    wait (rst_n === 1'b1);
    repeat (9) begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        b[k] = txd;
        repeat (CPB) @(posedge clk);
      end
      rx_bytes.push_back(b);
    end
  end

  logic [31:0] first_logged [2];

  initial begin
    logic [31:0] rv;
    rst_n = 0;
    {c_awvalid, c_wvalid, c_bready, c_arvalid, c_rready} = '0;
    {p_awvalid, p_wvalid, p_bready, p_arvalid, p_rready} = '0;
    c_awaddr = '0; c_araddr = '0; c_wdata = '0; p_awaddr = '0; p_araddr = '0; p_wdata = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // plant
    p_write(18'd1, 4); p_write(18'd2, 1); p_write(18'd3, 2); p_write(18'd4, 0);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      p_write({2'd1, 2'd0, 6'd0, 4'(i), 4'(j)}, PA[i][j]);
    for (int i = 0; i < 4; i++) p_write({2'd1, 2'd1, 6'd0, 4'(i), 4'd0}, PB[i]);
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++)
      p_write({2'd1, 2'd2, 6'd0, 4'(i), 4'(j)}, PC[i][j]);
    mx[0] = 32'h0; mx[1] = 32'h0; mx[2] = real_to_f32(-5.0 * 3.14159265358979 / 180.0); mx[3] = 32'h0;
    for (int i = 0; i < 4; i++) p_write({2'd1, 2'd3, 10'd0, 4'(i)}, mx[i]);

    // controller: c = 6 columns -> 8-leaf groups, 8 rows per fetch: one fetch
    c_write({2'(RGN_REGS), 8'd0, REG_N}, 4);
    c_write({2'(RGN_REGS), 8'd0, REG_M}, 1);
    c_write({2'(RGN_REGS), 8'd0, REG_P}, 2);
    c_write({2'(RGN_REGS), 8'd0, REG_MECH}, {16'b0, 8'd1, 4'd3, 3'b0, 1'b0});
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 8; j++)
        c_write({2'(RGN_T), 6'(k * 8 + j), 10'd0}, (k < 5 && j < 6) ? TT[k][j] : 32'h0);
    for (int i = 0; i < 4; i++) begin
      mxh[i] = 32'h0;
      c_write({2'(RGN_XHAT), 8'd0, 8'(i)}, 32'h0);
    end
    c_write({2'(RGN_REGS), 8'd0, REG_CTRL}, 32'h2);   // start on every sensor strobe
    p_write(18'd0, 1);                                 // run the plant

    for (int k = 0; k < STEPS; k++) begin
      model_sense();
      model_control();
      model_update();
      @(posedge clk iff step);
      n_steps++;
      #1;
      check(dut.i_ctl.u_o[0] === mu, $sformatf("step %0d: u %h expected %h", k, dut.i_ctl.u_o[0], mu));
      for (int i = 0; i < 4; i++)
        check(dut.x_plant[i] === mx[i], $sformatf("step %0d: x[%0d] %h expected %h", k, i, dut.x_plant[i], mx[i]));
      if (k == 0) begin
        first_logged[0] = dut.x_plant[0];
        first_logged[1] = dut.x_plant[1];
      end
      if (k % 50 == 0)
        $display("t=%0.2f s  cart %8.4f m  angle %8.3f deg  u %8.3f N", (k + 1) * 0.01,
                 f32_to_real(mx[0]), f32_to_real(mx[2]) * 180.0 / 3.14159265358979, f32_to_real(mu));
    end
    p_write(18'd0, 0);

    check(f32_to_real(mx[2]) * 180.0 / 3.14159265358979 < 1.0 &&
          f32_to_real(mx[2]) * 180.0 / 3.14159265358979 > -1.0, "pendulum upright within 1 degree after 3 s");
    check(f32_to_real(mx[0]) < 0.2 && f32_to_real(mx[0]) > -0.2, "cart within 0.2 m");
    c_read({2'(RGN_REGS), 8'd0, REG_ITER}, rv);
    check(int'(rv) >= STEPS, $sformatf("iterations counted: %0d", rv));
    c_read({2'(RGN_REGS), 8'd0, REG_CYC_U}, rv);
    // one fetch: u ready 3 + 0 + (1 + L_M + 3 L_A) cycles after the sensor strobe
    check(int'(rv) == 3 + 1 + 6 + 3 * 11, $sformatf("cycles to u: %0d", rv));

    wait (rx_bytes.size() == 9);
    check(rx_bytes[0] == 8'hA5, "UART sync byte");
    check({rx_bytes[4], rx_bytes[3], rx_bytes[2], rx_bytes[1]} == first_logged[0], "UART word 0");
    check({rx_bytes[8], rx_bytes[7], rx_bytes[6], rx_bytes[5]} == first_logged[1], "UART word 1");
    check(dut.log_dropped > 0, "snapshots dropped while the UART was busy");
    check(n_sensor_start >= STEPS, $sformatf("sensor-started iterations: %0d", n_sensor_start));
    check(n_u >= STEPS, $sformatf("control outputs: %0d", n_u));
    check(dut.i_ctl.cfg.glog == 4'd3 && dut.i_ctl.cfg.mech == MECH_MERGE, "merge of 8 rows per fetch in use");

    // ---------------- reduce phase: N = M = P = 128 ----------------
    c_write({2'(RGN_REGS), 8'd0, REG_CTRL}, 32'h0);
    c_write({2'(RGN_REGS), 8'd0, REG_N}, RN);
    c_write({2'(RGN_REGS), 8'd0, REG_M}, RN);
    c_write({2'(RGN_REGS), 8'd0, REG_P}, RN);
    c_write({2'(RGN_REGS), 8'd0, REG_MECH}, {16'b0, 8'(RG), 4'd0, 3'b0, 1'b1});
    for (int r = 0; r < RL; r++)
      for (int col = 0; col < RC; col++) RT[r][col] = rand_f32(118, 122);
    for (int r = 0; r < RL; r++)
      for (int g = 0; g < RG; g++)
        for (int j = 0; j < RK; j++)
          c_write({2'(RGN_T), 6'(j), 10'(r * RG + g)}, RT[r][g * RK + j]);
    for (int i = 0; i < RN; i++) begin
      rv_vec[RN + i] = rand_f32(125, 127);
      c_write({2'(RGN_XHAT), 8'd0, 8'(i)}, rv_vec[RN + i]);
    end
    for (int it = 0; it < 2; it++) begin
      logic [31:0] exp_r [RL];
      for (int i = 0; i < RN; i++) rv_vec[i] = dut.y_ctl[i];
      for (int r = 0; r < RL; r++) exp_r[r] = r_row(r);
      c_write({2'(RGN_REGS), 8'd0, REG_CTRL}, 32'h1);
      @(posedge clk iff done);
      #1;
      for (int i = 0; i < RN; i++)
        check(dut.i_ctl.u_o[i] === exp_r[i], $sformatf("reduce it %0d: u[%0d] %h expected %h", it, i, dut.i_ctl.u_o[i], exp_r[i]));
      for (int i = 0; i < RN; i += 9) begin
        c_read({2'(RGN_XHAT), 8'd0, 8'(i)}, rv);
        check(rv === exp_r[RN + i], $sformatf("reduce it %0d: xhat[%0d] %h expected %h", it, i, rv, exp_r[RN + i]));
      end
      c_read({2'(RGN_REGS), 8'd0, REG_CYC_U}, rv);
      // u ready after fetch (M-1)*N_g, then 1 + L_M + D L_A + (N_g-1)(L_A+2)
      check(int'(rv) == 3 + (RN - 1) * RG + 1 + 6 + 6 * 11 + (RG - 1) * 13, $sformatf("reduce cycles to u: %0d", rv));
      c_read({2'(RGN_REGS), 8'd0, REG_CYC_END}, rv);
      check(int'(rv) == 3 + (RL - 1) * RG + 1 + 6 + 6 * 11 + (RG - 1) * 13, $sformatf("reduce cycles to done: %0d", rv));
      for (int i = 0; i < RN; i++) rv_vec[RN + i] = exp_r[RN + i];
    end
    check(n_merge_it >= STEPS, $sformatf("merge iterations: %0d", n_merge_it));
    check(n_reduce_it == 2, $sformatf("reduce iterations: %0d", n_reduce_it));
    $display("mechanisms: sensor_start=%0d u_valid=%0d steps=%0d uart_bytes=%0d dropped=%0d merge_it=%0d reduce_it=%0d",
             n_sensor_start, n_u, n_steps, rx_bytes.size(), dut.log_dropped, n_merge_it, n_reduce_it);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
