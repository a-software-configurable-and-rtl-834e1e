// tb_plant_on_chip: self-checking testbench for the Plant-on-Chip
// (up to 4 states, 2 inputs, 2 outputs; L_M = 2, L_A = 3). A random
// 3-state, 2-input, 2-output plant and initial state are written over
// AXI4-Lite. The testbench acts as the controller: at every sensor strobe
// it checks y = C x, holds back u for a while (the plant must wait), then
// returns a random u; at every step pulse it checks x' = A x + B u. Both are
// compared bit-exactly with the plant's accumulation order
// (((0 + a0 x0) + a1 x1) + ... + b0 u0 + ...). Sensor strobes must be
// PERIOD cycles apart, and the step counter and state must read back.
module tb_plant_on_chip;
  import fp_ref_pkg::*;

  localparam int NS = 4, NI = 2, NO = 2, LM = 2, LA = 3, AW = 20;
  localparam int N = 3, M = 2, P = 2, PERIOD = 400, STEPS = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic [31:0] y [NO];
  logic [31:0] u [NI];
  logic [31:0] x [NS];
  logic [31:0] ul [NI];
  logic y_valid, u_valid, step;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  plant_on_chip #(.NS_MAX(NS), .NI_MAX(NI), .NO_MAX(NO), .LAT_MUL(LM), .LAT_ADD(LA), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(4'hF),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .y_o(y), .y_valid_o(y_valid), .u_i(u), .u_valid_i(u_valid), .x_o(x), .u_latched_o(ul), .step_o(step));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic axi_write(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = {a, 2'b00}; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask
  task automatic axi_read(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = {a, 2'b00}; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0; rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  function automatic logic [31:0] fm(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction
  function automatic logic [31:0] fa(input logic [31:0] a, input logic [31:0] b);
    return real_to_f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  logic [31:0] A [N][N];
  logic [31:0] B [N][M];
  logic [31:0] C [P][N];
  logic [31:0] mx [N];

  initial begin
    logic [31:0] v;
    int last_y;
    rst_n = 0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; araddr = '0; wdata = '0; u_valid = 0;
    for (int i = 0; i < NI; i++) u[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    axi_write(18'd1, N); axi_write(18'd2, M); axi_write(18'd3, P); axi_write(18'd4, PERIOD);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = rand_f32(124, 127);
      axi_write({2'd1, 2'd0, 6'd0, 4'(i), 4'(j)}, A[i][j]);
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      B[i][j] = rand_f32(124, 127);
      axi_write({2'd1, 2'd1, 6'd0, 4'(i), 4'(j)}, B[i][j]);
    end
    for (int i = 0; i < P; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = rand_f32(124, 127);
      axi_write({2'd1, 2'd2, 6'd0, 4'(i), 4'(j)}, C[i][j]);
    end
    for (int i = 0; i < N; i++) begin
      mx[i] = rand_f32(125, 127);
      axi_write({2'd1, 2'd3, 10'd0, 4'(i)}, mx[i]);
    end
    axi_read({2'd1, 2'd3, 10'd0, 4'd1}, v);
    check(v == mx[1], "state read-back");
    axi_write(18'd0, 1);
    last_y = -1;
    for (int k = 0; k < STEPS; k++) begin
      logic [31:0] uu [M];
      @(posedge clk iff y_valid);
      #1;
      if (last_y >= 0) check(cyc - last_y == PERIOD, $sformatf("sample spacing %0d", cyc - last_y));
      last_y = cyc;
      for (int i = 0; i < P; i++) begin
        logic [31:0] acc;
        acc = 32'h0;
        for (int j = 0; j < N; j++) acc = fa(acc, fm(C[i][j], mx[j]));
        check(y[i] === acc, $sformatf("step %0d y[%0d] %h expected %h", k, i, y[i], acc));
      end
      repeat (30) @(negedge clk);
      check(!step, "plant waits for u");
      for (int i = 0; i < M; i++) begin
        uu[i] = rand_f32(124, 127);
        u[i] = uu[i];
      end
      u_valid = 1;
      @(negedge clk);
      u_valid = 0;
      for (int i = 0; i < M; i++) u[i] = 32'h0;
      begin
        logic [31:0] xn [N];
        for (int i = 0; i < N; i++) begin
          logic [31:0] acc;
          acc = 32'h0;
          for (int j = 0; j < N; j++) acc = fa(acc, fm(A[i][j], mx[j]));
          for (int j = 0; j < M; j++) acc = fa(acc, fm(B[i][j], uu[j]));
          xn[i] = acc;
        end
        mx = xn;
      end
      @(posedge clk iff step);
      #1;
      for (int i = 0; i < N; i++) check(x[i] === mx[i], $sformatf("step %0d x[%0d] %h expected %h", k, i, x[i], mx[i]));
      for (int i = 0; i < M; i++) check(ul[i] === uu[i], "latched input");
    end
    axi_write(18'd0, 0);
    axi_read(18'd5, v);
    check(v == STEPS, $sformatf("step counter %0d", v));
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
