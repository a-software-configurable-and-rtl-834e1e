// tb_lqr_regs: self-checking testbench for the configuration register file
// and address decoder. It checks the reset values (depth and latencies as
// built), write and read-back of every configuration field, the decoding of
// T writes into lane and word, of estimate writes into an index, the start
// pulse and auto-start bit, the status flags (done and u-ready set by their
// pulses and cleared by the next start), the iteration counter and the
// read paths for u, xhat and the cycle counters.
module tb_lqr_regs;
  import lqr_pkg::*;

  localparam int unsigned DEPTH = 3, TDEPTH = 32, LM = 5, LA = 7, M_MAX = 4, N_MAX = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, wr_en, rd_en, start, auto_start, t_we, x_we;
  logic [17:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data, t_wdata, x_wdata;
  lqr_cfg_t cfg;
  logic [DEPTH-1:0] t_lane;
  logic [4:0] t_waddr;
  logic [7:0] x_idx;
  logic busy, it_start, it_done, u_pulse, page;
  logic [31:0] cyc_u, cyc_end;
  logic [31:0] u [M_MAX];
  logic [31:0] xh [N_MAX];
  int checks = 0, failures = 0;
  int n_start = 0, n_twe = 0, n_xwe = 0;
  logic [DEPTH-1:0] last_lane;
  logic [4:0] last_taddr;
  logic [31:0] last_tdata, last_xdata;
  logic [7:0] last_xidx;

  lqr_regs #(.DEPTH(DEPTH), .TDEPTH(TDEPTH), .LAT_MUL(LM), .LAT_ADD(LA), .M_MAX(M_MAX), .N_MAX(N_MAX)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data), .cfg(cfg), .start(start),
    .auto_start(auto_start), .t_we(t_we), .t_lane(t_lane), .t_waddr(t_waddr), .t_wdata(t_wdata),
    .x_we(x_we), .x_idx(x_idx), .x_wdata(x_wdata), .busy(busy), .it_start(it_start),
    .it_done(it_done), .u_pulse(u_pulse), .page(page), .cyc_u(cyc_u), .cyc_end(cyc_end),
    .u_i(u), .xhat_i(xh));

  always @(posedge clk) begin
    if (start) n_start++;
    if (t_we) begin n_twe++; last_lane = t_lane; last_taddr = t_waddr; last_tdata = t_wdata; end
    if (x_we) begin n_xwe++; last_xidx = x_idx; last_xdata = x_wdata; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic rd(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    rd_en = 1; rd_addr = a;
    @(negedge clk);
    rd_en = 0;
    d = rd_data;
  endtask

  function automatic logic [17:0] ra(input logic [7:0] i);
    return {2'(RGN_REGS), 8'd0, i};
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk);
    s = 1;
    @(negedge clk);
    s = 0;
  endtask

  initial begin
    logic [31:0] v;
    rst_n = 0; wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    busy = 0; it_start = 0; it_done = 0; u_pulse = 0; page = 0; cyc_u = 32'd123; cyc_end = 32'd456;
    for (int i = 0; i < int'(M_MAX); i++) u[i] = 32'hA000_0000 + 32'(i);
    for (int i = 0; i < int'(N_MAX); i++) xh[i] = 32'hB000_0000 + 32'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(ra(REG_DEPTH), v);   check(v == DEPTH, "depth reset value");
    rd(ra(REG_LAT_MUL), v); check(v == LM, "multiplier latency reset value");
    rd(ra(REG_LAT_ADD), v); check(v == LA, "adder latency reset value");

    wr(ra(REG_N), 7);  wr(ra(REG_M), 3);  wr(ra(REG_P), 5);
    wr(ra(REG_DEPTH), 2); wr(ra(REG_LAT_ADD), 9); wr(ra(REG_LAT_MUL), 4);
    wr(ra(REG_MECH), 32'h0000_0301); wr(ra(REG_T_BASE), 32'd17);
    check(cfg.n == 7 && cfg.m == 3 && cfg.p == 5, "sizes");
    check(cfg.depth == 2 && cfg.lat_add == 9 && cfg.lat_mul == 4, "depth and latencies");
    check(cfg.mech == MECH_REDUCE && cfg.ng == 3 && cfg.glog == 0, "mechanism info");
    check(cfg.t_base == 17, "T base");
    rd(ra(REG_N), v); check(v == 7, "N read-back");
    rd(ra(REG_M), v); check(v == 3, "M read-back");
    rd(ra(REG_P), v); check(v == 5, "P read-back");
    rd(ra(REG_MECH), v); check(v == 32'h0000_0301, $sformatf("MECH read-back %h", v));
    rd(ra(REG_T_BASE), v); check(v == 17, "T base read-back");
    rd(ra(REG_CYC_U), v); check(v == 123, "cycles to u");
    rd(ra(REG_CYC_END), v); check(v == 456, "cycles to done");

    wr({2'(RGN_T), 8'b0, 3'd5, 5'd9}, 32'hCAFE_0001);
    check(n_twe == 1 && last_lane == 5 && last_taddr == 9 && last_tdata == 32'hCAFE_0001, "T write decode");
    wr({2'(RGN_XHAT), 8'b0, 8'd2}, 32'hBEEF_0002);
    check(n_xwe == 1 && last_xidx == 2 && last_xdata == 32'hBEEF_0002, "xhat write decode");
    check(n_twe == 1, "no T write from other regions");

    wr(ra(REG_CTRL), 32'h2);
    check(n_start == 0 && auto_start, "auto-start without start");
    wr(ra(REG_CTRL), 32'h3);
    check(n_start == 1, "start pulse");
    rd(ra(REG_CTRL), v); check(v == 32'h2, "CTRL read-back");

    busy = 1; page = 1;
    pulse(u_pulse);
    rd(ra(REG_STATUS), v); check(v[3:0] == 4'b1101, $sformatf("status after u %h", v));
    pulse(it_done);
    busy = 0;
    rd(ra(REG_STATUS), v); check(v[3:0] == 4'b1110, $sformatf("status after done %h", v));
    rd(ra(REG_ITER), v); check(v == 1, "iteration counter");
    pulse(it_start);
    rd(ra(REG_STATUS), v); check(v[2:1] == 2'b00, "flags cleared by start");

    for (int i = 0; i < int'(M_MAX); i++) begin
      rd({2'(RGN_U), 8'b0, 8'(i)}, v); check(v == u[i], "u read");
    end
    for (int i = 0; i < int'(N_MAX); i++) begin
      rd({2'(RGN_XHAT), 8'b0, 8'(i)}, v); check(v == xh[i], "xhat read");
    end
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
