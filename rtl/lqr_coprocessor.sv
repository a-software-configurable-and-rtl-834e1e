// lqr_coprocessor: software-configurable LQR controller with a Luenberger
// observer, computed as one matrix-vector product per sensor sample:
//   [u_k ; xhat_{k+1}] = T [y_k ; xhat_k],
//   T = [ -KG          KGC - K
//         (A-BK)G      (A-BK) - (A-BK)GC ].
// Software (over the AXI4-Lite port) writes the sizes, the tree depth, the
// arithmetic latencies and the mechanism info into the configuration
// registers, loads T into the per-multiplier BRAMs following the memory map
// of lqr_storage, and writes the initial estimate xhat_0.
//
// An iteration starts when software writes CTRL.start, or on every sensor
// strobe y_valid_i when auto-start is enabled; y_i is sampled then. The
// controller streams one fetch per cycle from the BRAMs into the 2^DEPTH
// multiplier tree. If a T row fits in 2^glog <= 2^DEPTH columns, 2^(DEPTH-
// glog) rows are processed per fetch and read from inner tree nodes (merge);
// if it does not, each row takes N_g fetches whose partial sums the
// reduction circuit adds up (reduce). Rows 0..M-1 form u_k, which is copied
// into the output hold register and announced by u_valid_o as soon as the
// last of them is done; rows M.. are written back as xhat_{k+1}, into the
// second page of the double-buffered estimate so that the next iteration
// reads them. done_o pulses at the end of the iteration.
//
// Timing: u_k is ready about ceil(M/N_f) fetches (merge) or M*N_g fetches
// (reduce) plus the pipeline latency L_M + levels*L_A (+ (N_g-1)(L_A+2))
// after the start, a few cycles of registering included; see the README.
// The cycle counts from start to u ready and to done are readable.
module lqr_coprocessor #(
  parameter int unsigned DEPTH   = 6,      // adder levels; 2^DEPTH multipliers
  parameter int unsigned LAT_MUL = 6,      // multiplier latency L_M
  parameter int unsigned LAT_ADD = 11,     // adder latency L_A
  parameter int unsigned N_MAX   = 128,    // largest number of states
  parameter int unsigned M_MAX   = 128,    // largest number of control outputs
  parameter int unsigned P_MAX   = 128,    // largest number of sensor values
  parameter int unsigned TDEPTH  = 1024,   // words per BRAM
  parameter int unsigned AW      = 20,     // AXI byte address width
  localparam int unsigned K      = 1 << DEPTH,
  localparam int unsigned NW     = (K > 1) ? K / 2 : 1,
  localparam int unsigned XS     = (N_MAX + P_MAX + K - 1) / K,
  localparam int unsigned TA_W   = $clog2(TDEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave (configuration, T, xhat, u)
  input  logic [AW-1:0] s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic [3:0]    s_wstrb,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [AW-1:0] s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // direct connection to the plant
  input  logic [31:0]   y_i [P_MAX],     // sensor vector
  input  logic          y_valid_i,       // new sensor sample
  output logic [31:0]   u_o [M_MAX],     // held control vector
  output logic          u_valid_o,       // u_o updated
  output logic          busy_o,
  output logic          done_o
);
  import lqr_pkg::*;

  // register access
  logic              wr_en, rd_en;
  logic [AW-3:0]     wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  lqr_cfg_t          cfg;
  logic              sw_start, auto_start, start;
  logic              t_we, x_we;
  logic [DEPTH-1:0]  t_lane;
  logic [TA_W-1:0]   t_waddr;
  logic [31:0]       t_wdata, x_wdata;
  logic [7:0]        x_idx;

  // datapath
  logic              busy, rd_en_f, tap_valid, red_valid, red_first, red_out_valid;
  logic [TA_W-1:0]   rd_addr_f;
  logic [7:0]        rd_group;
  logic [31:0]       red_out;
  logic [31:0]       mat [K];
  logic [31:0]       vec [K];
  logic [31:0]       node [1:K-1];
  logic [31:0]       y_q [P_MAX];
  logic              page;
  logic              out_done, u_valid;
  logic              xw_valid_r [NW];
  logic [9:0]        xw_col_r   [NW];
  logic [31:0]       xw_data_r  [NW];
  logic              xw_valid [NW];
  logic [9:0]        xw_col   [NW];
  logic [31:0]       xw_data  [NW];
  logic [31:0]       xhat [N_MAX];
  logic [31:0]       cyc, cyc_u, cyc_end;

  axil_slave #(.AW(AW)) u_axil (
    .clk(clk), .rst_n(rst_n),
    .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  lqr_regs #(.DEPTH(DEPTH), .TDEPTH(TDEPTH), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD),
             .M_MAX(M_MAX), .N_MAX(N_MAX)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .wr_en(wr_en), .wr_addr(18'(wr_addr)), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(18'(rd_addr)), .rd_data(rd_data),
    .cfg(cfg), .start(sw_start), .auto_start(auto_start),
    .t_we(t_we), .t_lane(t_lane), .t_waddr(t_waddr), .t_wdata(t_wdata),
    .x_we(x_we), .x_idx(x_idx), .x_wdata(x_wdata),
    .busy(busy), .it_start(start), .it_done(out_done), .u_pulse(u_valid), .page(page),
    .cyc_u(cyc_u), .cyc_end(cyc_end), .u_i(u_o), .xhat_i(xhat));

  assign start = !busy && (sw_start || (auto_start && y_valid_i));

  // sensor sample register and estimate page
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      page <= 1'b0;
      for (int i = 0; i < int'(P_MAX); i++) y_q[i] <= '0;
    end else begin
      if (start) y_q <= y_i;
      if (out_done) page <= ~page;
    end
  end

  // cycle counters: start to u ready, start to done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc     <= '0;
      cyc_u   <= '0;
      cyc_end <= '0;
    end else begin
      cyc <= start ? 32'd1 : cyc + 32'd1;
      if (u_valid)  cyc_u   <= cyc;
      if (out_done) cyc_end <= cyc;
    end
  end

  lqr_ctrl #(.DEPTH(DEPTH), .TDEPTH(TDEPTH)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg), .out_done(out_done),
    .busy(busy), .rd_en(rd_en_f), .rd_addr(rd_addr_f), .rd_group(rd_group),
    .tap_valid(tap_valid), .red_valid(red_valid), .red_first(red_first));

  // xhat writes: results while busy, software (to the page read next) while idle
  always_comb begin
    for (int w = 0; w < int'(NW); w++) begin
      xw_valid[w] = busy ? xw_valid_r[w] : (w == 0 && x_we);
      xw_col[w]   = busy ? xw_col_r[w]   : 10'(cfg.p) + 10'(x_idx);
      xw_data[w]  = busy ? xw_data_r[w]  : x_wdata;
    end
  end

  lqr_storage #(.DEPTH(DEPTH), .TDEPTH(TDEPTH), .XS(XS), .P_MAX(P_MAX)) u_store (
    .clk(clk),
    .t_we(t_we), .t_lane(t_lane), .t_waddr(t_waddr), .t_wdata(t_wdata),
    .rd_en(rd_en_f), .rd_addr(rd_addr_f), .rd_group(rd_group),
    .mech(cfg.mech), .glog(cfg.glog), .p(cfg.p), .c(9'(cfg.n) + 9'(cfg.p)),
    .page(page), .y_i(y_q),
    .xw_valid(xw_valid), .xw_col(xw_col), .xw_data(xw_data), .xw_page(busy ? ~page : page),
    .mat_o(mat), .vec_o(vec));

  mac_tree #(.DEPTH(DEPTH), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) u_tree (
    .clk(clk), .mat_i(mat), .vec_i(vec), .node_o(node));

  reduce_circuit #(.MAX_NG(XS), .LAT_ADD(LAT_ADD)) u_reduce (
    .clk(clk), .rst_n(rst_n), .ng_i(cfg.ng),
    .in_valid(red_valid), .in_first(red_first), .in_data(node[1]),
    .out_valid(red_out_valid), .out_data(red_out));

  lqr_output #(.DEPTH(DEPTH), .M_MAX(M_MAX), .N_MAX(N_MAX)) u_out (
    .clk(clk), .rst_n(rst_n), .start(start),
    .mech(cfg.mech), .glog(cfg.glog), .m(cfg.m), .n(cfg.n), .p(cfg.p),
    .tap_valid(tap_valid), .node_i(node),
    .red_valid(red_out_valid), .red_data(red_out),
    .xw_valid(xw_valid_r), .xw_col(xw_col_r), .xw_data(xw_data_r),
    .u_o(u_o), .u_valid(u_valid), .xhat_o(xhat), .done(out_done));

  assign u_valid_o = u_valid;
  assign busy_o    = busy;
  assign done_o    = out_done;

endmodule
