// lqr_system: programmable-logic side of the experimental platform.
//
// The LQR coprocessor and the Plant-on-Chip sit side by side, each behind
// its own AXI4-Lite slave port (the processor and the AXI interconnect that
// would drive these ports are outside this design). The two are wired
// directly: the plant's sensor vector y and its sample strobe go in parallel
// to the coprocessor, which, with auto-start enabled, begins an iteration on
// every strobe; the coprocessor's held control vector u and its u_valid
// strobe go straight back to the plant. A UART logger sends the plant state
// and the input it received after every plant sample.
//
// Sizes: the coprocessor has the full default configuration (64 multipliers,
// up to 128 states, inputs and outputs); the plant emulates up to 8 states,
// 4 inputs and 4 outputs. Sensor inputs of the coprocessor above the plant's
// outputs are tied to zero. The direct connection follows the document; the
// plant's maximum sizes and the logging frame are this design's.
module lqr_system #(
  parameter int unsigned DEPTH        = 6,
  parameter int unsigned LAT_MUL      = 6,
  parameter int unsigned LAT_ADD      = 11,
  parameter int unsigned N_MAX        = 128,
  parameter int unsigned M_MAX        = 128,
  parameter int unsigned P_MAX        = 128,
  parameter int unsigned TDEPTH       = 1024,
  parameter int unsigned PS_MAX       = 8,      // plant states
  parameter int unsigned PI_MAX       = 4,      // plant inputs
  parameter int unsigned PO_MAX       = 4,      // plant outputs
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned AW           = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave: coprocessor
  input  logic [AW-1:0] c_awaddr,
  input  logic          c_awvalid,
  output logic          c_awready,
  input  logic [31:0]   c_wdata,
  input  logic [3:0]    c_wstrb,
  input  logic          c_wvalid,
  output logic          c_wready,
  output logic [1:0]    c_bresp,
  output logic          c_bvalid,
  input  logic          c_bready,
  input  logic [AW-1:0] c_araddr,
  input  logic          c_arvalid,
  output logic          c_arready,
  output logic [31:0]   c_rdata,
  output logic [1:0]    c_rresp,
  output logic          c_rvalid,
  input  logic          c_rready,
  // AXI4-Lite slave: Plant-on-Chip
  input  logic [AW-1:0] p_awaddr,
  input  logic          p_awvalid,
  output logic          p_awready,
  input  logic [31:0]   p_wdata,
  input  logic [3:0]    p_wstrb,
  input  logic          p_wvalid,
  output logic          p_wready,
  output logic [1:0]    p_bresp,
  output logic          p_bvalid,
  input  logic          p_bready,
  input  logic [AW-1:0] p_araddr,
  input  logic          p_arvalid,
  output logic          p_arready,
  output logic [31:0]   p_rdata,
  output logic [1:0]    p_rresp,
  output logic          p_rvalid,
  input  logic          p_rready,
  // status and logging
  output logic          ctl_busy_o,
  output logic          ctl_done_o,
  output logic          plant_step_o,
  output logic          uart_txd_o
);

  logic [31:0] y_plant [PO_MAX];
  logic [31:0] y_ctl   [P_MAX];
  logic [31:0] u_ctl   [M_MAX];
  logic [31:0] u_plant [PI_MAX];
  logic [31:0] x_plant [PS_MAX];
  logic [31:0] u_log   [PI_MAX];
  logic [31:0] words   [PS_MAX + PI_MAX];
  logic        y_valid, u_valid, step;
  logic        log_busy;
  logic [15:0] log_dropped;

  always_comb begin
    for (int i = 0; i < int'(P_MAX); i++)  y_ctl[i]   = (i < int'(PO_MAX)) ? y_plant[i] : 32'h0;
    for (int i = 0; i < int'(PI_MAX); i++) u_plant[i] = (i < int'(M_MAX)) ? u_ctl[i] : 32'h0;
    for (int i = 0; i < int'(PS_MAX); i++) words[i] = x_plant[i];
    for (int i = 0; i < int'(PI_MAX); i++) words[PS_MAX + i] = u_log[i];
  end

  lqr_coprocessor #(.DEPTH(DEPTH), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD), .N_MAX(N_MAX),
                    .M_MAX(M_MAX), .P_MAX(P_MAX), .TDEPTH(TDEPTH), .AW(AW)) i_ctl (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(c_awaddr), .s_awvalid(c_awvalid), .s_awready(c_awready),
    .s_wdata(c_wdata), .s_wstrb(c_wstrb), .s_wvalid(c_wvalid), .s_wready(c_wready),
    .s_bresp(c_bresp), .s_bvalid(c_bvalid), .s_bready(c_bready),
    .s_araddr(c_araddr), .s_arvalid(c_arvalid), .s_arready(c_arready),
    .s_rdata(c_rdata), .s_rresp(c_rresp), .s_rvalid(c_rvalid), .s_rready(c_rready),
    .y_i(y_ctl), .y_valid_i(y_valid), .u_o(u_ctl), .u_valid_o(u_valid),
    .busy_o(ctl_busy_o), .done_o(ctl_done_o));

  plant_on_chip #(.NS_MAX(PS_MAX), .NI_MAX(PI_MAX), .NO_MAX(PO_MAX),
                  .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD), .AW(AW)) i_plant (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(p_awaddr), .s_awvalid(p_awvalid), .s_awready(p_awready),
    .s_wdata(p_wdata), .s_wstrb(p_wstrb), .s_wvalid(p_wvalid), .s_wready(p_wready),
    .s_bresp(p_bresp), .s_bvalid(p_bvalid), .s_bready(p_bready),
    .s_araddr(p_araddr), .s_arvalid(p_arvalid), .s_arready(p_arready),
    .s_rdata(p_rdata), .s_rresp(p_rresp), .s_rvalid(p_rvalid), .s_rready(p_rready),
    .y_o(y_plant), .y_valid_o(y_valid), .u_i(u_plant), .u_valid_i(u_valid),
    .x_o(x_plant), .u_latched_o(u_log), .step_o(step));

  uart_logger #(.NW_MAX(PS_MAX + PI_MAX), .CLKS_PER_BIT(CLKS_PER_BIT)) i_log (
    .clk(clk), .rst_n(rst_n), .snap_i(step), .n_words_i(8'(PS_MAX + PI_MAX)),
    .words_i(words), .txd(uart_txd_o), .busy_o(log_busy), .dropped_o(log_dropped));

  assign plant_step_o = step;

endmodule
