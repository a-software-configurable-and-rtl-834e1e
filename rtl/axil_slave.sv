// axil_slave: AXI4-Lite slave port turning bus transfers into single-cycle
// register accesses.
//
// Write: the address and data channels are accepted together, in the cycle
// both are valid and no write response is outstanding; that cycle issues
// wr_en with the word address and data, and the OKAY response is held on B
// until the master takes it. Byte strobes are ignored (whole-word writes).
// Read: an accepted read address issues rd_en with the word address; the
// register file answers in the next cycle and its data is held on R until
// the master takes it. One transfer of each kind is in flight at a time.
// The document names an AXI4-Lite slave interface; this implementation is
// the simplest one that follows the protocol.
module axil_slave #(
  parameter int unsigned AW = 20          // byte address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite
  input  logic [AW-1:0] awaddr,
  input  logic          awvalid,
  output logic          awready,
  input  logic [31:0]   wdata,
  input  logic [3:0]    wstrb,
  input  logic          wvalid,
  output logic          wready,
  output logic [1:0]    bresp,
  output logic          bvalid,
  input  logic          bready,
  input  logic [AW-1:0] araddr,
  input  logic          arvalid,
  output logic          arready,
  output logic [31:0]   rdata,
  output logic [1:0]    rresp,
  output logic          rvalid,
  input  logic          rready,
  // register access
  output logic          wr_en,
  output logic [AW-3:0] wr_addr,
  output logic [31:0]   wr_data,
  output logic          rd_en,
  output logic [AW-3:0] rd_addr,
  input  logic [31:0]   rd_data
);

  logic rd_pend;

  assign awready = awvalid && wvalid && !bvalid;
  assign wready  = awready;
  assign wr_en   = awready;
  assign wr_addr = awaddr[AW-1:2];
  assign wr_data = wdata;
  assign bresp   = 2'b00;

  assign arready = !rvalid && !rd_pend;
  assign rd_en   = arvalid && arready;
  assign rd_addr = araddr[AW-1:2];
  assign rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid  <= 1'b0;
      rvalid  <= 1'b0;
      rd_pend <= 1'b0;
      rdata   <= '0;
    end else begin
      if (wr_en)                 bvalid <= 1'b1;
      else if (bvalid && bready) bvalid <= 1'b0;
      rd_pend <= rd_en;
      if (rd_pend) begin
        rdata  <= rd_data;
        rvalid <= 1'b1;
      end else if (rvalid && rready) rvalid <= 1'b0;
    end
  end

  // Protocol rules: a response stays valid, with stable data, until taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             bvalid && !bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rvalid && !rready |=> rvalid && $stable(rdata));

endmodule
