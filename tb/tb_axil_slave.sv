// tb_axil_slave: self-checking testbench for the AXI4-Lite slave. A small
// register array in the testbench plays the register file (answering one
// cycle after rd_en). Random writes and reads, with random delays on the
// response-ready signals, must each produce exactly one register access at
// the right word address, OKAY responses, and read data equal to what was
// last written; addresses and data are also accepted when AW and W arrive
// in different cycles. Back-to-back writes hold the next address and data
// on the bus while the previous response is still unaccepted: the slave must
// neither accept nor perform that write until the response has been taken.
module tb_axil_slave;
  localparam int AW = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic wr_en, rd_en;
  logic [AW-3:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;

  axil_slave #(.AW(AW)) dut (
    .clk(clk), .rst_n(rst_n),
    .awaddr(awaddr), .awvalid(awvalid), .awready(awready), .wdata(wdata), .wstrb(4'hF),
    .wvalid(wvalid), .wready(wready), .bresp(bresp), .bvalid(bvalid), .bready(bready),
    .araddr(araddr), .arvalid(arvalid), .arready(arready), .rdata(rdata), .rresp(rresp),
    .rvalid(rvalid), .rready(rready),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data), .rd_en(rd_en), .rd_addr(rd_addr),
    .rd_data(rd_data));

  logic [31:0] regs [1 << (AW - 2)];
  logic [31:0] model [1 << (AW - 2)];
  int n_wr = 0, n_rd = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      regs[wr_addr] <= wr_data;
      n_wr++;
    end
    if (rd_en) begin
      rd_data <= regs[rd_addr];
      n_rd++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic do_write(input logic [AW-3:0] a, input logic [31:0] d, input bit split);
    int w0;
    w0 = n_wr;
    @(negedge clk);
    awaddr = {a, 2'b00}; wdata = d; awvalid = 1'b1; wvalid = !split;
    if (split) begin
      repeat (2) @(negedge clk);
      check(n_wr == w0, "no write before the data arrives");
      wvalid = 1'b1;
    end
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    repeat ($urandom_range(3, 0)) @(negedge clk);
    bready = 1'b1;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write response OKAY");
    @(negedge clk);
    bready = 1'b0;
    check(n_wr == w0 + 1, "exactly one register write per transfer");
    model[a] = d;
  endtask

  task automatic do_write_pair(input logic [AW-3:0] a, input logic [31:0] d,
                               input logic [AW-3:0] a2, input logic [31:0] d2);
    int w0;
    w0 = n_wr;
    @(negedge clk);
    awaddr = {a, 2'b00}; wdata = d; awvalid = 1'b1; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awaddr = {a2, 2'b00}; wdata = d2;          // next write waits on the bus
    repeat (3) begin
      @(negedge clk);
      check(!awready && !wready, "next write held off while the response is pending");
    end
    check(n_wr == w0 + 1, "pending response blocks the next register write");
    bready = 1'b1;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 1'b0;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    bready = 1'b1;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 1'b0;
    check(n_wr == w0 + 2, "two transfers give two register writes");
    model[a] = d;
    model[a2] = d2;
  endtask

  task automatic do_read(input logic [AW-3:0] a);
    int r0;
    r0 = n_rd;
    @(negedge clk);
    araddr = {a, 2'b00}; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    repeat ($urandom_range(3, 0)) @(negedge clk);
    rready = 1'b1;
    while (!rvalid) @(negedge clk);
    check(rdata == model[a], $sformatf("read %0d: got %h expected %h", a, rdata, model[a]));
    check(rresp == 2'b00, "read response OKAY");
    @(negedge clk);
    rready = 1'b0;
    check(n_rd == r0 + 1, "exactly one register read per transfer");
  endtask

  initial begin
    rst_n = 1'b0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; araddr = '0; wdata = '0;
    for (int i = 0; i < (1 << (AW - 2)); i++) begin
      regs[i] = 32'(i * 7);
      model[i] = 32'(i * 7);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      logic [AW-3:0] a;
      a = (AW-2)'($urandom);
      if ($urandom_range(7, 0) == 0) do_write_pair(a, $urandom, (AW-2)'($urandom), $urandom);
      else if ($urandom_range(1, 0) == 1) do_write(a, $urandom, $urandom_range(3, 0) == 0);
      else do_read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
