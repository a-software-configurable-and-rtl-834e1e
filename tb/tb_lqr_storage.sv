// tb_lqr_storage: self-checking testbench for the T/vector storage (4 lanes,
// 16 words per BRAM, 3 estimate slots per lane). It fills every BRAM with
// known words and reads them back through the fetch port one cycle later,
// then checks the vector operand of every lane in merge mode (groups of 2
// and 4 columns) and reduce mode (3 column groups): a column below P must
// give y[col], a column below N+P the estimate element written for it in
// the page being read, anything else 0. Estimate writes go to one page while
// the other is read, and are replicated across merged row groups.
module tb_lqr_storage;
  import lqr_pkg::*;

  localparam int unsigned DEPTH = 2, TDEPTH = 16, XS = 3, P_MAX = 4;
  localparam int unsigned K = 1 << DEPTH, NW = K / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic t_we, rd_en, page, xw_page;
  logic [DEPTH-1:0] t_lane;
  logic [3:0] t_waddr, rd_addr;
  logic [31:0] t_wdata;
  logic [7:0] rd_group, p;
  mech_e mech;
  logic [3:0] glog;
  logic [8:0] c;
  logic [31:0] y [P_MAX];
  logic xw_valid [NW];
  logic [9:0] xw_col [NW];
  logic [31:0] xw_data [NW];
  logic [31:0] mat [K];
  logic [31:0] vec [K];
  int checks = 0, failures = 0;

  lqr_storage #(.DEPTH(DEPTH), .TDEPTH(TDEPTH), .XS(XS), .P_MAX(P_MAX)) dut (
    .clk(clk), .t_we(t_we), .t_lane(t_lane), .t_waddr(t_waddr), .t_wdata(t_wdata),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_group(rd_group), .mech(mech), .glog(glog), .p(p), .c(c),
    .page(page), .y_i(y), .xw_valid(xw_valid), .xw_col(xw_col), .xw_data(xw_data), .xw_page(xw_page),
    .mat_o(mat), .vec_o(vec));

  logic [31:0] xm [2][16];    // model: estimate element for column col, per page

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write_x(input int col, input logic [31:0] d, input logic pg);
    @(negedge clk);
    for (int w = 0; w < int'(NW); w++) xw_valid[w] = 1'b0;
    xw_valid[0] = 1'b1; xw_col[0] = 10'(col); xw_data[0] = d; xw_page = pg;
    @(negedge clk);
    xw_valid[0] = 1'b0;
    xm[pg][col] = d;
  endtask

  // fetch with the given group and check every lane's vector operand
  task automatic fetch_check(input int grp, input string tag);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = 4'd0; rd_group = 8'(grp);
    @(negedge clk);
    rd_en = 1'b0;
    for (int j = 0; j < int'(K); j++) begin
      int col;
      logic [31:0] e;
      col = (mech == MECH_REDUCE) ? j + grp * int'(K) : j % (1 << glog);
      e = (col < int'(p)) ? y[col] : (col < int'(c)) ? xm[page][col] : 32'h0;
      check(vec[j] === e, $sformatf("%s lane %0d (col %0d): got %h expected %h", tag, j, col, vec[j], e));
    end
  endtask

  initial begin
    t_we = 0; rd_en = 0; page = 0; xw_page = 0; rd_addr = 0; rd_group = 0;
    for (int w = 0; w < int'(NW); w++) begin xw_valid[w] = 0; xw_col[w] = '0; xw_data[w] = '0; end
    for (int i = 0; i < int'(P_MAX); i++) y[i] = 32'h1000_0000 + 32'(i);
    // T BRAMs
    for (int j = 0; j < int'(K); j++)
      for (int a = 0; a < int'(TDEPTH); a++) begin
        @(negedge clk);
        t_we = 1; t_lane = DEPTH'(j); t_waddr = 4'(a); t_wdata = 32'(j * 1000 + a);
      end
    @(negedge clk);
    t_we = 0;
    for (int a = 0; a < int'(TDEPTH); a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 4'(a);
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < int'(K); j++)
        check(mat[j] == 32'(j * 1000 + a), $sformatf("BRAM %0d word %0d: %0d", j, a, mat[j]));
    end

    // merge, groups of 2 columns (N=1, P=1): lanes 1 and 3 share xhat[0]
    mech = MECH_MERGE; glog = 4'd1; p = 8'd1; c = 9'd2; page = 1'b0;
    write_x(1, 32'hAAAA_0001, 1'b0);
    write_x(1, 32'hBBBB_0001, 1'b1);
    fetch_check(0, "merge2 page0");
    page = 1'b1;
    fetch_check(0, "merge2 page1");

    // merge, groups of 4 columns (N=2, P=2)
    glog = 4'd2; p = 8'd2; c = 9'd4; page = 1'b0;
    write_x(2, 32'hAAAA_0002, 1'b0);
    write_x(3, 32'hAAAA_0003, 1'b0);
    fetch_check(0, "merge4");

    // reduce, 3 groups (N=8, P=2, 10 columns)
    mech = MECH_REDUCE; glog = 4'd0; p = 8'd2; c = 9'd10;
    for (int pg = 0; pg < 2; pg++)
      for (int col = 2; col < 10; col++) write_x(col, 32'hC000_0000 + 32'(pg * 256 + col), 1'(pg));
    for (int pg = 0; pg < 2; pg++) begin
      page = 1'(pg);
      for (int g = 0; g < 3; g++) fetch_check(g, $sformatf("reduce page%0d group%0d", pg, g));
    end

    // several result writes in one cycle (merge, 2 columns, two rows' results)
    mech = MECH_MERGE; glog = 4'd1; p = 8'd1; c = 9'd2; page = 1'b0;
    @(negedge clk);
    xw_valid[0] = 1'b0; xw_valid[1] = 1'b1; xw_col[1] = 10'd1; xw_data[1] = 32'hDDDD_0001; xw_page = 1'b1;
    @(negedge clk);
    xw_valid[1] = 1'b0;
    xm[1][1] = 32'hDDDD_0001;
    page = 1'b1;
    fetch_check(0, "result write port 1");

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
