// tb_uart_logger: self-checking testbench for the UART logger. Snapshots of
// three words are taken; a receiver in the testbench samples txd in the
// middle of every bit and checks the start bit, the stop bit, the sync byte
// 0xA5 and each word least significant byte first, and the bit period of
// CLKS_PER_BIT cycles. A snapshot taken while a frame is being sent must be
// dropped and counted.
module tb_uart_logger;
  localparam int NW = 3;
  localparam int CPB = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, snap, txd, busy;
  logic [31:0] words [NW];
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  uart_logger #(.NW_MAX(NW), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .snap_i(snap), .n_words_i(8'(NW)), .words_i(words),
    .txd(txd), .busy_o(busy), .dropped_o(dropped));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic rx_byte(output logic [7:0] b);
    @(negedge txd);
    repeat (CPB / 2) @(posedge clk);
    check(txd == 1'b0, "start bit");
    for (int k = 0; k < 8; k++) begin
      repeat (CPB) @(posedge clk);
      b[k] = txd;
    end
    repeat (CPB) @(posedge clk);
    check(txd == 1'b1, "stop bit");
  endtask

  initial begin
    rst_n = 1'b0; snap = 1'b0;
    for (int i = 0; i < NW; i++) words[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(txd == 1'b1, "line idles high");
    for (int f = 0; f < 3; f++) begin
      logic [31:0] sent [NW];
      logic [7:0] b;
      @(negedge clk);
      for (int i = 0; i < NW; i++) begin
        words[i] = $urandom;
        sent[i] = words[i];
      end
      snap = 1'b1;
      @(negedge clk);
      snap = 1'b0;
      for (int i = 0; i < NW; i++) words[i] = $urandom;   // must not affect the frame
      fork
        begin
          rx_byte(b);
          check(b == 8'hA5, $sformatf("sync byte %h", b));
          for (int i = 0; i < NW; i++)
            for (int k = 0; k < 4; k++) begin
              rx_byte(b);
              check(b == sent[i][8*k +: 8], $sformatf("frame %0d word %0d byte %0d: %h", f, i, k, b));
            end
        end
        begin
          if (f == 1) begin
            repeat (5 * CPB) @(negedge clk);
            snap = 1'b1;
            @(negedge clk);
            snap = 1'b0;
          end
        end
      join
      while (busy) @(negedge clk);
    end
    check(dropped == 16'd1, $sformatf("dropped count %0d", dropped));
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
