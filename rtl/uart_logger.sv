// uart_logger: out-of-band logging of the plant state and control input over
// a UART, so that the closed loop can be plotted without disturbing it.
//
// On every snap_i pulse (one per plant sample) the logger copies the first
// n_words_i words of words_i and transmits a frame: a sync byte 0xA5, then
// each 32-bit word least significant byte first. Bytes go out as 8N1 (start
// bit, 8 data bits LSB first, stop bit), CLKS_PER_BIT clock cycles per bit;
// txd idles high. A snapshot that arrives while a frame is still being sent
// is dropped and counted in dropped_o. The document only says that state and
// control commands are logged over a UART; the frame format, the drop policy
// and the baud divider are this design's (868 cycles per bit is 115200 baud
// at 100 MHz).
module uart_logger #(
  parameter int unsigned NW_MAX       = 12,
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        snap_i,
  input  logic [7:0]  n_words_i,
  input  logic [31:0] words_i [NW_MAX],
  output logic        txd,
  output logic        busy_o,
  output logic [15:0] dropped_o
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned BW = $clog2(4 * NW_MAX + 2);
  localparam int unsigned WI_W = $clog2(NW_MAX > 1 ? NW_MAX : 2);

  logic [31:0]   buf_q [NW_MAX];
  logic [BW-1:0] nbytes, bidx;       // bytes in the frame, byte being sent
  logic [3:0]    bit_idx;            // 0 start, 1..8 data, 9 stop
  logic [CW-1:0] clk_cnt;
  logic [7:0]    cur;
  logic          busy;

  // byte bidx of the frame: 0 is the sync byte
  always_comb begin
    logic [BW-1:0] k;
    k   = bidx - BW'(1);
    cur = 8'hA5;
    if (bidx != '0) cur = buf_q[WI_W'(k >> 2)][8 * k[1:0] +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      txd       <= 1'b1;
      nbytes    <= '0;
      bidx      <= '0;
      bit_idx   <= '0;
      clk_cnt   <= '0;
      dropped_o <= '0;
      for (int i = 0; i < int'(NW_MAX); i++) buf_q[i] <= '0;
    end else begin
      if (!busy) begin
        txd <= 1'b1;
        if (snap_i) begin
          buf_q   <= words_i;
          nbytes  <= BW'(4 * ((int'(n_words_i) > int'(NW_MAX)) ? NW_MAX : int'(n_words_i)) + 1);
          bidx    <= '0;
          bit_idx <= '0;
          clk_cnt <= '0;
          busy    <= 1'b1;
        end
      end else begin
        if (snap_i) dropped_o <= dropped_o + 16'd1;
        case (bit_idx)
          4'd0:    txd <= 1'b0;
          4'd9:    txd <= 1'b1;
          default: txd <= cur[3'(bit_idx - 4'd1)];
        endcase
        if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
          clk_cnt <= '0;
          if (bit_idx == 4'd9) begin
            bit_idx <= '0;
            if (bidx + BW'(1) == nbytes) busy <= 1'b0;
            else bidx <= bidx + BW'(1);
          end else bit_idx <= bit_idx + 4'd1;
        end else clk_cnt <= clk_cnt + CW'(1);
      end
    end
  end

  assign busy_o = busy;

endmodule
