// plant_on_chip: hardware emulation of a linear discrete-time plant
// ("Plant-on-Chip"), used to test the controller without a physical plant.
//
// Each sample it evaluates the state-space model
//   y_k = C x_k,            x_{k+1} = A x_k + B u_k
// in single precision. Software writes the sizes (N states, M inputs,
// P outputs), A, B, C, the initial state x_0 and a sample period in clock
// cycles through an AXI4-Lite port, then sets RUN. A sample begins when the
// period has elapsed since the previous one (at once for period 0): the
// plant computes y_k, presents it on y_o with a one-cycle y_valid_o strobe
// (the direct parallel sensor connection to the controller), waits for
// u_valid_i, latches u_k and computes x_{k+1}. step_o pulses when the new
// state is in place; x_o and u_latched_o carry state and input for logging.
//
// Insides: one multiplier and one adder shared by all terms, driven by a
// small sequencer (multiply, wait L_M, accumulate, wait L_A, next term), so
// each term takes L_M + L_A + 2 cycles. The document gives the plant's
// function, not its insides; the sequential arithmetic, register map and
// period timer are this design's.
//
// Register map (word address bits 17:16 = region):
//   region 0: 0 CTRL (bit0 run), 1 N, 2 M, 3 P, 4 PERIOD, 5 STEPS (read)
//   region 1: bits 15:14 select A (0), B (1), C (2) or x (3);
//             bits 7:4 row, bits 3:0 column (x: bits 3:0 index)
module plant_on_chip #(
  parameter int unsigned NS_MAX  = 8,     // largest number of states
  parameter int unsigned NI_MAX  = 4,     // largest number of inputs
  parameter int unsigned NO_MAX  = 4,     // largest number of outputs
  parameter int unsigned LAT_MUL = 6,
  parameter int unsigned LAT_ADD = 11,
  parameter int unsigned AW      = 20
) (
  input  logic          clk,
  input  logic          rst_n,
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
  output logic [31:0]   y_o [NO_MAX],
  output logic          y_valid_o,
  input  logic [31:0]   u_i [NI_MAX],
  input  logic          u_valid_i,
  output logic [31:0]   x_o [NS_MAX],
  output logic [31:0]   u_latched_o [NI_MAX],
  output logic          step_o
);

  localparam int unsigned SW = $clog2(NS_MAX > 1 ? NS_MAX : 2);
  localparam int unsigned IW = $clog2(NI_MAX > 1 ? NI_MAX : 2);
  localparam int unsigned OW = $clog2(NO_MAX > 1 ? NO_MAX : 2);

  // register access
  logic          wr_en, rd_en;
  logic [AW-3:0] wr_addr, rd_addr;
  logic [31:0]   wr_data, rd_data;

  axil_slave #(.AW(AW)) u_axil (
    .clk(clk), .rst_n(rst_n),
    .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  logic [31:0] A [NS_MAX][NS_MAX];
  logic [31:0] B [NS_MAX][NI_MAX];
  logic [31:0] C [NO_MAX][NS_MAX];
  logic [31:0] x  [NS_MAX];
  logic [31:0] xn [NS_MAX];
  logic [31:0] u  [NI_MAX];
  logic [7:0]  n, m, p;
  logic        run;
  logic [31:0] period, timer, steps;

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_WMUL, S_ADD, S_WADD, S_WAIT_U, S_COMMIT} state_e;
  state_e      state;
  logic        phase_x;          // 0: computing y, 1: computing x_{k+1}
  logic [7:0]  row, term;
  logic [31:0] acc, op_a, op_b, prod, sum;
  logic [4:0]  wait_cnt;

  fp_mul #(.LAT(LAT_MUL)) u_mul (.clk(clk), .a(op_a), .b(op_b), .y(prod));
  fp_add #(.LAT(LAT_ADD)) u_add (.clk(clk), .a(acc), .b(prod), .y(sum));

  // operands of the current term
  always_comb begin
    op_a = 32'h0;
    op_b = 32'h0;
    if (!phase_x) begin
      op_a = C[OW'(row)][SW'(term)];
      op_b = x[SW'(term)];
    end else if (term < n) begin
      op_a = A[SW'(row)][SW'(term)];
      op_b = x[SW'(term)];
    end else begin
      op_a = B[SW'(row)][IW'(term - n)];
      op_b = u[IW'(term - n)];
    end
  end

  logic [7:0] rows_now, terms_now;
  assign rows_now  = phase_x ? n : p;
  assign terms_now = phase_x ? n + m : n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase_x <= 1'b0;
      row <= '0; term <= '0; acc <= '0; wait_cnt <= '0;
      run <= 1'b0; n <= '0; m <= '0; p <= '0; period <= '0; timer <= '0; steps <= '0;
      y_valid_o <= 1'b0;
      step_o <= 1'b0;
      for (int i = 0; i < int'(NS_MAX); i++) begin
        x[i] <= '0;
        xn[i] <= '0;
      end
      for (int i = 0; i < int'(NI_MAX); i++) u[i] <= '0;
      for (int i = 0; i < int'(NO_MAX); i++) y_o[i] <= '0;
    end else begin
      y_valid_o <= 1'b0;
      step_o    <= 1'b0;
      if (timer != 32'hFFFF_FFFF) timer <= timer + 32'd1;
      // software writes (matrices and state only while the plant is idle)
      if (wr_en && wr_addr[17:16] == 2'd0) begin
        case (wr_addr[7:0])
          8'd0: run    <= wr_data[0];
          8'd1: n      <= wr_data[7:0];
          8'd2: m      <= wr_data[7:0];
          8'd3: p      <= wr_data[7:0];
          8'd4: period <= wr_data;
          default: ;
        endcase
      end
      if (wr_en && wr_addr[17:16] == 2'd1 && wr_addr[15:14] == 2'd3 && state == S_IDLE)
        x[SW'(wr_addr[3:0])] <= wr_data;

      case (state)
        S_IDLE: if (run && timer >= period) begin
          timer   <= 32'd1;
          phase_x <= 1'b0;
          row     <= '0;
          term    <= '0;
          acc     <= '0;
          state   <= S_MUL;
        end
        S_MUL: begin                      // operands are applied this cycle
          wait_cnt <= 5'(LAT_MUL);
          state    <= S_WMUL;
        end
        S_WMUL: begin
          wait_cnt <= wait_cnt - 5'd1;
          if (wait_cnt == 5'd1) state <= S_ADD;
        end
        S_ADD: begin                      // acc + prod applied this cycle
          wait_cnt <= 5'(LAT_ADD);
          state    <= S_WADD;
        end
        S_WADD: begin
          wait_cnt <= wait_cnt - 5'd1;
          if (wait_cnt == 5'd1) begin
            if (term + 8'd1 < terms_now) begin
              acc   <= sum;
              term  <= term + 8'd1;
              state <= S_MUL;
            end else begin
              if (!phase_x) y_o[OW'(row)] <= sum;
              else          xn[SW'(row)]  <= sum;
              acc  <= '0;
              term <= '0;
              if (row + 8'd1 < rows_now) begin
                row   <= row + 8'd1;
                state <= S_MUL;
              end else if (!phase_x) begin
                y_valid_o <= 1'b1;
                state     <= S_WAIT_U;
              end else begin
                state <= S_COMMIT;
              end
            end
          end
        end
        S_WAIT_U: if (u_valid_i) begin
          u       <= u_i;
          phase_x <= 1'b1;
          row     <= '0;
          term    <= '0;
          acc     <= '0;
          state   <= S_MUL;
        end
        S_COMMIT: begin
          for (int i = 0; i < int'(NS_MAX); i++) if (i < int'(n)) x[i] <= xn[i];
          steps  <= steps + 32'd1;
          step_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // matrix writes (kept out of the reset block: plain memories)
  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[17:16] == 2'd1) begin
      case (wr_addr[15:14])
        2'd0: A[SW'(wr_addr[7:4])][SW'(wr_addr[3:0])] <= wr_data;
        2'd1: B[SW'(wr_addr[7:4])][IW'(wr_addr[3:0])] <= wr_data;
        2'd2: C[OW'(wr_addr[7:4])][SW'(wr_addr[3:0])] <= wr_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else if (rd_en) begin
      rd_data <= '0;
      if (rd_addr[17:16] == 2'd0) begin
        case (rd_addr[7:0])
          8'd0: rd_data <= {31'b0, run};
          8'd1: rd_data <= 32'(n);
          8'd2: rd_data <= 32'(m);
          8'd3: rd_data <= 32'(p);
          8'd4: rd_data <= period;
          8'd5: rd_data <= steps;
          default: ;
        endcase
      end else if (rd_addr[17:16] == 2'd1 && rd_addr[15:14] == 2'd3)
        rd_data <= x[SW'(rd_addr[3:0])];
    end
  end

  assign x_o = x;
  assign u_latched_o = u;

endmodule
