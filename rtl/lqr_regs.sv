// lqr_regs: configuration register file and address decoder of the
// coprocessor.
//
// The word address space (18 bits) is split by bits 17:16 into four regions:
//   0  configuration and status registers (index in bits 7:0, see lqr_pkg)
//   1  T storage: bits 15:0 = {lane, word}, a write goes to word `word` of
//      the BRAM of multiplier `lane` (write only)
//   2  estimated state: write sets xhat[i] for the next iteration; read
//      returns the latest computed xhat_{k+1}[i]
//   3  control outputs: read returns the held u[i]
// Software writes N, M, P, the tree depth, the adder and multiplier
// latencies and the mechanism info (merge/reduce, glog, N_g) before
// starting; depth and latencies reset to the values the hardware was built
// with. Writing CTRL bit 0 starts one iteration; CTRL bit 1 lets every sensor
// strobe start one. STATUS reports busy, done (set at the end of an
// iteration, cleared by the next start) and u ready. Reads answer in the
// cycle after rd_en. The list of configuration fields follows the document;
// the address map and encodings are this design's.
module lqr_regs #(
  parameter int unsigned DEPTH   = 6,
  parameter int unsigned TDEPTH  = 1024,
  parameter int unsigned LAT_MUL = 6,
  parameter int unsigned LAT_ADD = 11,
  parameter int unsigned M_MAX   = 128,
  parameter int unsigned N_MAX   = 128,
  localparam int unsigned TA_W   = $clog2(TDEPTH),
  localparam int unsigned MI_W   = (M_MAX > 1) ? $clog2(M_MAX) : 1,
  localparam int unsigned NI_W   = (N_MAX > 1) ? $clog2(N_MAX) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access
  input  logic              wr_en,
  input  logic [17:0]       wr_addr,
  input  logic [31:0]       wr_data,
  input  logic              rd_en,
  input  logic [17:0]       rd_addr,
  output logic [31:0]       rd_data,
  // configuration and commands
  output lqr_pkg::lqr_cfg_t cfg,
  output logic              start,
  output logic              auto_start,
  output logic              t_we,
  output logic [DEPTH-1:0]  t_lane,
  output logic [TA_W-1:0]   t_waddr,
  output logic [31:0]       t_wdata,
  output logic              x_we,
  output logic [7:0]        x_idx,
  output logic [31:0]       x_wdata,
  // status
  input  logic              busy,
  input  logic              it_start,     // an iteration started (software or sensor)
  input  logic              it_done,
  input  logic              u_pulse,
  input  logic              page,
  input  logic [31:0]       cyc_u,
  input  logic [31:0]       cyc_end,
  input  logic [31:0]       u_i    [M_MAX],
  input  logic [31:0]       xhat_i [N_MAX]
);
  import lqr_pkg::*;

  logic [1:0] wr_rgn, rd_rgn;
  logic       done_f, u_f;
  logic [31:0] iters;

  assign wr_rgn = wr_addr[17:16];
  assign rd_rgn = rd_addr[17:16];

  assign start   = wr_en && wr_rgn == RGN_REGS && wr_addr[7:0] == REG_CTRL && wr_data[0];
  assign t_we    = wr_en && wr_rgn == RGN_T;
  assign t_lane  = wr_addr[TA_W +: DEPTH];
  assign t_waddr = wr_addr[TA_W-1:0];
  assign t_wdata = wr_data;
  assign x_we    = wr_en && wr_rgn == RGN_XHAT;
  assign x_idx   = wr_addr[7:0];
  assign x_wdata = wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= '0;
      cfg.depth   <= 4'(DEPTH);
      cfg.lat_add <= LAT_W'(LAT_ADD);
      cfg.lat_mul <= LAT_W'(LAT_MUL);
      cfg.mech    <= MECH_MERGE;
      cfg.glog    <= 4'(DEPTH);
      cfg.ng      <= 8'd1;
      auto_start  <= 1'b0;
      done_f      <= 1'b0;
      u_f         <= 1'b0;
      iters       <= '0;
    end else begin
      if (wr_en && wr_rgn == RGN_REGS) begin
        case (wr_addr[7:0])
          REG_CTRL:    auto_start  <= wr_data[1];
          REG_N:       cfg.n       <= wr_data[DIM_W-1:0];
          REG_M:       cfg.m       <= wr_data[DIM_W-1:0];
          REG_P:       cfg.p       <= wr_data[DIM_W-1:0];
          REG_DEPTH:   cfg.depth   <= wr_data[3:0];
          REG_LAT_ADD: cfg.lat_add <= wr_data[LAT_W-1:0];
          REG_LAT_MUL: cfg.lat_mul <= wr_data[LAT_W-1:0];
          REG_MECH: begin
            cfg.mech <= mech_e'(wr_data[0]);
            cfg.glog <= wr_data[7:4];
            cfg.ng   <= wr_data[15:8];
          end
          REG_T_BASE:  cfg.t_base  <= wr_data[15:0];
          default: ;
        endcase
      end
      if (it_start) begin
        done_f <= 1'b0;
        u_f    <= 1'b0;
      end
      if (u_pulse) u_f <= 1'b1;
      if (it_done) begin
        done_f <= 1'b1;
        iters  <= iters + 32'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else if (rd_en) begin
      rd_data <= '0;
      case (rd_rgn)
        RGN_REGS: case (rd_addr[7:0])
          REG_CTRL:    rd_data <= {30'b0, auto_start, 1'b0};
          REG_STATUS:  rd_data <= {28'b0, page, u_f, done_f, busy};
          REG_N:       rd_data <= 32'(cfg.n);
          REG_M:       rd_data <= 32'(cfg.m);
          REG_P:       rd_data <= 32'(cfg.p);
          REG_DEPTH:   rd_data <= 32'(cfg.depth);
          REG_LAT_ADD: rd_data <= 32'(cfg.lat_add);
          REG_LAT_MUL: rd_data <= 32'(cfg.lat_mul);
          REG_MECH:    rd_data <= {16'b0, cfg.ng, cfg.glog, 3'b0, cfg.mech};
          REG_T_BASE:  rd_data <= 32'(cfg.t_base);
          REG_CYC_U:   rd_data <= cyc_u;
          REG_CYC_END: rd_data <= cyc_end;
          REG_ITER:    rd_data <= iters;
          default:     rd_data <= '0;
        endcase
        RGN_XHAT: if (int'(rd_addr[7:0]) < int'(N_MAX)) rd_data <= xhat_i[NI_W'(rd_addr[7:0])];
        RGN_U:    if (int'(rd_addr[7:0]) < int'(M_MAX)) rd_data <= u_i[MI_W'(rd_addr[7:0])];
        default:  rd_data <= '0;
      endcase
    end
  end

endmodule
