// lqr_storage: matrix/vector storage feeding the multiplier leaves.
//
// Every multiplier j owns a BRAM holding its slice of T, laid out by the
// software memory map: in merge mode word f of BRAM j holds
// T[f*N_f + j/G][j mod G] (G = 2^glog columns per row group, N_f = K/G rows
// per fetch), in reduce mode word r*N_g+g holds T[r][j + g*K]; unused
// positions hold 0. A fetch reads the same address from all BRAMs at once.
//
// The vector operand of lane j is selected by its column index col: a
// column below P takes sensor value y[col] (the Y_sel path), a column from
// P to P+N-1 takes the estimated state xhat[col-P], anything beyond is 0.
// Each lane keeps its own copy of the xhat elements it multiplies (one per
// reduce group, the "xhat_k" area of its BRAM). These copies are double
// buffered: an iteration reads page `page` and the new estimate xhat_{k+1}
// is written into the other page, so results can be written back while
// later rows still read xhat_k. An xhat write for column col goes to every
// lane whose column matches, which replicates it across merged row groups.
//
// Timing: rd_en/rd_addr/rd_group in cycle t give mat_o/vec_o in cycle t+1.
// T writes and xhat writes take effect at the next edge.
// The one-BRAM-per-multiplier organisation, the memory map and the y/xhat
// multiplexer follow the document; the per-lane xhat copies with two pages
// and the column arithmetic in place of a software-written bitmap are this
// design's.
module lqr_storage #(
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned TDEPTH = 1024,
  parameter int unsigned XS     = 4,
  parameter int unsigned P_MAX  = 128,
  localparam int unsigned K     = 1 << DEPTH,
  localparam int unsigned NW    = (K > 1) ? K / 2 : 1,
  localparam int unsigned TA_W  = $clog2(TDEPTH),
  localparam int unsigned PI_W  = (P_MAX > 1) ? $clog2(P_MAX) : 1,
  localparam int unsigned XS_W  = (XS > 1) ? $clog2(XS) : 1
) (
  input  logic                 clk,
  // software writes into the T BRAMs
  input  logic                 t_we,
  input  logic [DEPTH-1:0]     t_lane,
  input  logic [TA_W-1:0]      t_waddr,
  input  logic [31:0]          t_wdata,
  // fetch
  input  logic                 rd_en,
  input  logic [TA_W-1:0]      rd_addr,
  input  logic [7:0]           rd_group,
  // configuration
  input  lqr_pkg::mech_e       mech,
  input  logic [3:0]           glog,
  input  logic [7:0]           p,
  input  logic [8:0]           c,        // columns of T, N+P
  input  logic                 page,     // xhat page read by this iteration
  input  logic [31:0]          y_i   [P_MAX],
  // xhat writes (results or software)
  input  logic                 xw_valid [NW],
  input  logic [9:0]           xw_col   [NW],
  input  logic [31:0]          xw_data  [NW],
  input  logic                 xw_page,
  // to the multipliers
  output logic [31:0]          mat_o [K],
  output logic [31:0]          vec_o [K]
);
  import lqr_pkg::*;

  logic [9:0] gmask;
  always_comb begin
    if (mech == MECH_REDUCE) gmask = 10'(K - 1);
    else                     gmask = 10'((1 << glog) - 1);
  end

  for (genvar j = 0; j < K; j++) begin : g_lane
    logic [31:0] tmem [TDEPTH];
    logic [31:0] xb   [2][XS];
    logic [9:0]  col;
    logic [XS_W-1:0] slot;

    always_ff @(posedge clk) begin
      if (t_we && t_lane == DEPTH'(j)) tmem[t_waddr] <= t_wdata;
      if (rd_en) mat_o[j] <= tmem[rd_addr];
    end

    always_comb begin
      if (mech == MECH_REDUCE) begin
        col  = 10'(j) + 10'(rd_group) * 10'(K);
        slot = XS_W'(rd_group);
      end else begin
        col  = 10'(j) & gmask;
        slot = '0;
      end
    end

    always_ff @(posedge clk) begin
      if (rd_en) begin
        if (col < 10'(p))           vec_o[j] <= y_i[PI_W'(col)];
        else if (col < 10'(c))      vec_o[j] <= xb[page][slot];
        else                        vec_o[j] <= 32'h0;
      end
      for (int w = 0; w < int'(NW); w++) begin
        if (xw_valid[w] && ((xw_col[w] & gmask) == (10'(j) & gmask)) &&
            (int'(xw_col[w]) >> DEPTH) < int'(XS))
          xb[xw_page][XS_W'(xw_col[w] >> 10'(DEPTH))] <= xw_data[w];
      end
    end
  end

endmodule
