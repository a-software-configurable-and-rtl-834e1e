// lqr_output: "arrange output values" and the output value hold register.
//
// Results leave the parallel processing architecture in row order of T:
// in merge mode N_f = 2^(DEPTH-glog) results per valid cycle, read from the
// tree nodes of level DEPTH-glog (node N_f+k carries row base+k); in reduce
// mode one result per valid cycle from the reduction circuit. A row counter
// assigns each result its row r. Rows r < M are control outputs u[r] and
// are collected in a working register; rows r >= M are the next state
// estimate xhat_{k+1}[r-M] and are sent to storage as writes of column
// P+r-M, up to N_f per cycle. Results past the last row (padding of the last
// merged fetch) are dropped.
//
// In the cycle after the M-th control row has arrived the working values
// are copied into the hold register u_o, which drives the plant; the new u_o
// and a one-cycle u_valid pulse appear two cycles after that row. done pulses
// likewise two cycles after the last row (one cycle after u_valid if the
// last control row and the last row arrive together). start clears the row
// counter. The split of T rows into u and xhat follows the document; the
// pulse timing is this design's.
module lqr_output #(
  parameter int unsigned DEPTH = 6,
  parameter int unsigned M_MAX = 128,
  parameter int unsigned N_MAX = 128,
  localparam int unsigned K    = 1 << DEPTH,
  localparam int unsigned NW   = (K > 1) ? K / 2 : 1,
  localparam int unsigned MI_W = (M_MAX > 1) ? $clog2(M_MAX) : 1,
  localparam int unsigned NI_W = (N_MAX > 1) ? $clog2(N_MAX) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  lqr_pkg::mech_e     mech,
  input  logic [3:0]         glog,
  input  logic [7:0]         m,
  input  logic [7:0]         n,
  input  logic [7:0]         p,
  input  logic               tap_valid,      // merge: tree tap level valid
  input  logic [31:0]        node_i [1:K-1],
  input  logic               red_valid,      // reduce: reduction circuit output valid
  input  logic [31:0]        red_data,
  output logic               xw_valid [NW],
  output logic [9:0]         xw_col   [NW],
  output logic [31:0]        xw_data  [NW],
  output logic [31:0]        u_o      [M_MAX],
  output logic               u_valid,
  output logic [31:0]        xhat_o   [N_MAX],
  output logic               done
);
  import lqr_pkg::*;

  logic [8:0]  base;          // row of the next result
  logic [8:0]  rows;          // rows M+N of T
  logic [31:0] u_work [M_MAX];
  logic        u_sent, done_sent;
  logic        ev;
  logic [8:0]  step;
  logic [3:0]  lvl;

  logic        r_valid [NW];
  logic [8:0]  r_row   [NW];
  logic [31:0] r_data  [NW];

  assign rows = 9'(m) + 9'(n);
  assign lvl  = 4'(DEPTH) - glog;

  always_comb begin
    ev   = (mech == MECH_REDUCE) ? red_valid : tap_valid;
    step = (mech == MECH_REDUCE) ? 9'd1 : 9'(1 << lvl);
    for (int k = 0; k < int'(NW); k++) begin
      r_row[k] = base + 9'(k);
      if (mech == MECH_REDUCE) begin
        r_valid[k] = (k == 0) && red_valid && (r_row[k] < rows);
        r_data[k]  = red_data;
      end else begin
        r_valid[k] = tap_valid && (9'(k) < step) && (r_row[k] < rows);
        r_data[k]  = node_i[(1 << lvl) + k < K ? (1 << lvl) + k : K - 1];
      end
      xw_valid[k] = r_valid[k] && (r_row[k] >= 9'(m));
      xw_col[k]   = 10'(p) + 10'(r_row[k]) - 10'(m);
      xw_data[k]  = r_data[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base      <= '0;
      u_sent    <= 1'b1;
      done_sent <= 1'b1;
      u_valid   <= 1'b0;
      done      <= 1'b0;
      for (int i = 0; i < int'(M_MAX); i++) begin
        u_work[i] <= '0;
        u_o[i]    <= '0;
      end
      for (int i = 0; i < int'(N_MAX); i++) xhat_o[i] <= '0;
    end else begin
      u_valid <= 1'b0;
      done    <= 1'b0;
      if (start) begin
        base      <= '0;
        u_sent    <= 1'b0;
        done_sent <= 1'b0;
      end else begin
        if (ev) base <= base + step;
        for (int k = 0; k < int'(NW); k++) begin
          if (r_valid[k]) begin
            if (r_row[k] < 9'(m)) u_work[MI_W'(r_row[k])] <= r_data[k];
            else                  xhat_o[NI_W'(r_row[k] - 9'(m))] <= r_data[k];
          end
        end
        if (!u_sent && base >= 9'(m)) begin
          u_o     <= u_work;
          u_valid <= 1'b1;
          u_sent  <= 1'b1;
        end
        if (!done_sent && u_sent && base >= rows) begin
          done      <= 1'b1;
          done_sent <= 1'b1;
        end
      end
    end
  end

endmodule
