// lqr_ctrl: controller FSM and address generator of the coprocessor.
//
// On start the FSM walks through the fetches of one iteration, one per
// cycle: the BRAM address is the configured base address plus a fetch
// offset, and a compare against the fetch count computed from the
// configuration ends the walk. In merge mode there are ceil((M+N)/N_f)
// fetches with N_f = 2^(depth-glog); in reduce mode (M+N)*N_g fetches, and a
// group counter 0..N_g-1 tells storage which column group a fetch covers.
//
// The FSM does not watch the arithmetic units. It predicts when a fetch's
// result leaves the tree from the latencies software wrote into the
// configuration registers: a fetch issued in cycle t has its merge result at
// tree level depth-glog in cycle t+1+L_M+glog*L_A, and its root result (fed
// to the reduction circuit, flagged "first" for group 0) in cycle
// t+1+L_M+depth*L_A. These strobes travel down a shift register and are
// tapped at the configured delay; the configured latencies must therefore
// match the latencies the arithmetic units were built with. The iteration
// ends when the output block reports that every row has arrived.
// Configuration fields are sampled at start.
module lqr_ctrl #(
  parameter int unsigned DEPTH  = 6,
  parameter int unsigned TDEPTH = 1024,
  localparam int unsigned TA_W  = $clog2(TDEPTH),
  localparam int unsigned DLY   = 1 + 31 * (DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  lqr_pkg::lqr_cfg_t cfg,
  input  logic              out_done,    // all rows of this iteration arranged
  output logic              busy,
  output logic              rd_en,
  output logic [TA_W-1:0]   rd_addr,
  output logic [7:0]        rd_group,
  output logic              tap_valid,   // merge result at the tap level
  output logic              red_valid,   // root result into the reduction circuit
  output logic              red_first
);
  import lqr_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DRAIN} state_e;
  state_e state;

  logic [15:0] f, f_last;
  logic [7:0]  grp;
  lqr_cfg_t    c;
  logic [DLY-1:0] v_sr, f_sr;
  int unsigned d_tap, d_root;

  // fetch count of an iteration
  function automatic logic [15:0] fetches(input lqr_cfg_t x);
    logic [8:0] l;
    logic [3:0] sh;
    l = 9'(x.m) + 9'(x.n);
    if (x.mech == MECH_REDUCE) return 16'(l) * 16'(x.ng);
    sh = x.depth - x.glog;
    return 16'((16'(l) + (16'd1 << sh) - 16'd1) >> sh);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      f      <= '0;
      f_last <= '0;
      grp    <= '0;
      c      <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          c      <= cfg;
          f      <= '0;
          grp    <= '0;
          f_last <= fetches(cfg) - 16'd1;
          state  <= S_FETCH;
        end
        S_FETCH: begin
          f <= f + 16'd1;
          if (c.mech == MECH_REDUCE) grp <= (grp == c.ng - 8'd1) ? 8'd0 : grp + 8'd1;
          if (f == f_last) state <= S_DRAIN;
        end
        S_DRAIN: if (out_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign rd_en    = (state == S_FETCH);
  assign rd_addr  = TA_W'(c.t_base + f);
  assign rd_group = grp;

  // result strobes: bit i of the shift registers is the fetch strobe delayed by i+1 cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sr <= '0;
      f_sr <= '0;
    end else begin
      v_sr <= {v_sr[DLY-2:0], rd_en};
      f_sr <= {f_sr[DLY-2:0], rd_en && grp == 8'd0};
    end
  end

  always_comb begin
    d_tap  = 1 + int'(c.lat_mul) + int'(c.glog) * int'(c.lat_add);
    d_root = 1 + int'(c.lat_mul) + int'(c.depth) * int'(c.lat_add);
    if (d_tap > DLY)  d_tap = DLY;
    if (d_root > DLY) d_root = DLY;
    tap_valid = (c.mech == MECH_MERGE)  && v_sr[d_tap - 1];
    red_valid = (c.mech == MECH_REDUCE) && v_sr[d_root - 1];
    red_first = f_sr[d_root - 1];
  end

endmodule
