// lqr_pkg: types and constants shared by the LQR coprocessor.
//
// The coprocessor evaluates one matrix-vector product per control period,
//   [u_k ; xhat_{k+1}] = T * [y_k ; xhat_k],
// where T is an (M+N) x (P+N) single-precision matrix loaded by software.
// Rows 0..M-1 of T produce the control vector u, rows M..M+N-1 the next
// state estimate; columns 0..P-1 multiply the sensor vector y, columns
// P..P+N-1 the current estimate xhat.
//
// The configuration record below holds what software writes into the
// configuration register file: the sizes N, M and P, the tree depth, the
// adder and multiplier latencies and the "mechanism info" (merge or reduce,
// and the group size that goes with it). The field widths and the encoding
// of the mechanism info are this design's choice.
package lqr_pkg;

  typedef logic [31:0] fp32_t;            // IEEE-754 single precision

  localparam int unsigned DIM_W = 8;      // width of N, M, P
  localparam int unsigned LAT_W = 5;      // width of a configured latency

  typedef enum logic {
    MECH_MERGE  = 1'b0,   // several rows of T per fetch, taps inside the tree
    MECH_REDUCE = 1'b1    // one row spread over N_g fetches, reduction circuit
  } mech_e;

  typedef struct packed {
    logic [DIM_W-1:0] n;        // number of plant states
    logic [DIM_W-1:0] m;        // number of control outputs
    logic [DIM_W-1:0] p;        // number of sensor values
    logic [3:0]       depth;    // adder levels of the tree (D_p)
    logic [LAT_W-1:0] lat_add;  // adder latency L_A in cycles
    logic [LAT_W-1:0] lat_mul;  // multiplier latency L_M in cycles
    mech_e            mech;     // merge or reduce
    logic [3:0]       glog;     // merge: ceil(log2(c)), size of a row group is 2^glog
    logic [7:0]       ng;       // reduce: N_g = ceil(c / 2^D), fetches per row
    logic [15:0]      t_base;   // base address of T inside every BRAM
  } lqr_cfg_t;

  // Register indices (word offsets) in the configuration region.
  localparam logic [7:0] REG_CTRL    = 8'h00;  // W: bit0 start, bit1 auto-start on sensor strobe
  localparam logic [7:0] REG_STATUS  = 8'h01;  // R: bit0 busy, bit1 done, bit2 u ready, bit3 xhat page
  localparam logic [7:0] REG_N       = 8'h02;
  localparam logic [7:0] REG_M       = 8'h03;
  localparam logic [7:0] REG_P       = 8'h04;
  localparam logic [7:0] REG_DEPTH   = 8'h05;
  localparam logic [7:0] REG_LAT_ADD = 8'h06;
  localparam logic [7:0] REG_LAT_MUL = 8'h07;
  localparam logic [7:0] REG_MECH    = 8'h08;  // bit0 mech, bits 7:4 glog, bits 15:8 ng
  localparam logic [7:0] REG_T_BASE  = 8'h09;
  localparam logic [7:0] REG_CYC_U   = 8'h0A;  // R: cycles from start to u ready
  localparam logic [7:0] REG_CYC_END = 8'h0B;  // R: cycles from start to iteration done
  localparam logic [7:0] REG_ITER    = 8'h0C;  // R: completed iterations

  // Regions of the word address (bits 17:16).
  localparam logic [1:0] RGN_REGS = 2'd0;
  localparam logic [1:0] RGN_T    = 2'd1;
  localparam logic [1:0] RGN_XHAT = 2'd2;
  localparam logic [1:0] RGN_U    = 2'd3;

endpackage
