// fp_mul: pipelined IEEE-754 single-precision multiplier.
//
// One multiplier sits at every leaf of the multiply-accumulate tree. The
// product is formed in one combinational stage and then travels through
// LAT pipeline registers, so a new operand pair is accepted every cycle and
// its result appears LAT cycles later (the L_M of the architecture).
//
// Arithmetic: round to nearest, ties to even. Subnormal inputs are read as
// zero and results that would be subnormal are flushed to a signed zero;
// infinities propagate, 0*inf and NaN inputs give a quiet NaN. The document
// asks for single precision and a pipelined unit but gives neither the
// latency nor the subnormal policy; LAT = 6 and flush-to-zero are this
// design's choices (a typical latency of an FPGA floating-point core).
module fp_mul #(
  parameter int unsigned LAT = 6
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] res;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] prod;
    logic [22:0] mant;
    logic        g, st;
    logic signed [10:0] e;
    logic [23:0] mr;

    s    = a[31] ^ b[31];
    ea   = a[30:23];
    eb   = b[30:23];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e    = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    if (prod[47]) begin
      mant = prod[46:24];
      g    = prod[23];
      st   = |prod[22:0];
      e    = e + 11'sd1;
    end else begin
      mant = prod[45:23];
      g    = prod[22];
      st   = |prod[21:0];
    end
    mr = {1'b0, mant} + {23'b0, g & (st | mant[0])};
    if (mr[23]) e = e + 11'sd1;

    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0))
      res = 32'h7FC0_0000;
    else if (ea == 8'hFF || eb == 8'hFF)
      res = (ea == 8'h00 || eb == 8'h00) ? 32'h7FC0_0000 : {s, 8'hFF, 23'h0};
    else if (ea == 8'h00 || eb == 8'h00)
      res = {s, 31'h0};
    else if (e >= 11'sd255)
      res = {s, 8'hFF, 23'h0};
    else if (e <= 11'sd0)
      res = {s, 31'h0};
    else
      res = {s, e[7:0], mr[22:0]};
  end

  logic [31:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= res;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-1];

endmodule
