// fp_add: pipelined IEEE-754 single-precision adder.
//
// Used at every inner node of the multiply-accumulate tree and in every
// stage of the reduction circuit. The sum is formed in one combinational
// stage (align the smaller operand with guard, round and sticky bits, add
// or subtract, normalise, round to nearest even) and then travels through
// LAT pipeline registers: one operand pair per cycle, result LAT cycles
// later (the L_A of the architecture).
//
// Subnormal inputs count as zero and subnormal results flush to zero;
// infinities propagate and inf-inf or a NaN input gives a quiet NaN. The
// latency LAT = 11 and the flush-to-zero policy are this design's choices;
// the document only requires single precision and a pipelined adder.
module fp_add #(
  parameter int unsigned LAT = 11
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] res;

  always_comb begin
    logic [31:0] big, sml;
    logic [7:0]  eb, es, d;
    logic [26:0] mb, ms, shifted;   // hidden bit, 23 fraction bits, guard, round, sticky
    logic [27:0] sum;
    logic signed [9:0] e;
    logic [4:0]  lz;
    logic        found;
    logic [24:0] mr;
    logic        aa_nan, bb_nan;

    lz     = '0;
    found  = 1'b0;
    res    = '0;
    aa_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    bb_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    eb = big[30:23];
    es = sml[30:23];
    mb = {1'b1, big[22:0], 3'b000};
    ms = {1'b1, sml[22:0], 3'b000};
    d  = eb - es;
    shifted = ms;
    if (d >= 8'd27) shifted = 27'd1;                 // everything lands in the sticky bit
    else begin
      for (int i = 0; i < 27; i++)
        if (i[7:0] < d) shifted = {1'b0, shifted[26:2], shifted[1] | shifted[0]};
    end

    if (big[31] == sml[31]) sum = {1'b0, mb} + {1'b0, shifted};
    else                    sum = {1'b0, mb} - {1'b0, shifted};

    e = 10'(signed'({2'b0, eb}));
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      e   = e + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) found = 1'b1;
        else if (!found) lz = lz + 5'd1;
      end
      sum = sum << lz;
      e   = e - 10'(signed'({5'b0, lz}));
    end
    // sum[26] hidden bit, sum[25:3] fraction, sum[2] guard, sum[1:0] round/sticky
    mr = {1'b0, sum[26:3]} + {24'b0, sum[2] & (sum[1] | sum[0] | sum[3])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'sd1;
    end

    if (aa_nan || bb_nan)
      res = 32'h7FC0_0000;
    else if (eb == 8'hFF)
      res = (es == 8'hFF && big[31] != sml[31]) ? 32'h7FC0_0000 : {big[31], 8'hFF, 23'h0};
    else if (eb == 8'h00)
      res = {a[31] & b[31], 31'h0};                  // both operands are (flushed) zeros
    else if (es == 8'h00)
      res = big;                                     // smaller operand is zero
    else if (sum[26:0] == 27'd0)
      res = 32'h0000_0000;                           // exact cancellation gives +0
    else if (e >= 10'sd255)
      res = {big[31], 8'hFF, 23'h0};
    else if (e <= 10'sd0)
      res = {big[31], 31'h0};
    else
      res = {big[31], e[7:0], mr[22:0]};
  end

  logic [31:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= res;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-1];

endmodule
