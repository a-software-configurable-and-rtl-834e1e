// reduce_circuit: reduction circuit that completes a T row processed in
// several fetches.
//
// When a row has more columns than the tree has multipliers, the row is fed
// over N_g consecutive fetches and the tree root delivers N_g partial sums
// in consecutive cycles, the first one flagged by in_first. A chain of
// MAX_NG-1 identical stages adds them up; each stage removes one partial sum
// per row: it holds the first partial sum of a row in a register, adds the
// second one to it, and passes every later partial sum through its adder
// with the other operand forced to 0 by a multiplexer (two operand registers,
// a zero multiplexer and one adder per stage). After N_g-1 stages one value
// per row is left; ng_i selects that stage as the output (ng_i = 1 bypasses
// the chain). Stages beyond the selected one see rows of a single value and
// their outputs are unused.
//
// Timing: a stage delivers a row's combined value L_A+2 cycles after the
// row's first partial sum arrives, so the whole circuit adds
// (N_g-1)*(L_A+2) cycles to a row. Rows may follow each other without gaps.
// The stage structure and the (L_A+2) latency per stage follow the document;
// the exact register/flag arrangement is this design's reading of it.
module reduce_circuit #(
  parameter int unsigned MAX_NG  = 4,
  parameter int unsigned LAT_ADD = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  ng_i,         // groups per row, 1..MAX_NG
  input  logic        in_valid,
  input  logic        in_first,     // first partial sum of a row
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data
);

  localparam int unsigned NS = (MAX_NG > 1) ? MAX_NG - 1 : 1;

  // Stream at the input of stage s is index s; index s+1 is its output.
  logic        sv [NS+1];
  logic        sf [NS+1];
  logic [31:0] sd [NS+1];

  assign sv[0] = in_valid;
  assign sf[0] = in_first;
  assign sd[0] = in_data;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic        pending;              // a first partial sum is held
    logic [31:0] held;
    logic [31:0] op_a, op_b;           // the two operand registers
    logic        op_zero;              // multiplexer selects 0 for operand b
    logic        op_v, op_f;
    logic [LAT_ADD-1:0] vpipe, fpipe;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pending <= 1'b0;
        op_v    <= 1'b0;
        op_f    <= 1'b0;
        op_zero <= 1'b1;
        held    <= '0;
        op_a    <= '0;
        op_b    <= '0;
      end else begin
        op_v <= 1'b0;
        if (sv[s]) begin
          if (sf[s]) begin
            held    <= sd[s];
            pending <= 1'b1;
          end else begin
            op_a    <= pending ? held : sd[s];
            op_b    <= sd[s];
            op_zero <= !pending;
            op_f    <= pending;
            op_v    <= 1'b1;
            pending <= 1'b0;
          end
        end
      end
    end

    fp_add #(.LAT(LAT_ADD)) u_add (
      .clk(clk), .a(op_a), .b(op_zero ? 32'h0 : op_b), .y(sd[s+1])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vpipe <= '0;
        fpipe <= '0;
      end else begin
        vpipe <= {vpipe[LAT_ADD-2:0], op_v};
        fpipe <= {fpipe[LAT_ADD-2:0], op_f};
      end
    end
    assign sv[s+1] = vpipe[LAT_ADD-1];
    assign sf[s+1] = fpipe[LAT_ADD-1];
  end

  // Output tap after ng_i-1 stages.
  always_comb begin
    out_valid = sv[0];
    out_data  = sd[0];
    for (int s = 1; s <= NS; s++) begin
      if (int'(ng_i) == s + 1) begin
        out_valid = sv[s];
        out_data  = sd[s];
      end
    end
  end

endmodule
