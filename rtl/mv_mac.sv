// mv_mac: multiply-accumulate unit of the matrix-vector multiplier.
//
// Each accepted step multiplies LANES elements of a row of A by the matching
// LANES elements of C and adds the products to a running total held in the
// accumulator register, whose output is fed back to the adder. `first` starts
// a new total (the accumulator is loaded instead of added to) and `last`
// marks the step that completes one element of G.
//
// With LANES = 1 this is exactly one multiplier feeding one adder whose
// registered output loops back, as in the source design. LANES > 1 is this
// design's own generalisation: the lane products are summed by an adder tree
// before the accumulator, so a row of COLS elements takes COLS/LANES steps.
//
// Timing: two register stages. The products (summed over the lanes) are
// registered on the step's clock edge; the accumulator updates on the next.
// res_valid pulses one cycle after the accumulator has taken the last step,
// i.e. res is valid two cycles after the `last` step is presented. A new row
// may start on the cycle right after `last`; there is no stall.
// Reset (active high) clears both stages.
module mv_mac #(
  parameter int unsigned DATA_W = mm_pkg::MV_DATA_W,
  parameter int unsigned LANES  = mm_pkg::MV_LANES,
  parameter int unsigned COLS   = mm_pkg::MV_COLS,
  parameter int unsigned ACC_W  = mm_pkg::sum_width(DATA_W, DATA_W, COLS)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [DATA_W-1:0] a [LANES],
  input  logic signed [DATA_W-1:0] c [LANES],
  output logic                     res_valid,
  output logic signed [ACC_W-1:0]  res
);

  logic signed [ACC_W-1:0] lane_sum;
  logic signed [ACC_W-1:0] prod_q;
  logic                    v_q, first_q, last_q;
  logic signed [ACC_W-1:0] acc_q;
  logic                    done_q;

  // Products of all lanes, added together (an adder tree after synthesis).
  always_comb begin
    lane_sum = '0;
    for (int l = 0; l < LANES; l++)
      lane_sum += ACC_W'(a[l] * c[l]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_q  <= '0;
      v_q     <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      v_q     <= in_valid;
      first_q <= first;
      last_q  <= last;
      if (in_valid) prod_q <= lane_sum;
    end
  end

  // Adder with the accumulator register fed back to its second input.
  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= v_q && last_q;
      if (v_q) acc_q <= first_q ? prod_q : acc_q + prod_q;
    end
  end

  assign res_valid = done_q;
  assign res       = acc_q;

endmodule
