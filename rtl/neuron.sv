// neuron: one processing element of the MLP, y = F(sum_n x_n*w_n + b).
//
// The neuron is a multiply-accumulate unit followed by the activation function. Its
// inputs arrive one per clock, each with its weight, in the order its layer's
// sequencer presents them; this mirrors the neuron's own description (multiply each
// input by its weight until all inputs are done, add the bias, apply the activation
// function). The bias and the activation are applied in one further "fire" cycle.
//
// Timing, all on the rising edge of clk:
//   acc_clr  clears the accumulator (has priority over acc_en).
//   acc_en   adds x*w to the accumulator.
//   fire     computes z = sat((acc + b*2^FRAC_W) >> FRAC_W), registers y = F(z) and
//            registers sat = 1 if the clamp to DATA_W bits was needed.
// y and sat then hold until the next fire. rst_n is asynchronous, active low, and
// clears the accumulator, y and sat.
//
// Arithmetic (this design's choice): x, w, b and y are DATA_W-bit fixed-point words
// with FRAC_W fraction bits. Products are kept at full precision (2*FRAC_W fraction
// bits) and summed in an accumulator wide enough for N_IN products and the bias
// without overflow; the only rounding is the truncating right shift back to FRAC_W
// fraction bits, and the only overflow handling is the clamp to the DATA_W range
// before the activation function.
module neuron
  import ann_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 12,
  parameter int unsigned N_IN   = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc_clr,
  input  logic                     acc_en,
  input  logic                     fire,
  input  act_e                     act_sel,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] w,
  input  logic signed [DATA_W-1:0] bias,
  output logic signed [DATA_W-1:0] y,
  output logic                     sat
);

  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(N_IN + 2);
  localparam int unsigned SUM_W  = ACC_W - FRAC_W;

  localparam logic signed [SUM_W-1:0] Z_MAX = SUM_W'({1'b0, {(DATA_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] Z_MIN = -Z_MAX - SUM_W'(1);

  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  acc, acc_b;
  logic signed [SUM_W-1:0]  z_full;
  logic signed [DATA_W-1:0] z, f;
  logic                     clamp;

  assign prod = x * w;

  always_comb begin
    acc_b  = acc + (ACC_W'(bias) <<< FRAC_W);
    z_full = SUM_W'(acc_b >>> FRAC_W);
    clamp  = 1'b1;
    if (z_full > Z_MAX)      z = Z_MAX[DATA_W-1:0];
    else if (z_full < Z_MIN) z = Z_MIN[DATA_W-1:0];
    else begin
      z     = z_full[DATA_W-1:0];
      clamp = 1'b0;
    end
  end

  act_fn #(.DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_act (
    .sel (act_sel),
    .x   (z),
    .y   (f)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      y   <= '0;
      sat <= 1'b0;
    end else begin
      if (acc_clr)     acc <= '0;
      else if (acc_en) acc <= acc + ACC_W'(prod);
      if (fire) begin
        y   <= f;
        sat <= clamp;
      end
    end
  end

endmodule
