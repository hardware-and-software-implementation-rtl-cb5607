// act_fn: activation function F(x) of a neuron, combinational.
//
// Applies the selected activation function to a fixed-point word x (DATA_W bits,
// FRAC_W fraction bits) and returns y in the same format:
//   ACT_PURELIN  y = x
//   ACT_LOGSIG   y = logsig(x), by the four-segment piecewise-linear approximation
//                "PLAN": with u = |x|
//                  u >= 5          f = 1
//                  2.375 <= u < 5  f = u/32 + 0.84375
//                  1 <= u < 2.375  f = u/8  + 0.625
//                  0 <= u < 1      f = u/4  + 0.5
//                and logsig(x) = f for x >= 0, 1 - f for x < 0.
//                Every slope is a power of two, so the unit is shifts, adds and
//                comparators only; the largest error against the exact sigmoid is
//                about 0.019.
//   ACT_TANSIG   y = 2*logsig(2x) - 1, the identity tanh(x) = 2*sigmoid(2x) - 1,
//                reusing the same approximation (largest error about 0.038).
// The divisions by 32, 8 and 4 are arithmetic right shifts that truncate.
// Selector value 3 is unused and behaves as ACT_PURELIN.
//
// That a neuron ends in an activation function, and that the models use different
// ones, follows the design's description; the choice of functions and the
// piecewise-linear way of computing them are this design's own (a table lookup would
// be the other common choice). Internally the work is done on DATA_W+2 bits so that
// 2x and |x| cannot overflow. FRAC_W must be at least 5 so that the breakpoints and
// offsets are exact.
module act_fn
  import ann_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 12
) (
  input  act_e                     sel,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y
);

  localparam int unsigned W = DATA_W + 2;
  typedef logic signed [W-1:0] wide_t;

  localparam wide_t ONE      = wide_t'(1) <<< FRAC_W;
  localparam wide_t HALF     = ONE >>> 1;
  localparam wide_t TH_5     = wide_t'(5) <<< FRAC_W;
  localparam wide_t TH_2_375 = (wide_t'(19) <<< FRAC_W) >>> 3;
  localparam wide_t C_0_84375 = (wide_t'(27) <<< FRAC_W) >>> 5;
  localparam wide_t C_0_625  = (wide_t'(5) <<< FRAC_W) >>> 3;

  if (FRAC_W < 5 || FRAC_W + 4 > DATA_W) begin : g_bad_format
    $error("act_fn: need 5 <= FRAC_W <= DATA_W-4");
  end

  // Piecewise-linear logistic sigmoid on a wide signed operand.
  function automatic wide_t plan_sigmoid(wide_t v);
    wide_t u, f;
    u = v[W-1] ? -v : v;
    if (u >= TH_5)          f = ONE;
    else if (u >= TH_2_375) f = (u >>> 5) + C_0_84375;
    else if (u >= ONE)      f = (u >>> 3) + C_0_625;
    else                    f = (u >>> 2) + HALF;
    return v[W-1] ? ONE - f : f;
  endfunction

  wide_t xw, yw;

  always_comb begin
    xw = wide_t'(x);
    unique case (sel)
      ACT_LOGSIG: yw = plan_sigmoid(xw);
      ACT_TANSIG: yw = (plan_sigmoid(xw <<< 1) <<< 1) - ONE;
      default:    yw = xw;
    endcase
    y = yw[DATA_W-1:0];
  end

endmodule
