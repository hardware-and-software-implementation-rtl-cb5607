// tb_act_fn: exhaustive test of the activation function unit.
//
// Applies every 16-bit input word to each of the three activation functions and
// compares the output bit for bit with an integer model of the piecewise-linear
// approximation, and within a tolerance with the exact sigmoid and tanh. Selector
// value 3 is checked to behave as pure linear on a sample of inputs.
module tb_act_fn;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 12;

  act_e                     sel;
  logic signed [DATA_W-1:0] x, y;
  int checks = 0, failures = 0;
  real max_err [3];

  act_fn #(.DATA_W(DATA_W), .FRAC_W(FRAC_W)) dut (.sel(sel), .x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    real    err, tol;
    for (int s = 0; s < 3; s++) begin
      max_err[s] = 0.0;
      sel = act_e'(s);
      for (int i = -(1 << (DATA_W - 1)); i < (1 << (DATA_W - 1)); i++) begin
        x = DATA_W'(i);
        #1;
        exp_v = ref_act(s, longint'(i), FRAC_W);
        checks++;
        if (longint'(y) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH sel=%0d x=%0d y=%0d expected=%0d", s, i, y, exp_v);
        end
        if (s != 0) begin
          err = real'(y) / 4096.0 - real_act(s, real'(i) / 4096.0);
          if (err < 0.0) err = -err;
          if (err > max_err[s]) max_err[s] = err;
        end
      end
    end
    // approximation error against the exact functions
    for (int s = 1; s < 3; s++) begin
      tol = (s == 1) ? 0.0195 : 0.039;
      checks++;
      if (max_err[s] > tol) begin
        failures++;
        $display("ERROR sel=%0d max error %f above %f", s, max_err[s], tol);
      end
      $display("sel=%0d largest error against the exact function: %f", s, max_err[s]);
    end
    // unused selector value passes x through
    sel = act_e'(2'd3);
    for (int k = 0; k < 100; k++) begin
      x = DATA_W'($urandom);
      #1;
      checks++;
      if (y != x) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
