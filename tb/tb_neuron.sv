// tb_neuron: self-checking test of one neuron.
//
// Runs many random dot products through a 3-input neuron (clear, three accumulate
// cycles, fire) with every activation function, including sums large enough to clamp,
// and compares y and sat with an integer reference model. It also checks that y holds
// between fires and that acc_clr discards a previous sum.
module tb_neuron;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 12;
  localparam int N_IN   = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_clr = 1'b0, acc_en = 1'b0, fire = 1'b0;
  act_e act_sel = ACT_PURELIN;
  logic signed [DATA_W-1:0] x = '0, w = '0, bias = '0, y;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0, cycles = 0;

  neuron #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .N_IN(N_IN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] rnd(int scale);
    // scale 0: small values (|v| < 1.0); 1: full range
    int v = $urandom;
    return (scale == 0) ? DATA_W'(v % 4096) : DATA_W'(v);
  endfunction

  task automatic run_one(int sel, int scale);
    logic signed [DATA_W-1:0] xs [N_IN], ws [N_IN], b;
    longint acc, z, exp_y;
    bit clamped;
    foreach (xs[i]) begin
      xs[i] = rnd(scale);
      ws[i] = rnd(scale);
    end
    b = rnd(scale);
    // garbage into the accumulator first, then clear it
    @(negedge clk); acc_en = 1'b1; x = 16'sh7fff; w = 16'sh7fff;
    @(negedge clk); acc_en = 1'b0; acc_clr = 1'b1;
    @(negedge clk); acc_clr = 1'b0;
    act_sel = act_e'(sel);
    bias = b;
    for (int i = 0; i < N_IN; i++) begin
      acc_en = 1'b1; x = xs[i]; w = ws[i];
      @(negedge clk);
    end
    acc_en = 1'b0;
    fire = 1'b1;
    @(negedge clk);
    fire = 1'b0;
    acc = 0;
    for (int i = 0; i < N_IN; i++) acc += longint'(xs[i]) * longint'(ws[i]);
    acc += longint'(b) <<< FRAC_W;
    z = clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, clamped);
    exp_y = ref_act(sel, z, FRAC_W);
    checks++;
    if (longint'(y) != exp_y || sat != clamped) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH sel=%0d y=%0d exp=%0d sat=%0b exp=%0b", sel, y, exp_y, sat, clamped);
    end
    if (clamped) n_sat++;
    // outputs hold without fire
    x = rnd(1); w = rnd(1); acc_en = 1'b1;
    @(negedge clk); acc_en = 1'b0;
    @(negedge clk);
    checks++;
    if (longint'(y) != exp_y) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (y != 0 || sat != 0) failures++;
    for (int k = 0; k < 3000; k++) run_one(k % 3, (k / 3) % 2);
    // saturation must have been exercised
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("ERROR: no clamped sum was produced");
    end
    $display("clamped sums: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
