// tb_mlp_top: end-to-end test of the MLP engine at its default size (3-4-2).
//
// Each inference loads a fresh random network (weights, biases, input vector) through
// the load ports, picks a hidden and an output activation function, runs it and checks:
//   - y against an integer model of the whole network, bit for bit;
//   - sat_hid and sat_out against the model's clamping;
//   - the latency from start to done, N_IN + N_HID + 4 cycles, and that this is below
//     one microsecond at a 50 MHz clock;
//   - that a start given while busy is ignored;
//   - that a start in the done cycle (back to back) repeats the same result.
// Networks with weights below 1.0 in magnitude, like trained ones, are also compared
// with a real-valued model that uses the exact activation functions, and the mean
// squared error of the outputs is reported per pair of activation functions.
// Every mechanism (each activation function in each layer, clamping in each layer, an
// ignored start, a back-to-back start) is counted and must happen at least once.
module tb_mlp_top;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int DATA_W  = 16;
  localparam int FRAC_W  = 12;
  localparam int N_IN    = 3;
  localparam int N_HID   = 4;
  localparam int N_OUT   = 2;
  localparam int LATENCY = N_IN + N_HID + 4;
  localparam real LSB    = 1.0 / 4096.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_wr_en = 1'b0;
  logic [1:0] x_wr_idx = '0;
  logic signed [DATA_W-1:0] x_wr_data = '0;
  logic w_wr_en = 1'b0, w_wr_layer = 1'b0;
  logic [1:0] w_wr_neur = '0;
  logic [2:0] w_wr_idx = '0;
  logic signed [DATA_W-1:0] w_wr_data = '0;
  act_e act_hid = ACT_PURELIN, act_out = ACT_PURELIN;
  logic start = 1'b0, busy, done, sat_hid, sat_out;
  logic signed [DATA_W-1:0] y [N_OUT];

  mlp_top dut (.*);

  logic signed [DATA_W-1:0] xv [N_IN];
  logic signed [DATA_W-1:0] w1 [N_HID][N_IN+1];
  logic signed [DATA_W-1:0] w2 [N_OUT][N_HID+1];
  longint exp_y [N_OUT];
  bit     exp_sat_h, exp_sat_o;
  real    ry [N_OUT];

  int checks = 0, failures = 0;
  int n_act_hid [3], n_act_out [3];
  int n_sat_hid = 0, n_sat_out = 0, n_ignored = 0, n_b2b = 0;
  real sq_err [3][3];
  int  n_err  [3][3];

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] rnd(int scale);
    int v = $urandom;
    case (scale)
      0:       return DATA_W'(v % 4096);   // |v| < 1.0
      1:       return DATA_W'(v % 16384);  // |v| < 4.0
      default: return DATA_W'(v);          // full range
    endcase
  endfunction

  // Integer model of the network and real-valued model with exact functions.
  task automatic model(int sh, int so);
    longint h [N_HID];
    real    rh [N_HID];
    longint acc;
    real    racc;
    bit     c;
    exp_sat_h = 1'b0;
    exp_sat_o = 1'b0;
    for (int n = 0; n < N_HID; n++) begin
      acc  = longint'(w1[n][N_IN]) <<< FRAC_W;
      racc = real'(w1[n][N_IN]) * LSB;
      for (int i = 0; i < N_IN; i++) begin
        acc  += longint'(xv[i]) * longint'(w1[n][i]);
        racc += real'(xv[i]) * LSB * real'(w1[n][i]) * LSB;
      end
      h[n] = ref_act(sh, clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, c), FRAC_W);
      exp_sat_h |= c;
      rh[n] = real_act(sh, racc);
    end
    for (int o = 0; o < N_OUT; o++) begin
      acc  = longint'(w2[o][N_HID]) <<< FRAC_W;
      racc = real'(w2[o][N_HID]) * LSB;
      for (int i = 0; i < N_HID; i++) begin
        acc  += h[i] * longint'(w2[o][i]);
        racc += rh[i] * real'(w2[o][i]) * LSB;
      end
      exp_y[o] = ref_act(so, clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, c), FRAC_W);
      exp_sat_o |= c;
      ry[o] = real_act(so, racc);
    end
  endtask

  task automatic load(int scale);
    for (int n = 0; n < N_HID; n++)
      for (int i = 0; i <= N_IN; i++) begin
        w1[n][i] = rnd(scale);
        @(negedge clk);
        w_wr_en = 1'b1; w_wr_layer = 1'b0; w_wr_neur = 2'(n); w_wr_idx = 3'(i);
        w_wr_data = w1[n][i];
      end
    for (int o = 0; o < N_OUT; o++)
      for (int i = 0; i <= N_HID; i++) begin
        w2[o][i] = rnd(scale);
        @(negedge clk);
        w_wr_en = 1'b1; w_wr_layer = 1'b1; w_wr_neur = 2'(o); w_wr_idx = 3'(i);
        w_wr_data = w2[o][i];
      end
    @(negedge clk);
    w_wr_en = 1'b0;
    for (int i = 0; i < N_IN; i++) begin
      xv[i] = rnd(scale);
      x_wr_en = 1'b1; x_wr_idx = 2'(i); x_wr_data = xv[i];
      @(negedge clk);
    end
    x_wr_en = 1'b0;
  endtask

  // Start one inference and wait for done; poke a start while busy if asked.
  // Returns the latency in cycles.
  task automatic run(bit poke, output int lat);
    realtime t0;
    start = 1'b1;
    @(posedge clk);
    t0 = $realtime;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done && lat < 100) begin
      start = poke && (lat == 3);
      if (start) n_ignored++;
      @(negedge clk);
      lat++;
    end
    start = 1'b0;
    // execution time at the 50 MHz clock must stay below one microsecond
    checks++;
    if ($realtime - t0 >= 1000.0) begin
      failures++;
      $display("ERROR inference took %0t ns", $realtime - t0);
    end
  endtask

  task automatic check_outputs(string tag);
    for (int o = 0; o < N_OUT; o++) begin
      checks++;
      if (longint'(y[o]) != exp_y[o]) begin
        failures++;
        if (failures < 10) $display("MISMATCH %s y[%0d]=%0d expected %0d", tag, o, y[o], exp_y[o]);
      end
    end
  endtask

  initial begin
    int lat, sh, so, scale;
    real e;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        sq_err[a][b] = 0.0;
        n_err[a][b]  = 0;
      end
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done) failures++;
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 900; k++) begin
      sh = k % 3;
      so = (k / 3) % 3;
      scale = (k / 9) % 3;
      load(scale);
      act_hid = act_e'(sh);
      act_out = act_e'(so);
      model(sh, so);
      run(k % 4 == 1, lat);
      checks++;
      if (lat != LATENCY) begin
        failures++;
        $display("ERROR latency %0d, expected %0d", lat, LATENCY);
      end
      check_outputs("run");
      checks += 2;
      if (sat_hid != exp_sat_h) failures++;
      if (sat_out != exp_sat_o) failures++;
      if (sat_hid) n_sat_hid++;
      if (sat_out) n_sat_out++;
      n_act_hid[sh]++;
      n_act_out[so]++;
      if (scale == 0)
        for (int o = 0; o < N_OUT; o++) begin
          e = real'(y[o]) * LSB - ry[o];
          sq_err[sh][so] += e * e;
          n_err[sh][so]++;
        end
      // back to back: the next start is given in the cycle done is high
      if (k % 5 == 0) begin
        checks++;
        if (!done) failures++;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        checks++;
        if (!busy) begin
          failures++;
          $display("ERROR back-to-back start not taken");
        end else n_b2b++;
        lat = 0;
        while (!done && lat < 100) begin
          @(negedge clk);
          lat++;
        end
        checks++;
        if (lat != LATENCY) failures++;
        check_outputs("back-to-back");
      end
      @(negedge clk);
      // nothing may still be running
      checks++;
      if (busy) failures++;
    end
    // accuracy with weights below 1.0, against exact arithmetic
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        e = sq_err[a][b] / real'(n_err[a][b]);
        $display("activation hidden=%0d output=%0d: MSE against exact model %e over %0d outputs",
                 a, b, e, n_err[a][b]);
        checks++;
        if (e > 2.0e-3) failures++;
      end
    // every mechanism must have happened
    for (int s = 0; s < 3; s++) begin
      checks += 2;
      if (n_act_hid[s] == 0) failures++;
      if (n_act_out[s] == 0) failures++;
    end
    checks += 4;
    if (n_sat_hid == 0) failures++;
    if (n_sat_out == 0) failures++;
    if (n_ignored == 0) failures++;
    if (n_b2b == 0) failures++;
    $display("hidden activations %0d/%0d/%0d, output activations %0d/%0d/%0d",
             n_act_hid[0], n_act_hid[1], n_act_hid[2], n_act_out[0], n_act_out[1], n_act_out[2]);
    $display("clamped hidden %0d, clamped output %0d, ignored starts %0d, back-to-back %0d",
             n_sat_hid, n_sat_out, n_ignored, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
