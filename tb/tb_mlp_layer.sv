// tb_mlp_layer: self-checking test of one MLP layer.
//
// A 5-input, 3-neuron layer is loaded with random weights and biases, and its inputs
// are served from a testbench array through the x_idx / x_in port. Each run is checked
// against an integer reference model for all three activation functions, with small
// and full-range numbers (so that clamping happens), and the latency from start to
// done is checked to be N_IN+1 cycles. A start while busy must be ignored.
module tb_mlp_layer;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 12;
  localparam int N_IN   = 5;
  localparam int N_NEUR = 3;
  localparam int XW     = idx_w(N_IN);
  localparam int NW     = idx_w(N_NEUR);
  localparam int WIW    = idx_w(N_IN + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  act_e act_sel = ACT_PURELIN;
  logic start = 1'b0, busy, done, sat;
  logic [XW-1:0] x_idx;
  logic signed [DATA_W-1:0] x_in;
  logic wr_en = 1'b0;
  logic [NW-1:0] wr_neur = '0;
  logic [WIW-1:0] wr_idx = '0;
  logic signed [DATA_W-1:0] wr_data = '0;
  logic signed [DATA_W-1:0] y [N_NEUR];

  logic signed [DATA_W-1:0] xv [N_IN];
  logic signed [DATA_W-1:0] wv [N_NEUR][N_IN+1];
  int checks = 0, failures = 0, n_sat = 0, n_ignored = 0;

  mlp_layer #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .N_IN(N_IN), .N_NEUR(N_NEUR)) dut (.*);

  assign x_in = (int'(x_idx) < N_IN) ? xv[x_idx] : '0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] rnd(int scale);
    int v = $urandom;
    return (scale == 0) ? DATA_W'(v % 4096) : DATA_W'(v);
  endfunction

  task automatic run(int sel, int scale);
    int lat;
    bit clamped, any_clamp;
    longint acc, z, e;
    for (int n = 0; n < N_NEUR; n++)
      for (int i = 0; i <= N_IN; i++) begin
        wv[n][i] = rnd(scale);
        @(negedge clk);
        wr_en = 1'b1; wr_neur = NW'(n); wr_idx = WIW'(i); wr_data = wv[n][i];
      end
    @(negedge clk);
    wr_en = 1'b0;
    foreach (xv[i]) xv[i] = rnd(scale);
    act_sel = act_e'(sel);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      if (lat == 2) begin
        start = 1'b1;  // ignored: layer is busy
        n_ignored++;
      end else start = 1'b0;
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    start = 1'b0;
    checks++;
    if (lat != N_IN + 1) begin
      failures++;
      $display("ERROR latency %0d, expected %0d", lat, N_IN + 1);
    end
    any_clamp = 1'b0;
    for (int n = 0; n < N_NEUR; n++) begin
      acc = longint'(wv[n][N_IN]) <<< FRAC_W;
      for (int i = 0; i < N_IN; i++) acc += longint'(xv[i]) * longint'(wv[n][i]);
      z = clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, clamped);
      any_clamp |= clamped;
      e = ref_act(sel, z, FRAC_W);
      checks++;
      if (longint'(y[n]) != e) begin
        failures++;
        if (failures < 10) $display("MISMATCH neuron %0d sel %0d: %0d expected %0d", n, sel, y[n], e);
      end
    end
    checks++;
    if (sat != any_clamp) failures++;
    if (any_clamp) n_sat++;
    // the ignored start must not have triggered a second run
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("ERROR layer restarted by a start while busy");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 600; k++) run(k % 3, (k / 3) % 2);
    checks++;
    if (n_sat == 0 || n_ignored == 0) failures++;
    $display("runs with clamping %0d, ignored starts %0d", n_sat, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
