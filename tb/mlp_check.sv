// mlp_check: drives one mlp_top of a given size through random inferences and checks
// it against an integer model of the network.
//
// Used by tb_mlp_sizes to run several network sizes side by side. For each of RUNS
// inferences it loads random weights, biases and inputs (magnitudes below 2.0), picks
// the activation pair from the run number, runs the engine and compares every output
// bit for bit and the latency (N_IN + N_HID + 4 cycles). It reports its counts on
// checks / failures and raises finished at the end. clk and rst_n come from the parent.
module mlp_check
  import ann_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N_IN  = 3,
  parameter int N_HID = 4,
  parameter int N_OUT = 2,
  parameter int RUNS  = 50
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int DATA_W = 16;
  localparam int FRAC_W = 12;
  localparam int XW  = idx_w(N_IN);
  localparam int NW  = idx_w((N_HID > N_OUT) ? N_HID : N_OUT);
  localparam int WIW = idx_w(((N_IN > N_HID) ? N_IN : N_HID) + 1);

  logic x_wr_en = 1'b0;
  logic [XW-1:0] x_wr_idx = '0;
  logic signed [DATA_W-1:0] x_wr_data = '0;
  logic w_wr_en = 1'b0, w_wr_layer = 1'b0;
  logic [NW-1:0] w_wr_neur = '0;
  logic [WIW-1:0] w_wr_idx = '0;
  logic signed [DATA_W-1:0] w_wr_data = '0;
  act_e act_hid = ACT_PURELIN, act_out = ACT_PURELIN;
  logic start = 1'b0, busy, done, sat_hid, sat_out;
  logic signed [DATA_W-1:0] y [N_OUT];

  mlp_top #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT)) dut (.*);

  logic signed [DATA_W-1:0] xv [N_IN];
  logic signed [DATA_W-1:0] w1 [N_HID][N_IN+1];
  logic signed [DATA_W-1:0] w2 [N_OUT][N_HID+1];

  function automatic logic signed [DATA_W-1:0] rnd();
    int v = $urandom;
    return DATA_W'(v % 8192);
  endfunction

  initial begin
    longint h [N_HID];
    longint acc, e;
    bit c;
    int lat;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    for (int r = 0; r < RUNS; r++) begin
      @(negedge clk);
      for (int n = 0; n < N_HID; n++)
        for (int i = 0; i <= N_IN; i++) begin
          w1[n][i] = rnd();
          w_wr_en = 1'b1; w_wr_layer = 1'b0; w_wr_neur = NW'(n); w_wr_idx = WIW'(i);
          w_wr_data = w1[n][i];
          @(negedge clk);
        end
      for (int o = 0; o < N_OUT; o++)
        for (int i = 0; i <= N_HID; i++) begin
          w2[o][i] = rnd();
          w_wr_en = 1'b1; w_wr_layer = 1'b1; w_wr_neur = NW'(o); w_wr_idx = WIW'(i);
          w_wr_data = w2[o][i];
          @(negedge clk);
        end
      w_wr_en = 1'b0;
      for (int i = 0; i < N_IN; i++) begin
        xv[i] = rnd();
        x_wr_en = 1'b1; x_wr_idx = XW'(i); x_wr_data = xv[i];
        @(negedge clk);
      end
      x_wr_en = 1'b0;
      act_hid = act_e'(r % 3);
      act_out = act_e'((r / 3) % 3);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done && lat < 1000) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != N_IN + N_HID + 4) failures++;
      for (int n = 0; n < N_HID; n++) begin
        acc = longint'(w1[n][N_IN]) <<< FRAC_W;
        for (int i = 0; i < N_IN; i++) acc += longint'(xv[i]) * longint'(w1[n][i]);
        h[n] = ref_act(r % 3, clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, c), FRAC_W);
      end
      for (int o = 0; o < N_OUT; o++) begin
        acc = longint'(w2[o][N_HID]) <<< FRAC_W;
        for (int i = 0; i < N_HID; i++) acc += h[i] * longint'(w2[o][i]);
        e = ref_act((r / 3) % 3, clamp_w(floor_div_pow2(acc, FRAC_W), DATA_W, c), FRAC_W);
        checks++;
        if (longint'(y[o]) != e) begin
          failures++;
          if (failures < 5)
            $display("MISMATCH %0d-%0d-%0d run %0d y[%0d]=%0d expected %0d",
                     N_IN, N_HID, N_OUT, r, o, y[o], e);
        end
      end
    end
    finished = 1'b1;
  end
endmodule
