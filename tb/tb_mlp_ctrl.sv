// tb_mlp_ctrl: self-checking test of the inference controller.
//
// Plays both layers with behavioural stand-ins that answer a start with a done pulse
// after a random number of cycles, and checks that: the hidden layer is started in the
// cycle start is given; the output layer is started exactly when the hidden layer
// reports done and never before; done follows the output layer's done by one cycle;
// busy covers the whole inference; and a start while busy is ignored.
module tb_mlp_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, hid_done = 1'b0, out_done = 1'b0;
  logic hid_start, out_start, busy, done;
  int checks = 0, failures = 0;
  int n_hid_start = 0, n_out_start = 0, n_done = 0, n_ignored = 0;

  mlp_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("ERROR %s = %0b, expected %0b at %0t", what, got, want, $time);
    end
  endtask

  task automatic one_inference(bit poke_start);
    int hd, od;
    hd = 1 + ($urandom % 6);
    od = 1 + ($urandom % 6);
    @(negedge clk);
    start = 1'b1;
    #1 expect_bit("hid_start", hid_start, 1'b1);
    expect_bit("out_start", out_start, 1'b0);
    @(negedge clk);
    start = 1'b0;
    expect_bit("busy", busy, 1'b1);
    // hidden layer working
    repeat (hd) begin
      if (poke_start) start = 1'b1;
      #1 expect_bit("hid_start while busy", hid_start, 1'b0);
      expect_bit("out_start early", out_start, 1'b0);
      if (poke_start) n_ignored++;
      @(negedge clk);
      start = 1'b0;
    end
    hid_done = 1'b1;
    #1 expect_bit("out_start", out_start, 1'b1);
    @(negedge clk);
    hid_done = 1'b0;
    n_out_start++;
    // output layer working
    repeat (od) begin
      hid_done = $urandom_range(0, 1);  // a stray pulse must not restart the output layer
      #1 expect_bit("out_start again", out_start, 1'b0);
      expect_bit("done early", done, 1'b0);
      expect_bit("busy", busy, 1'b1);
      @(negedge clk);
    end
    hid_done = 1'b0;
    out_done = 1'b1;
    #1 expect_bit("done early", done, 1'b0);
    @(negedge clk);
    out_done = 1'b0;
    expect_bit("done", done, 1'b1);
    expect_bit("busy after done", busy, 1'b0);
    n_done++;
    @(negedge clk);
    expect_bit("done one cycle", done, 1'b0);
    n_hid_start++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_bit("busy in reset", busy, 1'b0);
    rst_n = 1'b1;
    // a stray hid_done while idle must not start the output layer
    hid_done = 1'b1;
    #1 expect_bit("out_start while idle", out_start, 1'b0);
    @(negedge clk);
    hid_done = 1'b0;
    for (int k = 0; k < 200; k++) one_inference(k % 2 == 1);
    checks++;
    if (n_ignored == 0 || n_done != 200) failures++;
    $display("inferences %0d, ignored starts %0d", n_done, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
