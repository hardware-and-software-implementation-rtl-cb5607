// tb_mlp_sizes: the MLP engine at several network sizes side by side.
//
// Runs mlp_check on a 1-1-1 network (the smallest, one-bit indices), a 5-8-3 network
// (fan-ins that are not powers of two, more hidden than input neurons) and a 16-10-4
// network (a fan-in that is a power of two, so the bias address needs an extra bit).
// Each checks every output bit for bit against an integer model, and the latency.
module tb_mlp_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  int c [3], f [3];
  logic fin [3];
  int checks, failures;

  always #10 clk = ~clk;

  mlp_check #(.N_IN(1),  .N_HID(1),  .N_OUT(1), .RUNS(90)) u_small  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  mlp_check #(.N_IN(5),  .N_HID(8),  .N_OUT(3), .RUNS(90)) u_medium (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  mlp_check #(.N_IN(16), .N_HID(10), .N_OUT(4), .RUNS(90)) u_large  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("1-1-1: %0d checks, 5-8-3: %0d checks, 16-10-4: %0d checks", c[0], c[1], c[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
