// tb_weight_mem: self-checking test of the layer weight memory.
//
// Fills a 4-neuron, 3-input memory with random words, reads every column and the
// biases back, checks that writes outside the array leave it unchanged and that
// out-of-range read columns return zero.
module tb_weight_mem;
  localparam int DATA_W = 16;
  localparam int N_NEUR = 4;
  localparam int N_IN   = 3;
  localparam int NW     = 3;   // wider than needed, to reach out-of-range rows
  localparam int IW     = 3;

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [NW-1:0] wr_neur = '0;
  logic [IW-1:0] wr_idx = '0, rd_idx = '0;
  logic signed [DATA_W-1:0] wr_data = '0;
  logic signed [DATA_W-1:0] w_col [N_NEUR];
  logic signed [DATA_W-1:0] bias [N_NEUR];
  logic signed [DATA_W-1:0] model [N_NEUR][N_IN+1];
  int checks = 0, failures = 0;

  weight_mem #(.DATA_W(DATA_W), .N_NEUR(N_NEUR), .N_IN(N_IN), .NW(NW), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int n, int i, logic signed [DATA_W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_neur = NW'(n); wr_idx = IW'(i); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic check_all();
    for (int k = 0; k < 8; k++) begin
      rd_idx = IW'(k);
      #1;
      for (int n = 0; n < N_NEUR; n++) begin
        checks += 2;
        if (w_col[n] !== ((k < N_IN) ? model[n][k] : '0)) begin
          failures++;
          $display("MISMATCH col %0d neuron %0d: %0d", k, n, w_col[n]);
        end
        if (bias[n] !== model[n][N_IN]) failures++;
      end
    end
  endtask

  initial begin
    for (int round = 0; round < 5; round++) begin
      for (int n = 0; n < N_NEUR; n++)
        for (int i = 0; i <= N_IN; i++) begin
          model[n][i] = DATA_W'($urandom);
          write(n, i, model[n][i]);
        end
      check_all();
      // out-of-range writes must not land anywhere
      write(N_NEUR, 0, 16'sh1234);
      write(N_NEUR + 3, 1, 16'sh1234);
      write(0, N_IN + 1, 16'sh1234);
      write(1, 7, 16'sh1234);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
