// tb_input_buf: self-checking test of the input-vector buffer.
//
// Writes random vectors into a 5-entry buffer, reads every element back, and checks
// that out-of-range writes change nothing and out-of-range reads return zero.
module tb_input_buf;
  localparam int DATA_W = 16;
  localparam int N_IN   = 5;
  localparam int IW     = 3;

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [IW-1:0] wr_idx = '0, rd_idx = '0;
  logic signed [DATA_W-1:0] wr_data = '0, rd_data;
  logic signed [DATA_W-1:0] model [N_IN];
  int checks = 0, failures = 0;

  input_buf #(.DATA_W(DATA_W), .N_IN(N_IN), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int i, logic signed [DATA_W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = IW'(i); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic check_all();
    for (int k = 0; k < 8; k++) begin
      rd_idx = IW'(k);
      #1;
      checks++;
      if (rd_data !== ((k < N_IN) ? model[k] : '0)) begin
        failures++;
        $display("MISMATCH element %0d: %0d", k, rd_data);
      end
    end
  endtask

  initial begin
    for (int round = 0; round < 10; round++) begin
      for (int i = 0; i < N_IN; i++) begin
        model[i] = DATA_W'($urandom);
        write(i, model[i]);
      end
      check_all();
      write(N_IN, 16'sh5a5a);
      write(7, 16'sh5a5a);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
