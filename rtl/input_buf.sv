// input_buf: the MLP's input vector.
//
// N_IN DATA_W-bit registers. The host writes element wr_idx with wr_data when wr_en
// is high at a rising clk edge (out-of-range indices are ignored); the hidden layer
// reads element rd_idx combinationally, one element per clock while it runs. An
// out-of-range rd_idx reads zero. The buffer has no reset: every element must be
// written before the first inference.
//
// Acquiring the input data is the first step of an inference; holding it in a small
// register file written by the host is this design's own choice.
module input_buf #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned IW     = ann_pkg::idx_w(N_IN)
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [IW-1:0]            wr_idx,
  input  logic signed [DATA_W-1:0] wr_data,
  input  logic [IW-1:0]            rd_idx,
  output logic signed [DATA_W-1:0] rd_data
);

  logic signed [DATA_W-1:0] mem [N_IN];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_idx) < N_IN)
      mem[wr_idx] <= wr_data;
  end

  assign rd_data = (32'(rd_idx) < N_IN) ? mem[rd_idx] : '0;

endmodule
