// weight_mem: trained weights and biases of one MLP layer.
//
// Holds, for each of the layer's N_NEUR neurons, N_IN weights and one bias, as a
// register array of N_NEUR x (N_IN+1) DATA_W-bit words. Column index N_IN of a row is
// that neuron's bias.
//
// Write port (synchronous): when wr_en is high at a rising clk edge, word
// [wr_neur][wr_idx] takes wr_data. Writes with wr_neur >= N_NEUR or wr_idx > N_IN are
// ignored.
// Read port (combinational): w_col[n] is neuron n's weight for input rd_idx, the
// column that all neurons of the layer need in the same cycle; bias[n] is neuron n's
// bias. An out-of-range rd_idx reads zero.
//
// The weights come from training done off-chip and are loaded at run time through the
// write port, so that one bitstream can run any trained model of the configured
// size. That the weights are loaded rather than fixed in a ROM, and the port itself,
// are this design's choices. The array has no reset: every word must be written
// before it is used.
module weight_mem #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned N_NEUR = 4,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned NW     = ann_pkg::idx_w(N_NEUR),
  parameter int unsigned IW     = ann_pkg::idx_w(N_IN + 1)
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [NW-1:0]            wr_neur,
  input  logic [IW-1:0]            wr_idx,
  input  logic signed [DATA_W-1:0] wr_data,
  input  logic [IW-1:0]            rd_idx,
  output logic signed [DATA_W-1:0] w_col [N_NEUR],
  output logic signed [DATA_W-1:0] bias  [N_NEUR]
);

  localparam int unsigned NB = ann_pkg::idx_w(N_NEUR);
  localparam int unsigned CB = ann_pkg::idx_w(N_IN + 1);

  logic signed [DATA_W-1:0] mem [N_NEUR][N_IN+1];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_neur) < N_NEUR && 32'(wr_idx) <= N_IN)
      mem[NB'(wr_neur)][CB'(wr_idx)] <= wr_data;
  end

  always_comb begin
    for (int n = 0; n < N_NEUR; n++) begin
      w_col[n] = (32'(rd_idx) < N_IN) ? mem[n][CB'(rd_idx)] : '0;
      bias[n]  = mem[n][N_IN];
    end
  end

endmodule
