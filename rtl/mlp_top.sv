// mlp_top: multilayer perceptron (MLP) inference engine for an FPGA fabric.
//
// The network has an input layer of N_IN inputs, one hidden layer of N_HID neurons
// and an output layer of N_OUT neurons, fully connected and feed-forward. Each neuron
// computes y = F(sum x*w + b). The host loads the trained weights and biases and the
// input vector, picks an activation function for each layer, and pulses start; the
// engine computes the hidden layer, then the output layer, and pulses done with the
// N_OUT results on y.
//
// Structure:
//   input_buf  holds the input vector (x_wr_* port).
//   u_hidden   mlp_layer of N_HID neurons reading input_buf.
//   u_output   mlp_layer of N_OUT neurons reading the hidden layer's outputs.
//   mlp_ctrl   runs the two layers one after the other.
// Weights are written through w_wr_*: w_wr_layer = 0 selects the hidden layer and 1
// the output layer, w_wr_neur the neuron, w_wr_idx the input it weights; w_wr_idx
// equal to the layer's fan-in (N_IN for hidden, N_HID for output) addresses the
// neuron's bias. Write nothing while busy.
//
// Timing: start is sampled at a rising clk edge while idle. The hidden layer takes
// N_IN+1 cycles, the hand-over one, the output layer N_HID+1 and the final done one,
// so done is seen LATENCY = N_IN + N_HID + 4 cycles after start was sampled (11 cycles
// for the default 3-4-2 network, 220 ns at a 50 MHz clock). y holds until the next
// inference ends. sat_hid / sat_out report that some neuron of that layer had to
// clamp its sum to the number range in the last inference.
//
// The network shape, the neuron equation and the hidden-then-output order follow the
// design's description; the default 3-4-2 size is the example network it draws, and
// the number format (16-bit, 12 fraction bits), the activation set and its
// piecewise-linear realisation, the serial-input / parallel-neuron datapath and the
// load ports are this design's own choices.
module mlp_top
  import ann_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 12,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_HID  = 4,
  parameter int unsigned N_OUT  = 2,
  parameter int unsigned XW     = idx_w(N_IN),
  parameter int unsigned NW     = idx_w((N_HID > N_OUT) ? N_HID : N_OUT),
  parameter int unsigned WIW    = idx_w(((N_IN > N_HID) ? N_IN : N_HID) + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input vector
  input  logic                     x_wr_en,
  input  logic [XW-1:0]            x_wr_idx,
  input  logic signed [DATA_W-1:0] x_wr_data,
  // weights and biases
  input  logic                     w_wr_en,
  input  logic                     w_wr_layer,
  input  logic [NW-1:0]            w_wr_neur,
  input  logic [WIW-1:0]           w_wr_idx,
  input  logic signed [DATA_W-1:0] w_wr_data,
  // activation function of each layer
  input  act_e                     act_hid,
  input  act_e                     act_out,
  // control and result
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic signed [DATA_W-1:0] y [N_OUT],
  output logic                     sat_hid,
  output logic                     sat_out
);

  localparam int unsigned HW = idx_w(N_HID);

  logic                     hid_start, out_start, hid_done, out_done;
  logic                     hid_busy, out_busy;
  logic [XW-1:0]            hid_x_idx;
  logic [HW-1:0]            out_x_idx;
  logic signed [DATA_W-1:0] hid_x, out_x;
  logic signed [DATA_W-1:0] h [N_HID];

  input_buf #(.DATA_W(DATA_W), .N_IN(N_IN), .IW(XW)) u_inbuf (
    .clk     (clk),
    .wr_en   (x_wr_en),
    .wr_idx  (x_wr_idx),
    .wr_data (x_wr_data),
    .rd_idx  (hid_x_idx),
    .rd_data (hid_x)
  );

  mlp_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .hid_done  (hid_done),
    .out_done  (out_done),
    .hid_start (hid_start),
    .out_start (out_start),
    .busy      (busy),
    .done      (done)
  );

  mlp_layer #(
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .N_IN(N_IN), .N_NEUR(N_HID),
    .XW(XW), .NW(NW), .WIW(WIW)
  ) u_hidden (
    .clk     (clk),
    .rst_n   (rst_n),
    .act_sel (act_hid),
    .start   (hid_start),
    .busy    (hid_busy),
    .done    (hid_done),
    .x_idx   (hid_x_idx),
    .x_in    (hid_x),
    .wr_en   (w_wr_en && !w_wr_layer),
    .wr_neur (w_wr_neur),
    .wr_idx  (w_wr_idx),
    .wr_data (w_wr_data),
    .y       (h),
    .sat     (sat_hid)
  );

  // The output layer's inputs are the hidden layer's registered outputs.
  assign out_x = (32'(out_x_idx) < N_HID) ? h[out_x_idx] : '0;

  mlp_layer #(
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .N_IN(N_HID), .N_NEUR(N_OUT),
    .XW(HW), .NW(NW), .WIW(WIW)
  ) u_output (
    .clk     (clk),
    .rst_n   (rst_n),
    .act_sel (act_out),
    .start   (out_start),
    .busy    (out_busy),
    .done    (out_done),
    .x_idx   (out_x_idx),
    .x_in    (out_x),
    .wr_en   (w_wr_en && w_wr_layer),
    .wr_neur (w_wr_neur),
    .wr_idx  (w_wr_idx),
    .wr_data (w_wr_data),
    .y       (y),
    .sat     (sat_out)
  );

  // Only one layer runs at a time.
  a_one_layer_at_a_time: assert property (
    @(posedge clk) disable iff (!rst_n) !(hid_busy && out_busy)
  ) else $error("mlp_top: both layers busy");

endmodule
