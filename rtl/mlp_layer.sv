// mlp_layer: one fully connected layer of N_NEUR neurons working in parallel.
//
// Every neuron of the layer sees every input of the layer. The layer presents its
// inputs one per clock: in step k it drives x_idx = k, the source (input buffer or
// previous layer) returns x_in combinationally, the weight memory returns column k
// (one weight per neuron) and all N_NEUR neurons accumulate x_in * w[n][k] at once.
// After the last input a single fire cycle adds each neuron's bias, clamps and applies
// the activation function act_sel.
//
// Handshake and timing: start is sampled at a rising clk edge while the layer is idle
// (it is ignored while busy); that edge clears the accumulators. The next N_IN edges
// accumulate inputs 0 .. N_IN-1, the edge after them fires, and done is a one-cycle
// pulse that rises together with the new outputs y. So done is seen N_IN+1 cycles
// after start was sampled, and y and sat then hold until the layer fires again.
// sat is high when any neuron had to clamp its sum to the DATA_W range. busy is high
// from the cycle after start until done.
//
// Weights and biases are written through wr_* (see weight_mem); writing them while the
// layer is busy is a usage error and is flagged by an assertion.
//
// Neurons in parallel and inputs in series is this design's choice of the many
// possible arrangements: it gives one multiplier per neuron and a layer latency that
// grows with the fan-in only.
module mlp_layer
  import ann_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 12,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_NEUR = 4,
  parameter int unsigned XW     = idx_w(N_IN),
  parameter int unsigned NW     = idx_w(N_NEUR),
  parameter int unsigned WIW    = idx_w(N_IN + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  act_e                     act_sel,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [XW-1:0]            x_idx,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     wr_en,
  input  logic [NW-1:0]            wr_neur,
  input  logic [WIW-1:0]           wr_idx,
  input  logic signed [DATA_W-1:0] wr_data,
  output logic signed [DATA_W-1:0] y [N_NEUR],
  output logic                     sat
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_FIRE} state_e;

  state_e                   state;
  logic [XW-1:0]            cnt;
  logic                     acc_clr, acc_en, fire;
  logic signed [DATA_W-1:0] w_col [N_NEUR];
  logic signed [DATA_W-1:0] bias  [N_NEUR];
  logic [N_NEUR-1:0]        sat_n;

  assign acc_clr = (state == S_IDLE) && start;
  assign acc_en  = (state == S_MAC);
  assign fire    = (state == S_FIRE);
  assign busy    = (state != S_IDLE);
  assign x_idx   = cnt;
  assign sat     = |sat_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MAC;
          cnt   <= '0;
        end
        S_MAC: begin
          if (32'(cnt) == N_IN - 1) state <= S_FIRE;
          else                      cnt   <= cnt + 1'b1;
        end
        S_FIRE: begin
          state <= S_IDLE;
          cnt   <= '0;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  weight_mem #(
    .DATA_W(DATA_W), .N_NEUR(N_NEUR), .N_IN(N_IN), .NW(NW), .IW(WIW)
  ) u_wmem (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_neur (wr_neur),
    .wr_idx  (wr_idx),
    .wr_data (wr_data),
    .rd_idx  (WIW'(cnt)),
    .w_col   (w_col),
    .bias    (bias)
  );

  for (genvar n = 0; n < N_NEUR; n++) begin : g_neuron
    neuron #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .N_IN(N_IN)) u_neuron (
      .clk     (clk),
      .rst_n   (rst_n),
      .acc_clr (acc_clr),
      .acc_en  (acc_en),
      .fire    (fire),
      .act_sel (act_sel),
      .x       (x_in),
      .w       (w_col[n]),
      .bias    (bias[n]),
      .y       (y[n]),
      .sat     (sat_n[n])
    );
  end

  // The weights must not change under a running layer.
  a_no_write_while_busy: assert property (
    @(posedge clk) disable iff (!rst_n) wr_en |-> !busy
  ) else $error("mlp_layer: weight write while busy");

endmodule
