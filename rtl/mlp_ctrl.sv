// mlp_ctrl: inference controller of the MLP.
//
// Runs one inference as two layer passes in order: the hidden layer is processed to
// completion, and only then the output layer, whose inputs are the hidden layer's
// outputs. This is the order of the overall flow of the network (acquire the input,
// process the hidden neurons, then the output neurons).
//
// Handshake and timing: start is sampled at a rising clk edge while the controller is
// idle and is passed on in the same cycle as hid_start (combinationally), so the hidden
// layer sees the same edge. When the hidden layer's done pulse arrives, out_start is
// raised in that same cycle. When the output layer's done pulse arrives, the
// controller returns to idle and done pulses for one cycle on the next edge. busy is
// high from the cycle after start was sampled until done rises; done and a new start
// may share a cycle. start while busy is ignored.
//
// The inputs must not be rewritten while busy; that is left to the user.
module mlp_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic hid_done,
  input  logic out_done,
  output logic hid_start,
  output logic out_start,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {C_IDLE, C_HIDDEN, C_OUTPUT} state_e;

  state_e state;

  assign hid_start = (state == C_IDLE) && start;
  assign out_start = (state == C_HIDDEN) && hid_done;
  assign busy      = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE:   if (start)    state <= C_HIDDEN;
        C_HIDDEN: if (hid_done) state <= C_OUTPUT;
        C_OUTPUT: if (out_done) begin
          state <= C_IDLE;
          done  <= 1'b1;
        end
        default:  state <= C_IDLE;
      endcase
    end
  end

endmodule
