// ann_pkg: types and helpers shared by the multilayer-perceptron (MLP) engine.
//
// Number format. Inputs, weights, biases and neuron outputs are two's-complement
// fixed-point words of DATA_W bits with FRAC_W fraction bits (Q4.12 at the default
// 16/12: range -8.0 .. +7.99976, step 1/4096). Fixed point is used because it is
// much cheaper in hardware than floating point; the width and the split are this
// design's own choice.
//
// Activation functions. The network is built so that each layer can use a different
// activation function, because the models this engine is meant to run differ in their
// activation function. The set offered here, this design's choice, is the usual trio
// of MATLAB-trained MLPs: pure linear, logistic sigmoid and hyperbolic tangent
// sigmoid.
package ann_pkg;

  // Activation function selector (one per layer).
  typedef enum logic [1:0] {
    ACT_PURELIN = 2'd0,  // F(x) = x
    ACT_LOGSIG  = 2'd1,  // F(x) = 1 / (1 + exp(-x))
    ACT_TANSIG  = 2'd2   // F(x) = tanh(x) = 2*logsig(2x) - 1
  } act_e;

  // Width of an index that counts 0 .. n-1, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
