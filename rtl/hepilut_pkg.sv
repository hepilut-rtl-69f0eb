// hepilut_pkg: types, constants and constant-parameter functions shared by
// the streaming CNN accelerator.
//
// Data format (follows the design's 8-bit fixed point rule): activations
// travel between layers as unsigned 8-bit values (pixels 0..255, post-ReLU
// feature values 0..255); weights are signed 8-bit two's complement;
// biases and accumulators are signed ACC_W-bit values.
//
// Trained weights of the evaluated network are not available, so the layer
// constants are generated here by a fixed integer hash of (layer, index).
// The hash is this design's own choice; a real deployment replaces
// weight_val()/bias_val() (or drives the weight/bias ports) with the
// quantised values of a trained model.
package hepilut_pkg;

  localparam int unsigned DATA_W = 8;    // activation and weight width
  localparam int unsigned ACC_W  = 32;   // accumulator / bias width

  typedef logic        [DATA_W-1:0] act_t;   // unsigned activation
  typedef logic signed [DATA_W-1:0] wgt_t;   // signed weight
  typedef logic signed [ACC_W-1:0]  acc_t;   // signed accumulator

  // Mixing hash: 32-bit multiply/xor-shift of a seed.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Weight of layer `layer`, flat index `idx`: uniform in [-32, 31].
  function automatic wgt_t weight_val(input int unsigned layer, input int unsigned idx);
    logic signed [5:0] v;
    v = 6'(mix32((layer << 24) ^ idx ^ 32'h5A5A_0000) >> 15);
    return wgt_t'(v);
  endfunction

  // Bias of layer `layer`, output channel `ch`: uniform in [-512, 511].
  function automatic acc_t bias_val(input int unsigned layer, input int unsigned ch);
    logic signed [9:0] v;
    v = 10'(mix32((layer << 24) ^ ch ^ 32'h0B1A_5000) >> 9);
    return acc_t'(v);
  endfunction

  localparam int unsigned PROD_W = 2 * DATA_W + 1;  // u8 x s8 product width
  typedef logic signed [PROD_W-1:0] prod_t;

  // Product of an unsigned activation and a signed weight, both operands
  // extended to the full product width first.
  function automatic prod_t mul_act_wgt(input act_t a, input wgt_t w);
    prod_t aa, ww;
    aa = prod_t'({{(PROD_W-DATA_W){1'b0}}, a});
    ww = prod_t'({{(PROD_W-DATA_W){w[DATA_W-1]}}, w});
    return aa * ww;
  endfunction

  // ReLU followed by requantisation to an unsigned 8-bit activation:
  // negative sums become 0 (the ReLU comparator), positive sums are shifted
  // right by `shift` and saturated at 255.
  function automatic act_t relu_requant(input acc_t acc, input int unsigned shift);
    acc_t s;
    if (acc <= 0) return '0;
    s = acc >>> shift;
    if (s > 255) return act_t'(8'd255);
    return act_t'(s[DATA_W-1:0]);
  endfunction

endpackage
