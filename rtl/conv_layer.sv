// conv_layer: one convolution layer of the streaming CNN pipeline.
//
// The layer takes its input feature map one pixel position (all C_IN
// channels) per transfer, and passes every output position (all C_OUT
// channels) on to the next layer as soon as it is computed; no output
// feature map is stored. Inside, in pipeline order (one register stage
// each, as in the layer's block diagram):
//   1. stream_ctrl  - LOAD_EN = DATA_IN_VALID AND DATA_IN_ENABLE, position
//                     counters, window/stride decision;
//      line_buffer  - K+1 line store and multiplexer bank -> K x K x C_IN
//                     window;
//   2. multiplier bank - C_OUT x K x K x C_IN products of an unsigned 8-bit
//                     activation and a signed 8-bit weight, one multiplier
//                     per product so a whole output pixel is computed per
//                     clock (fabric multipliers, no DSP blocks are implied);
//   3. adder bank   - per output channel, the sum of its K*K*C_IN products
//                     plus the bias;
//   4. ReLU comparator and requantisation - negative sums to 0, positive
//                     sums shifted right by SHIFT and saturated to 8 bits.
// Valid convolution (no padding): output size ((W-K)/STRIDE+1) x
// ((H-K)/STRIDE+1).
//
// Handshake: in_ready = out_ready AND in_enable. When out_ready is low the
// whole layer holds (no load, no register moves). out_enable repeats
// in_enable one clock later, so the ENABLE travels down the cascade.
// Latency: an output appears 4 clocks after the load of the pixel that
// completes its window, when the layer is not stalled.
//
// Structure and stage order follow the design's block diagram; the
// requantisation rule (shift and saturate), the 4-stage timing and the
// stall rule are this design's own choices.
module conv_layer
  import hepilut_pkg::*;
#(
  parameter int unsigned W      = 32,  // input width
  parameter int unsigned H      = 32,  // input height
  parameter int unsigned C_IN   = 3,   // input channels (RGB)
  parameter int unsigned C_OUT  = 8,   // filters
  parameter int unsigned K      = 3,   // kernel size
  parameter int unsigned STRIDE = 1,   // stride
  parameter int unsigned SHIFT  = 8    // requantisation right shift
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  // input stream (DATA_IN_*)
  input  logic                                        in_valid,
  input  logic                                        in_enable,
  output logic                                        in_ready,
  input  logic [C_IN-1:0][7:0]                        in_data,
  // parameters: weights [filter][ky][kx][channel], biases [filter]
  input  logic [C_OUT-1:0][K-1:0][K-1:0][C_IN-1:0][7:0] weights,
  input  logic [C_OUT-1:0][ACC_W-1:0]                 bias,
  // output stream (DATA_OUT_*)
  output logic                                        out_valid,
  output logic                                        out_enable,
  input  logic                                        out_ready,
  output logic [C_OUT-1:0][7:0]                       out_data
);

  localparam int unsigned NTAP = K * K * C_IN;

  logic ce;
  assign ce = out_ready;

  // ---- stage 1: dataflow control and line buffer -------------------------
  logic                         load_en, win_ok, frame_last;
  logic [$clog2(H)-1:0]         row;
  logic [$clog2(W)-1:0]         col;
  logic [K-1:0][K-1:0][C_IN-1:0][7:0] win;
  logic                         win_valid;

  stream_ctrl #(.W(W), .H(H), .K(K), .STRIDE(STRIDE)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_enable, .out_ready,
    .in_ready, .load_en, .row, .col, .win_ok, .frame_last
  );

  line_buffer #(.W(W), .C(C_IN), .K(K)) u_lbuf (
    .clk, .rst_n, .ce, .load_en, .col, .win_ok,
    .pix(in_data), .win, .win_valid
  );

  // ---- stage 2: multiplier bank ------------------------------------------
  prod_t prod [C_OUT][NTAP];
  logic                 v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
    end else if (ce) begin
      v2 <= win_valid;
      for (int unsigned o = 0; o < C_OUT; o++)
        for (int unsigned ky = 0; ky < K; ky++)
          for (int unsigned kx = 0; kx < K; kx++)
            for (int unsigned c = 0; c < C_IN; c++)
              prod[o][(ky*K + kx)*C_IN + c] <=
                mul_act_wgt(win[ky][kx][c], wgt_t'(weights[o][ky][kx][c]));
    end
  end

  // ---- stage 3: adder bank with bias -------------------------------------
  acc_t sum [C_OUT];
  acc_t sum_next [C_OUT];
  logic v3;

  always_comb begin
    for (int unsigned o = 0; o < C_OUT; o++) begin
      sum_next[o] = $signed(bias[o]);
      for (int unsigned t = 0; t < NTAP; t++) sum_next[o] = sum_next[o] + acc_t'(prod[o][t]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0;
    end else if (ce) begin
      v3 <= v2;
      for (int unsigned o = 0; o < C_OUT; o++) sum[o] <= sum_next[o];
    end
  end

  // ---- stage 4: ReLU comparator, requantisation --------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_enable <= 1'b0;
    end else begin
      out_enable <= in_enable;
      if (ce) begin
        out_valid <= v3;
        for (int unsigned o = 0; o < C_OUT; o++)
          out_data[o] <= relu_requant(sum[o], SHIFT);
      end
    end
  end

  // Handshake rule: an output not taken stays valid and unchanged.
  a_out_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

  // Frame position is tracked by the controller; the frame-end flag is not
  // needed inside a convolution layer.
  logic unused_ctrl;
  assign unused_ctrl = frame_last ^ ^row;

endmodule
