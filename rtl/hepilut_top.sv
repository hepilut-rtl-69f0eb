// hepilut_top: heterogeneous layer-pipelined CNN accelerator for 32 x 32
// RGB image classification, built from fabric logic only (no block RAM,
// no DSP blocks implied).
//
// Every layer of the network has its own hardware, and the layers form a
// cascade that works on one image at the same time: a layer starts as soon
// as it has enough lines of its input, and hands every output pixel to the
// next layer in the following clocks instead of storing feature maps. With
// one pixel entering per clock, a 32 x 32 image needs 1024 clocks to enter
// and its classification appears a few tens of clocks after the last pixel.
//
// Network (VGG style, 7 layers, valid convolutions, stride 1):
//   image 32x32x3
//   conv1 3x3, C1 filters, ReLU   -> 30x30xC1
//   conv2 3x3, C2 filters, ReLU   -> 28x28xC2
//   maxpool 2x2                   -> 14x14xC2
//   conv3 3x3, C3 filters, ReLU   -> 12x12xC3
//   conv4 3x3, C4 filters, ReLU   -> 10x10xC4
//   maxpool 2x2                   ->  5x5xC4
//   fully connected               -> N_CLASSES scores, argmax = class
// The image size, RGB input, 8-bit fixed point data, 3x3 kernels of the
// first layer, the convolution / max-pool / fully connected cascade and the
// per-layer VALID/ENABLE/READY signals follow the design description. The
// layer count, filter numbers, pooling size and requantisation shifts are
// this design's own choices, as are the built-in weights: trained
// parameters are not available, so every weight and bias is a fixed hash of
// its layer and index (hepilut_pkg::weight_val / bias_val). Each weighted
// layer reads its parameters from a register bank (param_bank) that loads
// these values at reset and that the host may overwrite.
//
// Interface:
//   s_axis_*   AXI4-Stream, 32-bit, interleaved RGB bytes (stream_formatter)
//   enable     DATA_IN_ENABLE of the first layer, set by the host to run
//   res_*      classification result, held until res_ready
//   frame_err  sticky: an AXI-Stream frame had the wrong length
//   cfg_*      parameter write: layer 1-5, address, data (see param_bank);
//              write only while no image is in flight
// Timing: one pixel per clock when s_axis_tvalid and res_ready stay high.
module hepilut_top
  import hepilut_pkg::*;
#(
  parameter int unsigned IMG_W     = 32,
  parameter int unsigned IMG_H     = 32,
  parameter int unsigned K         = 3,
  parameter int unsigned C1        = 8,
  parameter int unsigned C2        = 8,
  parameter int unsigned C3        = 16,
  parameter int unsigned C4        = 16,
  parameter int unsigned N_CLASSES = 10,
  parameter int unsigned SHIFT1    = 8,
  parameter int unsigned SHIFT2    = 8,
  parameter int unsigned SHIFT3    = 8,
  parameter int unsigned SHIFT4    = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [31:0]                        s_axis_tdata,
  input  logic                               s_axis_tvalid,
  output logic                               s_axis_tready,
  input  logic                               s_axis_tlast,
  input  logic                               enable,
  output logic                               res_valid,
  input  logic                               res_ready,
  output logic [$clog2(N_CLASSES)-1:0]       res_class,
  output logic [N_CLASSES-1:0][ACC_W-1:0]    res_scores,
  output logic                               frame_err,
  // run-time parameter writes from the host
  input  logic                               cfg_we,
  input  logic [2:0]                         cfg_layer,   // 1..4 conv, 5 fully connected
  input  logic [15:0]                        cfg_addr,
  input  logic [31:0]                        cfg_data
);

  // ---- feature map sizes --------------------------------------------------
  localparam int unsigned W1 = IMG_W - K + 1, H1 = IMG_H - K + 1;   // conv1 out
  localparam int unsigned W2 = W1 - K + 1,    H2 = H1 - K + 1;      // conv2 out
  localparam int unsigned W3 = W2 / 2,        H3 = H2 / 2;          // pool1 out
  localparam int unsigned W4 = W3 - K + 1,    H4 = H3 - K + 1;      // conv3 out
  localparam int unsigned W5 = W4 - K + 1,    H5 = H4 - K + 1;      // conv4 out
  localparam int unsigned W6 = W5 / 2,        H6 = H5 / 2;          // pool2 out
  localparam int unsigned NPOS = W6 * H6;

  // ---- parameter register banks, one per weighted layer -------------------
  localparam int unsigned NW1 = C1 * K * K * 3;
  localparam int unsigned NW2 = C2 * K * K * C1;
  localparam int unsigned NW3 = C3 * K * K * C2;
  localparam int unsigned NW4 = C4 * K * K * C3;
  localparam int unsigned NW5 = N_CLASSES * NPOS * C4;

  logic [NW1*8-1:0]           WGT1;
  logic [NW2*8-1:0]           WGT2;
  logic [NW3*8-1:0]           WGT3;
  logic [NW4*8-1:0]           WGT4;
  logic [NW5*8-1:0]           WGT5;
  logic [C1*ACC_W-1:0]        BIAS1;
  logic [C2*ACC_W-1:0]        BIAS2;
  logic [C3*ACC_W-1:0]        BIAS3;
  logic [C4*ACC_W-1:0]        BIAS4;
  logic [N_CLASSES*ACC_W-1:0] BIAS5;

  param_bank #(.LAYER(1), .N_W(NW1), .N_B(C1)) u_par1 (
    .clk, .rst_n, .wr_en(cfg_we && cfg_layer == 3'd1), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .weights(WGT1), .bias(BIAS1));
  param_bank #(.LAYER(2), .N_W(NW2), .N_B(C2)) u_par2 (
    .clk, .rst_n, .wr_en(cfg_we && cfg_layer == 3'd2), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .weights(WGT2), .bias(BIAS2));
  param_bank #(.LAYER(3), .N_W(NW3), .N_B(C3)) u_par3 (
    .clk, .rst_n, .wr_en(cfg_we && cfg_layer == 3'd3), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .weights(WGT3), .bias(BIAS3));
  param_bank #(.LAYER(4), .N_W(NW4), .N_B(C4)) u_par4 (
    .clk, .rst_n, .wr_en(cfg_we && cfg_layer == 3'd4), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .weights(WGT4), .bias(BIAS4));
  param_bank #(.LAYER(5), .N_W(NW5), .N_B(N_CLASSES)) u_par5 (
    .clk, .rst_n, .wr_en(cfg_we && cfg_layer == 3'd5), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .weights(WGT5), .bias(BIAS5));

  // ---- input formatter ----------------------------------------------------
  logic           px_valid, px_ready;
  logic [2:0][7:0] px_data;

  stream_formatter #(.W(IMG_W), .H(IMG_H)) u_fmt (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .pix_valid(px_valid), .pix_ready(px_ready), .pix_data(px_data),
    .frame_err
  );

  // ---- layer cascade ------------------------------------------------------
  logic            v1, e1, r1;  logic [C1-1:0][7:0] d1;
  logic            v2, e2, r2;  logic [C2-1:0][7:0] d2;
  logic            v3, e3, r3;  logic [C2-1:0][7:0] d3;
  logic            v4, e4, r4;  logic [C3-1:0][7:0] d4;
  logic            v5, e5, r5;  logic [C4-1:0][7:0] d5;
  logic            v6, e6, r6;  logic [C4-1:0][7:0] d6;

  conv_layer #(.W(IMG_W), .H(IMG_H), .C_IN(3), .C_OUT(C1), .K(K), .SHIFT(SHIFT1)) u_conv1 (
    .clk, .rst_n,
    .in_valid(px_valid), .in_enable(enable), .in_ready(px_ready), .in_data(px_data),
    .weights(WGT1), .bias(BIAS1),
    .out_valid(v1), .out_enable(e1), .out_ready(r1), .out_data(d1)
  );

  conv_layer #(.W(W1), .H(H1), .C_IN(C1), .C_OUT(C2), .K(K), .SHIFT(SHIFT2)) u_conv2 (
    .clk, .rst_n,
    .in_valid(v1), .in_enable(e1), .in_ready(r1), .in_data(d1),
    .weights(WGT2), .bias(BIAS2),
    .out_valid(v2), .out_enable(e2), .out_ready(r2), .out_data(d2)
  );

  maxpool_layer #(.W(W2), .H(H2), .C(C2), .P(2)) u_pool1 (
    .clk, .rst_n,
    .in_valid(v2), .in_enable(e2), .in_ready(r2), .in_data(d2),
    .out_valid(v3), .out_enable(e3), .out_ready(r3), .out_data(d3)
  );

  conv_layer #(.W(W3), .H(H3), .C_IN(C2), .C_OUT(C3), .K(K), .SHIFT(SHIFT3)) u_conv3 (
    .clk, .rst_n,
    .in_valid(v3), .in_enable(e3), .in_ready(r3), .in_data(d3),
    .weights(WGT3), .bias(BIAS3),
    .out_valid(v4), .out_enable(e4), .out_ready(r4), .out_data(d4)
  );

  conv_layer #(.W(W4), .H(H4), .C_IN(C3), .C_OUT(C4), .K(K), .SHIFT(SHIFT4)) u_conv4 (
    .clk, .rst_n,
    .in_valid(v4), .in_enable(e4), .in_ready(r4), .in_data(d4),
    .weights(WGT4), .bias(BIAS4),
    .out_valid(v5), .out_enable(e5), .out_ready(r5), .out_data(d5)
  );

  maxpool_layer #(.W(W5), .H(H5), .C(C4), .P(2)) u_pool2 (
    .clk, .rst_n,
    .in_valid(v5), .in_enable(e5), .in_ready(r5), .in_data(d5),
    .out_valid(v6), .out_enable(e6), .out_ready(r6), .out_data(d6)
  );

  fc_layer #(.N_POS(NPOS), .C_IN(C4), .N_OUT(N_CLASSES)) u_fc (
    .clk, .rst_n,
    .in_valid(v6), .in_enable(e6), .in_ready(r6), .in_data(d6),
    .weights(WGT5), .bias(BIAS5),
    .res_valid, .res_ready, .res_class, .res_scores
  );

endmodule
