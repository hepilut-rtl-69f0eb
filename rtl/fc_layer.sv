// fc_layer: fully connected output layer and classification.
//
// The flattened input vector arrives as a stream of N_POS pixel positions
// of C_IN channels each (the raster output of the last pooling layer).
// All N_OUT outputs are accumulated in parallel: for the position `pos`
// the weight multiplexer picks w[o][pos][*] for every output o, the
// multiplier bank forms the C_IN x N_OUT products, and the adder bank adds
// them to the running sums (started from the biases). After the last
// position the scores are final; a comparator chain picks the largest
// (the first one on a tie) as the classification result.
//
// Pipeline: products (1 clock) -> accumulate (1 clock) -> result register
// (1 clock), so the result is valid 3 clocks after the last input is
// loaded. The result is held until res_ready; while a result is waiting
// and res_ready is low the layer stops loading (in_ready low), which
// backs the stall up the whole cascade.
//
// Handshake: LOAD_EN = in_valid AND in_enable AND the stall condition.
// The layer's place (after the last pooling layer, producing the
// classification result) follows the design's block diagram; the
// position-serial accumulation, widths and argmax rule are this design's
// own choices.
module fc_layer
  import hepilut_pkg::*;
#(
  parameter int unsigned N_POS = 25,  // input positions (e.g. 5 x 5)
  parameter int unsigned C_IN  = 16,  // channels per position
  parameter int unsigned N_OUT = 10   // classes
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic                                   in_enable,
  output logic                                   in_ready,
  input  logic [C_IN-1:0][7:0]                   in_data,
  // weights [class][position][channel], biases [class]
  input  logic [N_OUT-1:0][N_POS-1:0][C_IN-1:0][7:0] weights,
  input  logic [N_OUT-1:0][ACC_W-1:0]            bias,
  // classification result
  output logic                                   res_valid,
  input  logic                                   res_ready,
  output logic [$clog2(N_OUT)-1:0]               res_class,
  output logic [N_OUT-1:0][ACC_W-1:0]            res_scores
);

  localparam int unsigned POSW = (N_POS > 1) ? $clog2(N_POS) : 1;
  localparam int unsigned CLW  = $clog2(N_OUT);

  logic ce, load_en;
  assign ce       = !(res_valid && !res_ready);
  assign in_ready = ce & in_enable;
  assign load_en  = in_valid & in_ready;

  // position counter
  logic [POSW-1:0] pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pos <= '0;
    else if (load_en) pos <= (int'(pos) == int'(N_POS) - 1) ? '0 : pos + 1'b1;
  end

  // ---- stage 1: weight multiplexer and multiplier bank --------------------
  prod_t prod [N_OUT][C_IN];
  logic  v1, first1, last1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
    end else if (ce) begin
      v1     <= load_en;
      first1 <= (pos == '0);
      last1  <= (int'(pos) == int'(N_POS) - 1);
      for (int unsigned o = 0; o < N_OUT; o++)
        for (int unsigned c = 0; c < C_IN; c++)
          prod[o][c] <= mul_act_wgt(in_data[c], wgt_t'(weights[o][pos][c]));
    end
  end

  // ---- stage 2: accumulation ---------------------------------------------
  acc_t acc [N_OUT];
  acc_t acc_next [N_OUT];
  logic done2;

  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) begin
      acc_next[o] = first1 ? $signed(bias[o]) : acc[o];
      for (int unsigned c = 0; c < C_IN; c++) acc_next[o] = acc_next[o] + acc_t'(prod[o][c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done2 <= 1'b0;
      for (int unsigned o = 0; o < N_OUT; o++) acc[o] <= '0;
    end else if (ce) begin
      done2 <= v1 & last1;
      if (v1) for (int unsigned o = 0; o < N_OUT; o++) acc[o] <= acc_next[o];
    end
  end

  // ---- stage 3: comparator chain (argmax) and result register -------------
  logic [CLW-1:0] best;
  always_comb begin
    best = '0;
    for (int unsigned o = 1; o < N_OUT; o++)
      if (acc[o] > acc[best]) best = CLW'(o);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid  <= 1'b0;
      res_class  <= '0;
      res_scores <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (ce && done2) begin
        res_valid <= 1'b1;
        res_class <= best;
        for (int unsigned o = 0; o < N_OUT; o++) res_scores[o] <= acc[o];
      end
    end
  end

  // Handshake rule: a result is held, unchanged, until it is taken.
  a_result_held: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_class) && $stable(res_scores));

endmodule
