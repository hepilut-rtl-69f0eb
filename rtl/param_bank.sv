// param_bank: register bank holding one layer's weights and biases.
//
// Each layer reads its Weight_IN and Bias_IN inputs from a bank of fabric
// registers. At reset the bank takes the layer's built-in parameters
// (hepilut_pkg::weight_val / bias_val of layer LAYER, computed at
// elaboration), so the accelerator runs without any host set-up. The host
// can then overwrite any entry at run time through a simple write port:
//   wr_addr <  N_W : weight wr_addr   <- wr_data[7:0]  (signed 8-bit)
//   wr_addr >= N_W : bias wr_addr-N_W <- wr_data       (signed 32-bit)
// Addresses beyond N_W + N_B are ignored. Flat weight indices follow the
// layer's weight port layout (see conv_layer / fc_layer).
//
// Timing: a write on clock edge t is seen by the layer from edge t on; the
// layers read the bank combinationally, so parameters should be changed
// while no image is in flight.
//
// The register bank in front of the multipliers and adders and the run-time
// configuration of layer parameters by the host follow the design
// description; the write port and address map are this design's own.
module param_bank
  import hepilut_pkg::*;
#(
  parameter int unsigned LAYER = 1,    // layer number, selects the built-in values
  parameter int unsigned N_W   = 216,  // number of weights
  parameter int unsigned N_B   = 8,    // number of biases
  parameter int unsigned AW    = 16    // write address width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic [31:0]            wr_data,
  output logic [N_W*8-1:0]       weights,
  output logic [N_B*ACC_W-1:0]   bias
);

  function automatic logic [N_W*8-1:0] init_w();
    for (int unsigned i = 0; i < N_W; i++) init_w[i*8 +: 8] = weight_val(LAYER, i);
  endfunction
  function automatic logic [N_B*ACC_W-1:0] init_b();
    for (int unsigned i = 0; i < N_B; i++) init_b[i*ACC_W +: ACC_W] = bias_val(LAYER, i);
  endfunction

  localparam logic [N_W*8-1:0]     W_INIT = init_w();
  localparam logic [N_B*ACC_W-1:0] B_INIT = init_b();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      weights <= W_INIT;
      bias    <= B_INIT;
    end else if (wr_en) begin
      if (int'(wr_addr) < int'(N_W))
        weights[int'(wr_addr)*8 +: 8] <= wr_data[7:0];
      else if (int'(wr_addr) < int'(N_W + N_B))
        bias[(int'(wr_addr) - int'(N_W))*ACC_W +: ACC_W] <= wr_data;
    end
  end

endmodule
