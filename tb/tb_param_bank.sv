// tb_param_bank: checks one layer's parameter register bank (layer 2,
// 20 weights, 3 biases, 8-bit write address).
//   after reset  every weight and bias equals the built-in value of layer 2;
//   writes       300 random writes, some to weights, some to biases and some
//                beyond the last bias (must change nothing), with random
//                pauses in wr_en; after every clock the whole bank is
//                compared with a model kept in the testbench;
//   reset        a second reset brings back the built-in values.
`timescale 1ns/1ps
module tb_param_bank;
  import hepilut_pkg::*;
  localparam int unsigned L = 2, NW = 20, NB = 3, AW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [31:0]   wr_data = '0;
  logic [NW*8-1:0]    weights;
  logic [NB*ACC_W-1:0] bias;

  param_bank #(.LAYER(L), .N_W(NW), .N_B(NB), .AW(AW)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .weights, .bias
  );

  int checks = 0, failures = 0;
  int mw [NW];
  int mb [NB];
  int n_w = 0, n_b = 0, n_out = 0;

  task automatic model_reset();
    for (int i = 0; i < int'(NW); i++) mw[i] = int'(weight_val(L, i));
    for (int i = 0; i < int'(NB); i++) mb[i] = int'(bias_val(L, i));
  endtask

  task automatic compare(string what);
    for (int i = 0; i < int'(NW); i++) begin
      checks++;
      if (int'($signed(weights[i*8 +: 8])) != mw[i]) begin
        failures++;
        $display("FAIL %s weight %0d: %0d, expected %0d", what, i,
                 $signed(weights[i*8 +: 8]), mw[i]);
      end
    end
    for (int i = 0; i < int'(NB); i++) begin
      checks++;
      if (int'($signed(bias[i*ACC_W +: ACC_W])) != mb[i]) begin
        failures++;
        $display("FAIL %s bias %0d: %0d, expected %0d", what, i,
                 $signed(bias[i*ACC_W +: ACC_W]), mb[i]);
      end
    end
  endtask

  initial begin
    model_reset();
    repeat (3) @(negedge clk);
    compare("in reset");
    rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(NW + NB + 6, 0);
      wr_en   = ($urandom_range(3, 0) != 0);
      wr_addr = AW'(a);
      wr_data = $urandom;
      @(posedge clk);
      if (wr_en) begin
        if (a < int'(NW)) begin mw[a] = int'($signed(wr_data[7:0])); n_w++; end
        else if (a < int'(NW + NB)) begin mb[a - int'(NW)] = int'($signed(wr_data)); n_b++; end
        else n_out++;
      end
      @(negedge clk);
      compare("write");
    end
    wr_en = 1'b0;
    rst_n = 1'b0;
    model_reset();
    @(negedge clk);
    compare("second reset");
    $display("writes: %0d weight, %0d bias, %0d out of range", n_w, n_b, n_out);
    checks++;
    if (n_w == 0 || n_b == 0 || n_out == 0) begin
      failures++; $display("FAIL a write kind did not happen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
