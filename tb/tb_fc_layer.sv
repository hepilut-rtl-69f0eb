// tb_fc_layer: checks the fully connected layer (6 positions x 3 channels
// -> 4 classes) with random signed weights and biases over five random
// input vectors. Scores and the arg-max class are compared with a model in
// the testbench. The first result is left waiting for 20 clocks while the
// next vector is offered: the layer must drop READY and lose nothing. At
// full rate the result must be valid 3 clocks after the last input load.
`timescale 1ns/1ps
module tb_fc_layer;
  import hepilut_pkg::*;
  localparam int unsigned NP = 6, CI = 3, NO = 4, NV = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_enable = 0, in_ready, res_valid, res_ready = 0;
  logic [CI-1:0][7:0] in_data = '0;
  logic [NO-1:0][NP-1:0][CI-1:0][7:0] weights;
  logic [NO-1:0][ACC_W-1:0] bias;
  logic [1:0] res_class;
  logic [NO-1:0][ACC_W-1:0] res_scores;

  fc_layer #(.N_POS(NP), .C_IN(CI), .N_OUT(NO)) dut (
    .clk, .rst_n, .in_valid, .in_enable, .in_ready, .in_data, .weights, .bias,
    .res_valid, .res_ready, .res_class, .res_scores
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned x [NV][NP][CI];
  int wv [NO][NP][CI];
  int es [NV][NO];
  int ecl [NV];

  initial begin
    for (int o = 0; o < NO; o++) begin
      bias[o] = ACC_W'($urandom_range(2000, 0) - 1000);
      for (int p = 0; p < NP; p++) for (int c = 0; c < CI; c++) begin
        wv[o][p][c] = $urandom_range(255, 0) - 128;
        weights[o][p][c] = 8'(wv[o][p][c]);
      end
    end
    for (int v = 0; v < NV; v++) begin
      for (int p = 0; p < NP; p++) for (int c = 0; c < CI; c++) x[v][p][c] = byte'($urandom_range(255, 0));
      ecl[v] = 0;
      for (int o = 0; o < NO; o++) begin
        es[v][o] = $signed(bias[o]);
        for (int p = 0; p < NP; p++) for (int c = 0; c < CI; c++) es[v][o] += int'(x[v][p][c]) * wv[o][p][c];
        if (es[v][o] > es[v][ecl[v]]) ecl[v] = o;
      end
    end
  end

  longint t_last [NV];
  int stalled = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    in_enable = 1'b1;
    for (int v = 0; v < NV; v++)
      for (int p = 0; p < NP; p++) begin
        bit ok;
        if (v >= 2) while ($urandom_range(3, 0) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int c = 0; c < CI; c++) in_data[c] = x[v][p][c];
        do begin
          #1 ok = in_ready;
          if (!ok) stalled++;
          if (ok && p == NP - 1) t_last[v] = cyc;
          @(negedge clk);
        end while (!ok);
      end
    in_valid = 0;
  end

  // result side: the first result waits 20 clocks
  initial begin
    wait (rst_n);
    @(negedge clk);
    wait (res_valid);
    repeat (20) @(negedge clk);
    res_ready = 1'b1;
  end

  int nres = 0;
  longint t_res [NV];
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    t_res[nres] = cyc;
    checks++;
    if (int'(res_class) != ecl[nres]) begin
      failures++; $display("FAIL vector %0d class %0d expected %0d", nres, res_class, ecl[nres]);
    end
    for (int o = 0; o < NO; o++) begin
      checks++;
      if ($signed(res_scores[o]) != es[nres][o]) begin
        failures++;
        $display("FAIL vector %0d score %0d: %0d expected %0d", nres, o, $signed(res_scores[o]), es[nres][o]);
      end
    end
    nres++;
  end

  initial begin
    wait (nres == NV);
    repeat (5) @(posedge clk);
    checks += 3;
    if (stalled == 0) begin failures++; $display("FAIL no READY stall"); end
    if (res_valid) begin failures++; $display("FAIL extra result"); end
    $display("latency of vector 1: %0d", t_res[1] - t_last[1]);
    if (t_res[1] - t_last[1] != 3) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d results", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
