// tb_conv_layer: checks a small convolution layer (6x5 input, 2 -> 3
// channels, 3x3 kernel, stride 1, shift 4) with random signed weights and
// biases against a convolution computed in the testbench.
// Frame 0 is sent at full rate with READY high: the first output must
// appear 4 clocks after the load of the pixel that completes its window.
// Frames 1-3 are sent with random VALID gaps and random READY stalls; every
// output of every frame must match, in raster order, and nothing may be
// lost or duplicated. out_enable must follow in_enable one clock later.
`timescale 1ns/1ps
module tb_conv_layer;
  import hepilut_pkg::*;
  localparam int unsigned W = 6, H = 5, CI = 2, CO = 3, K = 3, SH = 4, NF = 4;
  localparam int unsigned WO = W - K + 1, HO = H - K + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_enable = 0, out_ready = 0;
  logic in_ready, out_valid, out_enable;
  logic [CI-1:0][7:0] in_data = '0;
  logic [CO-1:0][K-1:0][K-1:0][CI-1:0][7:0] weights;
  logic [CO-1:0][ACC_W-1:0] bias;
  logic [CO-1:0][7:0] out_data;

  conv_layer #(.W(W), .H(H), .C_IN(CI), .C_OUT(CO), .K(K), .STRIDE(1), .SHIFT(SH)) dut (
    .clk, .rst_n, .in_valid, .in_enable, .in_ready, .in_data, .weights, .bias,
    .out_valid, .out_enable, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned img [NF][H][W][CI];
  int wv [CO][K][K][CI];
  int bv [CO];
  int expq [$];                 // expected outputs, CO values per position

  function automatic int rq(int acc);
    int s;
    if (acc <= 0) return 0;
    s = acc >>> SH;
    return (s > 255) ? 255 : s;
  endfunction

  initial begin
    for (int o = 0; o < CO; o++) begin
      bv[o] = $urandom_range(400, 0) - 200;
      bias[o] = ACC_W'(bv[o]);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < CI; c++) begin
        wv[o][ky][kx][c] = $urandom_range(255, 0) - 128;
        weights[o][ky][kx][c] = 8'(wv[o][ky][kx][c]);
      end
    end
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int c = 0; c < CI; c++)
        img[f][y][x][c] = byte'($urandom_range(255, 0));
      for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) for (int o = 0; o < CO; o++) begin
        int acc;
        acc = bv[o];
        for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < CI; c++)
          acc += int'(img[f][y+ky][x+kx][c]) * wv[o][ky][kx][c];
        expq.push_back(rq(acc));
      end
    end
  end

  // driver
  longint t_load = -1, t_out = -1;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    in_enable = 1'b1; out_ready = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          bit ok;
          if (f > 0) while ($urandom_range(3, 0) == 0) begin
            in_valid = 0; out_ready = $urandom_range(1, 0);
            @(negedge clk);
          end
          in_valid = 1;
          for (int c = 0; c < CI; c++) in_data[c] = img[f][y][x][c];
          do begin
            if (f > 0) out_ready = ($urandom_range(3, 0) != 0);
            #1 ok = in_ready;
            if (ok && f == 0 && y == K - 1 && x == K - 1) t_load = cyc;
            @(negedge clk);
          end while (!ok);
        end
    in_valid = 0;
    out_ready = 1;
  end

  // output monitor
  int nout = 0;
  logic en_d = 0;
  always @(posedge clk) begin
    en_d <= in_enable;
    if (rst_n) begin
      checks++;
      if (out_enable != en_d) begin failures++; $display("FAIL out_enable"); end
    end
    if (rst_n && out_valid && out_ready) begin
      if (t_out < 0) t_out = cyc;
      for (int o = 0; o < CO; o++) begin
        int e;
        checks++;
        e = (expq.size() > 0) ? expq.pop_front() : -1;
        if (int'(out_data[o]) != e) begin
          failures++;
          $display("FAIL output %0d ch %0d: %0d expected %0d", nout, o, out_data[o], e);
        end
      end
      nout++;
    end
  end

  initial begin
    wait (nout == int'(NF * WO * HO));
    repeat (10) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra output"); end
    checks++;
    $display("first output %0d clocks after its last load", t_out - t_load);
    if (t_out - t_load != 4) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
