// tb_conv_line_loading: the line-loading example of the design description
// run on one convolution layer: a 100 x 100 single-channel image, a 5 x 5
// kernel, stride 1, two filters, sent at one pixel per clock.
// Checks:
//   * all 96 x 96 x 2 outputs against a convolution computed here;
//   * the layer stores only K+1 = 6 lines (its line store has 6 slots);
//   * calculation starts before the image is in: the first output comes
//     4 clocks after pixel (4,4) is loaded, while the 5th line is still
//     loading, and the last output 4 clocks after the last pixel;
//   * outputs leave at the input rate: within a line of windows, one output
//     per clock.
`timescale 1ns/1ps
module tb_conv_line_loading;
  import hepilut_pkg::*;
  localparam int unsigned W = 100, H = 100, K = 5, CO = 2, SH = 6;
  localparam int unsigned WO = W - K + 1, HO = H - K + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_enable = 0, out_ready = 1;
  logic in_ready, out_valid, out_enable;
  logic [0:0][7:0] in_data = '0;
  logic [CO-1:0][K-1:0][K-1:0][0:0][7:0] weights;
  logic [CO-1:0][ACC_W-1:0] bias;
  logic [CO-1:0][7:0] out_data;

  conv_layer #(.W(W), .H(H), .C_IN(1), .C_OUT(CO), .K(K), .STRIDE(1), .SHIFT(SH)) dut (
    .clk, .rst_n, .in_valid, .in_enable, .in_ready, .in_data, .weights, .bias,
    .out_valid, .out_enable, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned img [H][W];
  int wv [CO][K][K];
  int expv [HO][WO][CO];

  function automatic int rq(int acc);
    int s;
    if (acc <= 0) return 0;
    s = acc >>> SH;
    return (s > 255) ? 255 : s;
  endfunction

  longint t_first_win = -1, t_last_pix = -1, t_first_out = -1, t_last_out = -1;
  int nload = 0;

  initial begin
    for (int o = 0; o < CO; o++) begin
      bias[o] = ACC_W'($urandom_range(600, 0) - 300);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) begin
        wv[o][ky][kx] = $urandom_range(80, 0) - 40;
        weights[o][ky][kx][0] = 8'(wv[o][ky][kx]);
      end
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = byte'($urandom_range(255, 0));
    for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) for (int o = 0; o < CO; o++) begin
      int acc;
      acc = $signed(bias[o]);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        acc += int'(img[y+ky][x+kx]) * wv[o][ky][kx];
      expv[y][x][o] = rq(acc);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    in_enable = 1'b1;
    @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit ok;
        in_valid = 1; in_data[0] = img[y][x];
        do begin
          #1 ok = in_ready;
          @(negedge clk);
        end while (!ok);
      end
    in_valid = 0;
  end

  // input monitor: when were the pixels that complete the first and the
  // last window loaded
  always @(posedge clk) if (in_valid && in_ready) begin
    if (nload == int'((K - 1) * W + (K - 1))) t_first_win = cyc;
    if (nload == int'(W * H - 1)) t_last_pix = cyc;
    nload++;
  end

  int nout = 0, gaps_in_line = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int y, x;
      y = nout / WO; x = nout % WO;
      if (t_first_out < 0) begin
        t_first_out = cyc;
        checks++;
        // the first window is computed while line K (index K-1) loads
        if (nload >= int'(K * W)) begin
          failures++; $display("FAIL first output only after %0d loads", nload);
        end
      end
      t_last_out = cyc;
      for (int o = 0; o < CO; o++) begin
        checks++;
        if (int'(out_data[o]) != expv[y][x][o]) begin
          failures++;
          $display("FAIL out (%0d,%0d) f%0d: %0d expected %0d", y, x, o, out_data[o], expv[y][x][o]);
        end
      end
      nout++;
    end else if (nout > 0 && nout < int'(HO * WO) && (nout % WO) != 0) gaps_in_line++;
  end

  initial begin
    wait (nout == int'(HO * WO));
    repeat (10) @(posedge clk);
    checks += 5;
    if (out_valid) begin failures++; $display("FAIL extra output"); end
    if ($size(dut.u_lbuf.mem, 1) != K + 1) begin failures++; $display("FAIL line store size"); end
    $display("first output %0d clocks after pixel (4,4); last output %0d clocks after the last pixel",
             t_first_out - t_first_win, t_last_out - t_last_pix);
    if (t_first_out - t_first_win != 4) begin failures++; $display("FAIL first-output latency"); end
    if (t_last_out - t_last_pix != 4) begin failures++; $display("FAIL last-output latency"); end
    if (gaps_in_line != 0) begin failures++; $display("FAIL %0d gaps inside output lines", gaps_in_line); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
