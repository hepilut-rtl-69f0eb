// tb_maxpool_layer: checks 2x2 / stride 2 max pooling on a 6x5 input of
// 3 channels (the odd last line must be dropped) over four random frames,
// with random VALID gaps and READY stalls after the first frame. Outputs
// are compared in raster order with maxima computed in the testbench; the
// first output must follow the load of its group's last pixel by 1 clock.
`timescale 1ns/1ps
module tb_maxpool_layer;
  localparam int unsigned W = 6, H = 5, C = 3, P = 2, NF = 4;
  localparam int unsigned WO = W / P, HO = H / P;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_enable = 0, out_ready = 0;
  logic in_ready, out_valid, out_enable;
  logic [C-1:0][7:0] in_data = '0, out_data;

  maxpool_layer #(.W(W), .H(H), .C(C), .P(P)) dut (
    .clk, .rst_n, .in_valid, .in_enable, .in_ready, .in_data,
    .out_valid, .out_enable, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned img [NF][H][W][C];
  int expq [$];

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int c = 0; c < C; c++)
        img[f][y][x][c] = byte'($urandom_range(255, 0));
      for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) for (int c = 0; c < C; c++) begin
        int m;
        m = 0;
        for (int dy = 0; dy < P; dy++) for (int dx = 0; dx < P; dx++)
          if (int'(img[f][P*y+dy][P*x+dx][c]) > m) m = img[f][P*y+dy][P*x+dx][c];
        expq.push_back(m);
      end
    end
  end

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
          for (int c = 0; c < C; c++) in_data[c] = img[f][y][x][c];
          do begin
            if (f > 0) out_ready = ($urandom_range(3, 0) != 0);
            #1 ok = in_ready;
            if (ok && f == 0 && y == 1 && x == 1) t_load = cyc;
            @(negedge clk);
          end while (!ok);
        end
    in_valid = 0;
    out_ready = 1;
  end

  int nout = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (t_out < 0) t_out = cyc;
      for (int c = 0; c < C; c++) begin
        int e;
        checks++;
        e = (expq.size() > 0) ? expq.pop_front() : -1;
        if (int'(out_data[c]) != e) begin
          failures++;
          $display("FAIL output %0d ch %0d: %0d expected %0d", nout, c, out_data[c], e);
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
    if (t_out - t_load != 1) begin failures++; $display("FAIL latency %0d", t_out - t_load); end
    checks++;
    if (!out_enable) begin failures++; $display("FAIL out_enable"); end
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
