// tb_line_buffer: checks the K+1 line store and window multiplexer bank
// (W=6, C=2, K=3) over four frames of random pixels, loaded with random
// gaps and clock-enable stalls. After every load whose window is valid the
// registered window must equal the K x K x C patch of the frame whose
// bottom-right pixel was just loaded; win_valid must be high exactly then.
`timescale 1ns/1ps
module tb_line_buffer;
  localparam int unsigned W = 6, H = 5, C = 2, K = 3, NF = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ce = 1, load_en = 0, win_ok = 0;
  logic [2:0] col = 0;
  logic [C-1:0][7:0] pix = '0;
  logic [K-1:0][K-1:0][C-1:0][7:0] win;
  logic win_valid;

  line_buffer #(.W(W), .C(C), .K(K)) dut (
    .clk, .rst_n, .ce, .load_en, .col, .win_ok, .pix, .win, .win_valid
  );

  int checks = 0, failures = 0, nwin = 0;
  byte unsigned img [NF][H][W][C];

  initial begin
    for (int f = 0; f < NF; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      for (int c = 0; c < C; c++) img[f][y][x][c] = byte'($urandom_range(255, 0));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          bit exp_win;
          // idle cycles, some of them stalled
          while ($urandom_range(2, 0) == 0) begin
            load_en = 0; ce = $urandom_range(1, 0);
            @(negedge clk);
            checks++;
            if (win_valid && ce) begin failures++; $display("FAIL spurious win_valid"); end
          end
          ce = 1; load_en = 1; col = 3'(x);
          exp_win = (y >= K - 1 && x >= K - 1);
          win_ok = exp_win;
          for (int c = 0; c < C; c++) pix[c] = img[f][y][x][c];
          @(negedge clk);
          load_en = 0;
          checks++;
          if (win_valid != exp_win) begin
            failures++; $display("FAIL win_valid=%b at f%0d (%0d,%0d)", win_valid, f, y, x);
          end
          if (exp_win) begin
            nwin++;
            for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < C; c++) begin
              checks++;
              if (win[ky][kx][c] != img[f][y-K+1+ky][x-K+1+kx][c]) begin
                failures++;
                $display("FAIL f%0d (%0d,%0d) tap %0d,%0d,%0d: %0d exp %0d", f, y, x, ky, kx, c,
                         win[ky][kx][c], img[f][y-K+1+ky][x-K+1+kx][c]);
              end
            end
          end
        end
    $display("windows checked: %0d", nwin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
