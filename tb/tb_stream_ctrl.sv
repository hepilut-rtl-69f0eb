// tb_stream_ctrl: checks the per-layer dataflow controller (W=5, H=4,
// K=3, stride 2) under random VALID, ENABLE and downstream READY.
// Every clock it compares LOAD_EN, READY, the loaded pixel's row/column,
// the window-valid decision and the frame-end flag with a model kept in
// the testbench, over several back-to-back frames.
`timescale 1ns/1ps
module tb_stream_ctrl;
  localparam int unsigned W = 5, H = 4, K = 3, S = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_enable = 0, out_ready = 0;
  logic in_ready, load_en, win_ok, frame_last;
  logic [1:0] row;
  logic [2:0] col;

  stream_ctrl #(.W(W), .H(H), .K(K), .STRIDE(S)) dut (
    .clk, .rst_n, .in_valid, .in_enable, .out_ready,
    .in_ready, .load_en, .row, .col, .win_ok, .frame_last
  );

  int checks = 0, failures = 0;
  int er = 0, ec = 0, frames = 0, wins = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: row=%0d col=%0d (exp %0d,%0d)", what, row, col, er, ec);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3, 0) != 0);
      in_enable = ($urandom_range(7, 0) != 0);
      out_ready = ($urandom_range(5, 0) != 0);
      #1;
      chk(load_en == (in_valid && in_enable && out_ready), "load_en");
      chk(in_ready == (in_enable && out_ready), "in_ready");
      chk(int'(row) == er && int'(col) == ec, "position");
      chk(win_ok == (er >= 2 && ec >= 2 && (er - 2) % 2 == 0 && (ec - 2) % 2 == 0), "win_ok");
      chk(frame_last == (load_en && er == H - 1 && ec == W - 1), "frame_last");
      if (load_en) begin
        if (win_ok) wins++;
        if (ec == W - 1) begin
          ec = 0;
          if (er == H - 1) begin er = 0; frames++; end else er++;
        end else ec++;
      end
    end
    checks++;
    if (frames < 3 || wins == 0) begin failures++; $display("FAIL too few frames %0d", frames); end
    $display("frames=%0d windows=%0d", frames, wins);
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
