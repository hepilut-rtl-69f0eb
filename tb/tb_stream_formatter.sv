// tb_stream_formatter: checks the AXI-Stream to RGB pixel re-packing for a
// 4 x 3 image (36 bytes = 9 words per frame).
// Frames 0-1: full rate on both sides; after the first pixel, one pixel
// must leave every clock, and the word side must see tready low.
// Frames 2-4: random tvalid gaps and pix_ready stalls; every pixel of every
// frame must come out whole and in order. frame_err must stay low for the
// well-formed frames and be set by a final frame whose tlast comes early.
`timescale 1ns/1ps
module tb_stream_formatter;
  localparam int unsigned W = 4, H = 3, NF = 5;
  localparam int unsigned NB = W * H * 3, NW = NB / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] tdata = '0;
  logic tvalid = 0, tready, tlast = 0, pix_valid, pix_ready = 0, frame_err;
  logic [2:0][7:0] pix_data;

  stream_formatter #(.W(W), .H(H)) dut (
    .clk, .rst_n, .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tlast(tlast), .pix_valid, .pix_ready, .pix_data, .frame_err
  );

  int checks = 0, failures = 0;
  byte unsigned bytes [NF][NB];
  int bp = 0;

  initial begin
    for (int f = 0; f < NF; f++) for (int i = 0; i < NB; i++) bytes[f][i] = byte'($urandom_range(255, 0));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pix_ready = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int b = 0; b < int'(NW); b++) begin
        bit ok;
        if (f >= 2) while ($urandom_range(3, 0) == 0) begin
          tvalid = 0; pix_ready = $urandom_range(1, 0); @(negedge clk);
        end
        tvalid = 1; tlast = (b == int'(NW) - 1);
        for (int j = 0; j < 4; j++) tdata[8*j +: 8] = bytes[f][4*b + j];
        do begin
          if (f >= 2) pix_ready = ($urandom_range(3, 0) != 0);
          #1 ok = tready;
          if (!ok && f < 2) bp++;
          @(negedge clk);
        end while (!ok);
      end
    tvalid = 0; tlast = 0;
    pix_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (frame_err) begin failures++; $display("FAIL frame_err on good frames"); end
    // malformed frame: tlast on the second word
    tvalid = 1; tlast = 0; tdata = '0;
    @(negedge clk);
    tlast = 1;
    @(negedge clk);
    tvalid = 0; tlast = 0;
    @(negedge clk);
    checks++;
    if (!frame_err) begin failures++; $display("FAIL frame_err not set"); end
    checks++;
    if (bp == 0) begin failures++; $display("FAIL no back-pressure at full rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel monitor
  int np = 0;
  int full_rate_gaps = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_valid && pix_ready && np < int'(NF * W * H)) begin
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (pix_data[c] != bytes[np / (W*H)][3 * (np % (W*H)) + c]) begin
          failures++;
          $display("FAIL pixel %0d ch %0d: %0h expected %0h", np, c, pix_data[c],
                   bytes[np / (W*H)][3 * (np % (W*H)) + c]);
        end
      end
      np++;
    end else if (pix_ready && np > 0 && np < int'(2 * W * H)) full_rate_gaps++;
  end

  initial begin
    wait (np == int'(2 * W * H));
    checks++;
    if (full_rate_gaps != 0) begin failures++; $display("FAIL %0d gaps at full rate", full_rate_gaps); end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d pixels", np);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
