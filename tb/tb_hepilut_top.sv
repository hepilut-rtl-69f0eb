// tb_hepilut_top: end-to-end test of the accelerator at its default size
// (32 x 32 RGB images, the default network), no parameter overrides.
//
// Images of random pixels are sent as an AXI4-Stream of 32-bit words
// (interleaved RGB bytes, tlast on the last word). A behavioural model in
// this file computes every layer of the network with plain integer loops
// (same constant weights, independent arithmetic) and the testbench
// compares each image's class and all class scores with it.
//
// Phases, each making one mechanism of the design happen:
//   image 0  random gaps in s_axis_tvalid; its result is left waiting
//            for 30 clocks, which stalls image 1 through the whole
//            cascade (READY low);
//   image 1  enable dropped for 40 clocks in the middle of the image
//            (ENABLE pause);
//   image 2-4 full rate back to back: latency from the first accepted word
//            to the result must be within 1057 clocks (7716 ns at 137 MHz)
//            and results must follow each other every 1024 clocks
//            (one pixel per clock, >= 129600 images/s at 137 MHz);
//   image 5  sent after all results are taken and after the host has
//            rewritten every conv1 weight and bias and one fully
//            connected bias through the parameter write port; the model
//            uses the new values for this image only (reconfiguration).
// Also counted: formatter back-pressure (tready low with data offered),
// first-layer outputs produced while the image is still loading (load and
// calculation overlap), line-store slot reuse, and frames in flight in two
// layers at once.
`timescale 1ns/1ps
module tb_hepilut_top;
  import hepilut_pkg::*;

  localparam int unsigned IMG = 32, K = 3;
  localparam int unsigned C1 = 8, C2 = 8, C3 = 16, C4 = 16, NCL = 10;
  localparam int unsigned S1 = 8, S2 = 8, S3 = 8, S4 = 8;
  localparam int unsigned NIMG = 6;
  localparam int unsigned RCF = 5;           // image run after reconfiguration
  localparam int unsigned NW1 = C1 * K * K * 3;
  localparam int unsigned BEATS = IMG * IMG * 3 / 4;
  localparam int unsigned LAT_MAX = 1057;   // 7716 ns x 137 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  always #3.65 clk = ~clk;                   // ~137 MHz

  logic [31:0] tdata;
  logic        tvalid, tready, tlast, enable, res_valid, res_ready, frame_err;
  logic [3:0]  res_class;
  logic [NCL-1:0][ACC_W-1:0] res_scores;
  logic        cfg_we;
  logic [2:0]  cfg_layer;
  logic [15:0] cfg_addr;
  logic [31:0] cfg_data;

  hepilut_top dut (
    .clk, .rst_n,
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tlast(tlast), .enable,
    .res_valid, .res_ready, .res_class, .res_scores, .frame_err,
    .cfg_we, .cfg_layer, .cfg_addr, .cfg_data
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  // parameters written by the host before image RCF
  int w1_new [NW1];
  int b1_new [C1];
  int b5_new;
  localparam int unsigned B5_IDX = 3;

  function automatic int wv(int n, int l, int i);
    if (n == int'(RCF) && l == 1) return w1_new[i];
    return int'(weight_val(l, i));
  endfunction
  function automatic int bv(int n, int l, int o);
    if (n == int'(RCF) && l == 1) return b1_new[o];
    if (n == int'(RCF) && l == 5 && o == int'(B5_IDX)) return b5_new;
    return int'(bias_val(l, o));
  endfunction

  byte unsigned img [NIMG][IMG][IMG][3];
  int ref_scores [NIMG][NCL];
  int ref_class [NIMG];

  function automatic int rq(int acc, int sh);
    int s;
    if (acc <= 0) return 0;
    s = acc >>> sh;
    return (s > 255) ? 255 : s;
  endfunction

  int f1 [30][30][C1];
  int f2 [28][28][C2];
  int p1 [14][14][C2];
  int f3 [12][12][C3];
  int f4 [10][10][C4];
  int p2 [5][5][C4];
  int nz [4];
  int nsat [4];
  int ntot [4];

  task automatic ref_model(int n);
    int acc, best;
    for (int y = 0; y < 30; y++) for (int x = 0; x < 30; x++) for (int o = 0; o < C1; o++) begin
      acc = bv(n, 1, o);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < 3; c++)
        acc += int'(img[n][y+ky][x+kx][c]) * wv(n, 1, ((o*K+ky)*K+kx)*3+c);
      f1[y][x][o] = rq(acc, S1);
      ntot[0]++; if (f1[y][x][o] == 0) nz[0]++; if (f1[y][x][o] == 255) nsat[0]++;
    end
    for (int y = 0; y < 28; y++) for (int x = 0; x < 28; x++) for (int o = 0; o < C2; o++) begin
      acc = bv(n, 2, o);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < C1; c++)
        acc += f1[y+ky][x+kx][c] * wv(n, 2, ((o*K+ky)*K+kx)*C1+c);
      f2[y][x][o] = rq(acc, S2);
      ntot[1]++; if (f2[y][x][o] == 0) nz[1]++; if (f2[y][x][o] == 255) nsat[1]++;
    end
    for (int y = 0; y < 14; y++) for (int x = 0; x < 14; x++) for (int c = 0; c < C2; c++) begin
      int m;
      m = f2[2*y][2*x][c];
      if (f2[2*y][2*x+1][c] > m) m = f2[2*y][2*x+1][c];
      if (f2[2*y+1][2*x][c] > m) m = f2[2*y+1][2*x][c];
      if (f2[2*y+1][2*x+1][c] > m) m = f2[2*y+1][2*x+1][c];
      p1[y][x][c] = m;
    end
    for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++) for (int o = 0; o < C3; o++) begin
      acc = bv(n, 3, o);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < C2; c++)
        acc += p1[y+ky][x+kx][c] * wv(n, 3, ((o*K+ky)*K+kx)*C2+c);
      f3[y][x][o] = rq(acc, S3);
      ntot[2]++; if (f3[y][x][o] == 0) nz[2]++; if (f3[y][x][o] == 255) nsat[2]++;
    end
    for (int y = 0; y < 10; y++) for (int x = 0; x < 10; x++) for (int o = 0; o < C4; o++) begin
      acc = bv(n, 4, o);
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < C3; c++)
        acc += f3[y+ky][x+kx][c] * wv(n, 4, ((o*K+ky)*K+kx)*C3+c);
      f4[y][x][o] = rq(acc, S4);
      ntot[3]++; if (f4[y][x][o] == 0) nz[3]++; if (f4[y][x][o] == 255) nsat[3]++;
    end
    for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) for (int c = 0; c < C4; c++) begin
      int m;
      m = f4[2*y][2*x][c];
      if (f4[2*y][2*x+1][c] > m) m = f4[2*y][2*x+1][c];
      if (f4[2*y+1][2*x][c] > m) m = f4[2*y+1][2*x][c];
      if (f4[2*y+1][2*x+1][c] > m) m = f4[2*y+1][2*x+1][c];
      p2[y][x][c] = m;
    end
    best = 0;
    for (int o = 0; o < NCL; o++) begin
      acc = bv(n, 5, o);
      for (int p = 0; p < 25; p++) for (int c = 0; c < C4; c++)
        acc += p2[p/5][p%5][c] * wv(n, 5, (o*25+p)*C4+c);
      ref_scores[n][o] = acc;
      if (acc > ref_scores[n][best]) best = o;
    end
    ref_class[n] = best;
  endtask

  // ---------------- stimulus ----------------
  longint t_first [NIMG];     // clock of its first accepted word
  int bp_cycles = 0, en_pause = 0, n_cfg = 0;
  int nres = 0;                // results taken

  function automatic logic [31:0] word(int n, int b);
    logic [31:0] w;
    for (int j = 0; j < 4; j++) begin
      int k = 4*b + j;                  // byte index in the frame
      w[8*j +: 8] = img[n][(k/3)/IMG][(k/3)%IMG][k%3];
    end
    return w;
  endfunction

  initial begin
    // each image: its own colour, a stripe pattern of its own period and
    // direction, and noise
    for (int n = 0; n < NIMG; n++) begin
      int base [3];
      int per, dir;
      for (int c = 0; c < 3; c++) base[c] = $urandom_range(200, 0);
      per = $urandom_range(8, 2);
      dir = $urandom_range(1, 0);
      for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) for (int c = 0; c < 3; c++) begin
        int v;
        v = base[c] + ((((dir ? x : y) / per) % 2) ? 40 : 0) + $urandom_range(15, 0);
        img[n][y][x][c] = byte'((v > 255) ? 255 : v);
      end
    end
    foreach (w1_new[i]) w1_new[i] = $urandom_range(63, 0) - 32;
    foreach (b1_new[i]) b1_new[i] = $urandom_range(2047, 0) - 1024;
    b5_new = 5000000;
    for (int n = 0; n < NIMG; n++) ref_model(n);
    for (int l = 0; l < 4; l++)
      $display("layer %0d: %0d%% zero, %0d%% saturated", l + 1,
               100 * nz[l] / ntot[l], 100 * nsat[l] / ntot[l]);
    for (int n = 0; n < NIMG; n++) $display("reference image %0d: class %0d", n, ref_class[n]);

    // all stimulus changes at the falling edge; handshakes happen at the
    // rising edge and are recorded by the monitors below
    tvalid = 0; tlast = 0; tdata = '0; enable = 0;
    cfg_we = 0; cfg_layer = '0; cfg_addr = '0; cfg_data = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    for (int n = 0; n < NIMG; n++) begin
      // reconfiguration: with the pipeline empty, rewrite conv1 and one
      // fully connected bias
      if (n == int'(RCF)) begin
        wait (nres == int'(RCF));
        @(negedge clk);
        cfg_we = 1'b1; cfg_layer = 3'd1;
        for (int i = 0; i < int'(NW1 + C1); i++) begin
          cfg_addr = 16'(i);
          cfg_data = (i < int'(NW1)) ? 32'(w1_new[i]) : 32'(b1_new[i - int'(NW1)]);
          @(negedge clk);
        end
        cfg_layer = 3'd5;
        cfg_addr = 16'(NCL * 25 * C4 + B5_IDX);
        cfg_data = 32'(b5_new);
        @(negedge clk);
        cfg_we = 1'b0;
        n_cfg++;
      end
      for (int b = 0; b < int'(BEATS); b++) begin
        bit ok;
        // image 0: random gaps in the stream
        if (n == 0) while ($urandom_range(4, 0) == 0) begin
          tvalid = 1'b0; @(negedge clk);
        end
        // image 1: ENABLE pause in the middle of the image
        if (n == 1 && b == int'(BEATS) / 2) begin
          tvalid = 1'b0; enable = 1'b0;
          repeat (40) @(negedge clk);
          en_pause++;
          enable = 1'b1;
        end
        tvalid = 1'b1; tdata = word(n, b); tlast = (b == int'(BEATS) - 1);
        do begin
          #1 ok = tready;
          @(negedge clk);
        end while (!ok);
      end
      tvalid = 1'b0; tlast = 1'b0;
    end
  end

  // accepted words and back-pressure
  int nbeat = 0;
  always @(posedge clk) begin
    if (tvalid && tready) begin
      if (nbeat % int'(BEATS) == 0) t_first[nbeat / int'(BEATS)] = cyc;
      nbeat++;
    end
    if (tvalid && !tready) bp_cycles++;
  end

  // result side: the first result is left waiting for 30 clocks
  longint t_res [NIMG];
  initial begin
    res_ready = 1'b0;
    wait (rst_n);
    @(negedge clk);
    wait (res_valid);
    repeat (30) @(negedge clk);
    res_ready = 1'b1;
  end

  always @(posedge clk) begin
    if (res_valid && res_ready) begin
      t_res[nres] = cyc;
      checks++;
      if (int'(res_class) != ref_class[nres]) begin
        failures++;
        $display("FAIL image %0d: class %0d, expected %0d", nres, res_class, ref_class[nres]);
      end
      for (int o = 0; o < NCL; o++) begin
        checks++;
        if ($signed(res_scores[o]) != ref_scores[nres][o]) begin
          failures++;
          $display("FAIL image %0d score %0d: %0d, expected %0d", nres, o,
                   $signed(res_scores[o]), ref_scores[nres][o]);
        end
      end
      nres++;
    end
  end

  // ---------------- mechanism monitors ----------------
  int overlap = 0, slot_reuse = 0, stall_prop = 0, multi_frame = 0;
  always @(posedge clk) if (rst_n) begin
    // first layer produces output while its image is still loading
    if (dut.u_conv1.out_valid && dut.u_conv1.ce && dut.u_conv1.u_ctrl.row < 5'd31) overlap++;
    // a line slot of the first layer is overwritten (K+1 rotation wraps)
    if (dut.u_conv1.u_lbuf.load_en && dut.u_conv1.u_ctrl.col == 5'd31 &&
        dut.u_conv1.u_lbuf.wslot == 2'(K)) slot_reuse++;
    // READY low at the input while data is offered and the formatter has room
    if (res_valid && !res_ready && !dut.u_fmt.pix_ready && dut.u_fmt.pix_valid) stall_prop++;
    // two layers working on different images at once
    if (dut.u_conv1.u_ctrl.row < 5'd2 && dut.u_conv1.u_ctrl.load_en &&
        dut.u_fc.v1) multi_frame++;
  end

  // ---------------- end of test ----------------
  initial begin
    wait (nres == NIMG);
    repeat (5) @(posedge clk);
    for (int n = 2; n < int'(RCF); n++) begin
      longint lat;
      lat = t_res[n] - t_first[n];
      checks++;
      $display("image %0d latency %0d clocks", n, lat);
      if (lat > LAT_MAX) begin failures++; $display("FAIL latency %0d > %0d", lat, LAT_MAX); end
    end
    for (int n = 3; n < int'(RCF); n++) begin
      checks++;
      $display("result interval %0d clocks", t_res[n] - t_res[n-1]);
      if (t_res[n] - t_res[n-1] != 1024) begin
        failures++; $display("FAIL interval %0d", t_res[n] - t_res[n-1]);
      end
    end
    $display("mechanisms: backpressure=%0d stall=%0d enable_pause=%0d overlap=%0d slot_reuse=%0d multi_frame=%0d reconfigure=%0d",
             bp_cycles, stall_prop, en_pause, overlap, slot_reuse, multi_frame, n_cfg);
    checks += 7;
    if (bp_cycles == 0)   begin failures++; $display("FAIL no formatter back-pressure"); end
    if (stall_prop == 0)  begin failures++; $display("FAIL no READY stall"); end
    if (en_pause == 0)    begin failures++; $display("FAIL no ENABLE pause"); end
    if (overlap == 0)     begin failures++; $display("FAIL no load/calculation overlap"); end
    if (slot_reuse == 0)  begin failures++; $display("FAIL no line slot reuse"); end
    if (multi_frame == 0) begin failures++; $display("FAIL no two images in flight"); end
    if (n_cfg == 0)       begin failures++; $display("FAIL no reconfiguration"); end
    checks++;
    if (frame_err) begin failures++; $display("FAIL frame_err set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d results", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
