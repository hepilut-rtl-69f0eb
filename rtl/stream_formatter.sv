// stream_formatter: AXI-Stream image receiver in front of the accelerator.
//
// The processor system moves an image from DDR with a DMA engine as an
// AXI4-Stream of 32-bit words. The image bytes are interleaved R, G, B per
// pixel in raster order, first byte in tdata[7:0]. The accelerator wants
// one whole pixel per transfer on three parallel channels (DATA_IN_RED,
// DATA_IN_GREEN, DATA_IN_BLUE). This block re-packs the byte stream:
// three 32-bit beats carry four pixels, so a 7-byte queue takes a beat
// whenever at most 3 bytes would remain after this cycle's pixel leaves,
// and emits a pixel whenever 3 bytes are queued. With tvalid held high it
// delivers one pixel per clock (the DMA side sees tready low one cycle in
// four).
//
// Frame check: tlast must come with beat FRAME_BEATS of each frame; a
// tlast elsewhere, or a missing one, sets the sticky frame_err flag (the
// beat count restarts at every tlast).
//
// Interface: AXI4-Stream slave (tdata, tvalid, tready, tlast); pixel
// output with valid/ready. tready depends combinationally on pix_ready.
// That such a receiving/formatting block exists follows the design
// description; the bus width, byte order and frame check are this
// design's own choices.
module stream_formatter #(
  parameter int unsigned W = 32,    // image width  (pixels)
  parameter int unsigned H = 32     // image height (pixels)
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Stream slave
  input  logic [31:0]        s_axis_tdata,
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic               s_axis_tlast,
  // pixel output: [0] red, [1] green, [2] blue
  output logic               pix_valid,
  input  logic               pix_ready,
  output logic [2:0][7:0]    pix_data,
  output logic               frame_err
);

  localparam int unsigned FRAME_BYTES = W * H * 3;
  localparam int unsigned FRAME_BEATS = (FRAME_BYTES + 3) / 4;
  localparam int unsigned BW          = $clog2(FRAME_BEATS + 1);

  logic [7:0] q [7];          // byte queue, q[0] oldest
  logic [2:0] cnt;            // bytes in the queue
  logic [2:0] cnt_after;      // bytes left after this cycle's pop
  logic       pop, push;
  logic [BW-1:0] beat;

  assign pix_valid     = (cnt >= 3'd3);
  assign pop           = pix_valid & pix_ready;
  assign cnt_after     = pop ? cnt - 3'd3 : cnt;
  assign s_axis_tready = (cnt_after <= 3'd3);
  assign push          = s_axis_tvalid & s_axis_tready;

  always_comb begin
    for (int unsigned c = 0; c < 3; c++) pix_data[c] = q[c];
  end

  // queue after this cycle: shift out the popped pixel, append the beat
  logic [7:0] q_next [7];
  always_comb begin
    for (int unsigned i = 0; i < 7; i++) begin
      // after the pop, byte i comes from i+3
      q_next[i] = pop ? ((i + 3 < 7) ? q[i+3] : 8'h00) : q[i];
      // a pushed beat lands at cnt_after .. cnt_after+3
      if (push && i >= int'(cnt_after) && i < int'(cnt_after) + 4)
        q_next[i] = s_axis_tdata[8*(i - int'(cnt_after)) +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int unsigned i = 0; i < 7; i++) q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < 7; i++) q[i] <= q_next[i];
      cnt <= cnt_after + (push ? 3'd4 : 3'd0);
    end
  end

  // frame length check
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      frame_err <= 1'b0;
    end else if (push) begin
      if (s_axis_tlast != (int'(beat) == int'(FRAME_BEATS) - 1)) frame_err <= 1'b1;
      beat <= (s_axis_tlast || int'(beat) == int'(FRAME_BEATS) - 1) ? '0 : beat + 1'b1;
    end
  end

  // Handshake rule: a pixel offered and not taken stays offered, unchanged.
  a_pix_held: assert property (@(posedge clk) disable iff (!rst_n)
    pix_valid && !pix_ready |=> pix_valid && $stable(pix_data));

endmodule
