// stream_ctrl: the dataflow controller of one layer.
//
// A layer receives its input feature map one pixel position per transfer,
// in raster order (row by row, each row left to right). This controller
//   * forms LOAD_EN, the AND of the sender's DATA_IN_VALID and the layer's
//     DATA_IN_ENABLE, gated by the READY of the receiving layer (a layer
//     whose output cannot move freezes as a whole, so it cannot load);
//   * returns READY to the sender (= downstream ready AND enable);
//   * keeps the row/column position of the pixel being loaded and wraps to
//     (0,0) after the last pixel of a frame, so frames may follow back to
//     back;
//   * decides whether the window whose bottom-right corner is the current
//     pixel is a valid K x K window at the layer's stride (win_ok).
// The VALID/ENABLE AND and the READY/VALID meaning follow the design
// description; gating LOAD_EN with downstream READY, the raster order and
// the window rule for strides are this design's own choices.
//
// Timing: all outputs are combinational from the inputs and the position
// counters; the counters advance on the clock edge where load_en is high.
module stream_ctrl #(
  parameter int unsigned W      = 32,  // frame width  (pixels)
  parameter int unsigned H      = 32,  // frame height (pixels)
  parameter int unsigned K      = 3,   // window size
  parameter int unsigned STRIDE = 1    // window stride
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,   // DATA_IN_VALID
  input  logic                   in_enable,  // DATA_IN_ENABLE
  input  logic                   out_ready,  // READY of the receiving layer
  output logic                   in_ready,   // READY towards the sender
  output logic                   load_en,    // LOAD_EN
  output logic [$clog2(H)-1:0]   row,        // position of the pixel now loaded
  output logic [$clog2(W)-1:0]   col,
  output logic                   win_ok,     // window ending here is valid
  output logic                   frame_last  // this load is the frame's last pixel
);

  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);

  assign in_ready = out_ready & in_enable;
  assign load_en  = in_valid & in_enable & out_ready;

  logic row_end, col_end;
  assign col_end    = (col == CW'(W - 1));
  assign row_end    = (row == RW'(H - 1));
  assign frame_last = load_en & col_end & row_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (load_en) begin
      if (col_end) begin
        col <= '0;
        row <= row_end ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_comb begin
    win_ok = (int'(row) >= int'(K) - 1) && (int'(col) >= int'(K) - 1) &&
             (((int'(row) - int'(K) + 1) % int'(STRIDE)) == 0) &&
             (((int'(col) - int'(K) + 1) % int'(STRIDE)) == 0);
  end

endmodule
