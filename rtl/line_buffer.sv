// line_buffer: input feature store of a convolution layer and the
// multiplexer bank that forms the K x K convolution window.
//
// The whole input feature map is never stored. The store holds K+1 lines of
// W pixels x C channels (for a 32-wide RGB image and K = 3 that is
// 32 x 4 x 3 = 384 bytes instead of 3072). Lines are written into the K+1
// slots in rotation, so each new line overwrites the oldest one, which has
// already been used. Calculation does not wait for the frame: as soon as
// the line K (0-based K-1) is arriving, every arriving pixel completes a
// window whose rows are the K-1 stored lines above it plus the arriving
// line.
//
// Window forming: a K x K x C register array shifts left by one column on
// every load. Its new right-hand column comes from the K-1 older lines at
// the arriving column, picked out of the rotating slots by a multiplexer
// per window row (slot = (wslot + 2 + ky) mod (K+1)), with the arriving
// pixel itself as the bottom entry.
//
// Follows the design description: the K+1 line store and the line-wise
// overwrite. Own choices: the register window and the slot arithmetic.
// Only K-1 stored lines are read per window, so a K-line store would also
// do; the K+1 size is kept. The description starts the first window while
// line K+1 loads, but its latency figure leaves no room for that extra
// line in every layer; this block computes a window as soon as its last
// pixel arrives, i.e. while line K loads.
//
// Interface: col/win_ok/load_en come from the layer's stream_ctrl.
// Timing: win/win_valid are registered; the window completed by the pixel
// loaded at edge t is presented after edge t. win_valid is a one-cycle flag
// per clock-enable (ce) cycle, so a stalled pipeline keeps it.
module line_buffer #(
  parameter int unsigned W = 32,   // line width (pixels)
  parameter int unsigned C = 3,    // channels per pixel
  parameter int unsigned K = 3     // kernel size
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              ce,       // pipeline advance (downstream ready)
  input  logic                              load_en,  // a pixel is loaded this cycle
  input  logic [$clog2(W)-1:0]              col,      // its column
  input  logic                              win_ok,   // its window is a valid output
  input  logic [C-1:0][7:0]                 pix,      // the pixel, one byte per channel
  output logic [K-1:0][K-1:0][C-1:0][7:0]   win,      // [row][col][channel], [0][0] = top-left
  output logic                              win_valid
);

  localparam int unsigned SLOTS = K + 1;
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  // K+1 line slots held in LUT memory.
  logic [C-1:0][7:0] mem [SLOTS][W];
  logic [SW-1:0]     wslot;       // slot that the arriving line is written to
  logic [K-1:0][C-1:0][7:0] newcol;

  // Multiplexer bank: one selector per window row.
  always_comb begin
    for (int unsigned ky = 0; ky < K - 1; ky++) begin
      newcol[ky] = mem[SW'((int'(wslot) + 2 + ky) % SLOTS)][col];
    end
    newcol[K-1] = pix;
  end

  always_ff @(posedge clk) begin
    if (load_en) mem[wslot][col] <= pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wslot     <= '0;
      win       <= '0;
      win_valid <= 1'b0;
    end else begin
      if (ce) win_valid <= load_en & win_ok;
      if (load_en) begin
        for (int unsigned ky = 0; ky < K; ky++) begin
          for (int unsigned kx = 0; kx + 1 < K; kx++) win[ky][kx] <= win[ky][kx+1];
          win[ky][K-1] <= newcol[ky];
        end
        if (col == $clog2(W)'(W - 1))
          wslot <= (wslot == SW'(SLOTS - 1)) ? '0 : wslot + 1'b1;
      end
    end
  end

endmodule
