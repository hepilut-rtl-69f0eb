// maxpool_layer: P x P max pooling with stride P on a pixel stream.
//
// The input feature map arrives one pixel position (C channels) per
// transfer in raster order. Only one line of partial maxima is kept
// (W/P entries of C bytes), not the feature map:
//   * along a line, the running maximum of the current group of P pixels
//     is held in hmax; at the group's last pixel it is complete;
//   * the completed horizontal maximum is combined with the line store
//     entry of that group (first line of a group of P lines: overwrite;
//     later lines: max); on the group's last line the result is the output.
// Columns and lines beyond the last full group (W or H not a multiple of P)
// are dropped, as a pooling layer without padding does.
//
// Handshake as in every layer: LOAD_EN = DATA_IN_VALID AND DATA_IN_ENABLE,
// in_ready = out_ready AND in_enable, the layer holds when out_ready is low,
// out_enable is in_enable delayed by one clock.
// Latency: the output is registered, one clock after the load of the
// pixel that completes the P x P group.
//
// The layer's place in the cascade and its handshake names follow the
// design's block diagram; pooling size 2 x 2 / stride 2 and this
// one-line-store structure are this design's own choices.
module maxpool_layer #(
  parameter int unsigned W = 28,  // input width
  parameter int unsigned H = 28,  // input height
  parameter int unsigned C = 8,   // channels
  parameter int unsigned P = 2    // pool size = stride
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_enable,
  output logic                 in_ready,
  input  logic [C-1:0][7:0]    in_data,
  output logic                 out_valid,
  output logic                 out_enable,
  input  logic                 out_ready,
  output logic [C-1:0][7:0]    out_data
);

  localparam int unsigned WO = W / P;
  localparam int unsigned HO = H / P;
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned GW = (WO > 1) ? $clog2(WO) : 1;

  logic                 ce, load_en, win_ok, frame_last;
  logic [$clog2(H)-1:0] row;
  logic [$clog2(W)-1:0] col;

  assign ce = out_ready;

  stream_ctrl #(.W(W), .H(H), .K(P), .STRIDE(P)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_enable, .out_ready,
    .in_ready, .load_en, .row, .col, .win_ok, .frame_last
  );

  // Position inside the pooling group and group index.
  logic [PW-1:0] cph, rph;   // column / row phase within the group
  logic [GW-1:0] grp;        // group (output column) index
  logic          in_area;    // pixel lies inside a full group

  logic [C-1:0][7:0] hmax;              // running max along the line
  logic [C-1:0][7:0] lstore [WO];       // one line of partial maxima
  logic [C-1:0][7:0] hnext, vnext;

  assign in_area = (int'(col) < int'(WO * P)) && (int'(row) < int'(HO * P));

  always_comb begin
    for (int unsigned c = 0; c < C; c++) begin
      hnext[c] = (cph == '0) ? in_data[c]
                             : ((in_data[c] > hmax[c]) ? in_data[c] : hmax[c]);
      vnext[c] = (rph == '0) ? hnext[c]
                             : ((hnext[c] > lstore[grp][c]) ? hnext[c] : lstore[grp][c]);
    end
  end

  // line store of partial maxima (no reset: each entry is written on the
  // first line of a group before it is read)
  always_ff @(posedge clk) begin
    if (load_en && in_area && cph == PW'(P - 1)) lstore[grp] <= vnext;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cph        <= '0;
      rph        <= '0;
      grp        <= '0;
      hmax       <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_enable <= 1'b0;
    end else begin
      out_enable <= in_enable;
      if (ce) out_valid <= 1'b0;
      if (load_en) begin
        hmax <= hnext;
        if (in_area && win_ok) begin   // last pixel of a P x P group
          out_valid <= 1'b1;
          out_data  <= vnext;
        end
        // phase and group counters follow the controller's position
        if (col == $clog2(W)'(W - 1)) begin
          cph <= '0;
          grp <= '0;
          if (row == $clog2(H)'(H - 1)) rph <= '0;
          else                          rph <= (rph == PW'(P - 1)) ? '0 : rph + 1'b1;
        end else if (cph == PW'(P - 1)) begin
          cph <= '0;
          grp <= (int'(grp) == int'(WO) - 1) ? grp : grp + 1'b1;
        end else begin
          cph <= cph + 1'b1;
        end
      end
    end
  end

  // Handshake rule: an output not taken stays valid and unchanged.
  a_out_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

  // Frames are delimited by the position counters; the frame-end flag is
  // not needed here.
  logic unused_ctrl;
  assign unused_ctrl = frame_last;

endmodule
