// position_detect: finds the bounding box of the edges in a one-bit image.
//
// Two boundary_profile count registers run side by side: one as deep as the
// image width counts the edge pixels of each column, one as deep as the image
// height those of each row. Pixel coordinates come from the stream's timing
// signals. The
// first and last column holding an edge are the left and right boundary, the
// first and last row the top and bottom boundary. They are tracked while the
// frame runs, so on the clock after the frame's last pixel pos_valid pulses
// and the box (and found, low for a frame with no edge at all) is held until
// the next frame's result. This follows the design. The count registers are
// then cleared in max(W, H) clocks, which must end within the vertical
// blanking; the camera timing used here easily allows that. Coordinates are
// those of the incoming stream.
module position_detect
  import cap_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vsync_t        s_in,
  input  logic          edge_bit,
  output logic          pos_valid,
  output logic          found,
  output logic [XW-1:0] left,
  output logic [XW-1:0] right,
  output logic [YW-1:0] top,
  output logic [YW-1:0] bottom,
  output logic          ready,       // count registers cleared after reset
  output logic          bypass       // row count served from the pending write
);

  logic [$clog2(W + 1)-1:0] x;
  logic [$clog2(H + 1)-1:0] y;
  logic                     frame_end;

  pix_counter #(.W(W), .H(H)) u_cnt (
    .clk, .rst_n, .s(s_in), .x, .y, .line_end(), .frame_end
  );

  logic inc;
  assign inc = s_in.de && edge_bit;

  logic          col_done, col_found, row_done, row_found;
  logic [XW-1:0] col_first, col_last;
  logic [YW-1:0] row_first, row_last;
  logic          col_ready, row_ready;

  boundary_profile #(.DEPTH(W), .CW($clog2(H + 1)), .AW(XW)) u_col (
    .clk, .rst_n, .inc, .addr(XW'(x)), .scan(frame_end), .ready(col_ready),
    .done(col_done), .found(col_found), .first(col_first), .last(col_last),
    .bypass()
  );

  boundary_profile #(.DEPTH(H), .CW($clog2(W + 1)), .AW(YW)) u_row (
    .clk, .rst_n, .inc, .addr(YW'(y)), .scan(frame_end), .ready(row_ready),
    .done(row_done), .found(row_found), .first(row_first), .last(row_last),
    .bypass(bypass)
  );

  assign ready = col_ready && row_ready;

  // both profiles finish on the same clock, one clock after the frame
  always_comb begin
    pos_valid = col_done && row_done;
    found     = col_found && row_found;
    left      = col_first;
    right     = col_last;
    top       = row_first;
    bottom    = row_last;
  end

endmodule
