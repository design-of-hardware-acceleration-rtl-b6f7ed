// pix_counter: recovers the coordinates of the current pixel from the video
// timing signals.
//
// x is the number of active pixels already seen on the current line, so it is
// the column of a pixel while de is high; it returns to 0 when de falls. y is
// the number of completed active lines since the last vertical sync, so it is
// the row of a pixel while de is high. line_end is high for one cycle right
// after the last pixel of a line (the cycle in which de has fallen), and
// frame_end in the line_end cycle of the last line (row H-1). Vertical sync
// restarts the row count, so a frame always starts at row 0 even after an
// incomplete frame. Both outputs are combinational on the registered counts.
module pix_counter
  import cap_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned XW = $clog2(W + 1),
  parameter int unsigned YW = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vsync_t        s,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          line_end,
  output logic          frame_end
);

  logic de_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x    <= '0;
      y    <= '0;
      de_q <= 1'b0;
    end else begin
      de_q <= s.de;
      if (s.vs) begin
        x <= '0;
        y <= '0;
      end else if (s.de) begin
        x <= x + 1'b1;
      end else begin
        x <= '0;
        if (de_q) y <= y + 1'b1;
      end
    end
  end

  assign line_end  = de_q && !s.de && !s.vs;
  assign frame_end = line_end && (y == YW'(H - 1));

endmodule
