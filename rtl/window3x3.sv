// window3x3: turns a serial pixel stream into a 3 x 3 neighbourhood.
//
// Two line buffers, each as long as an image line, hold the two previous lines.
// For each incoming pixel at column x the buffers give the pixels of the same
// column one and two lines up; together with the incoming pixel they form one
// column of three, which is shifted into a 3 x 3 register window. The line
// buffers behave exactly as the chained line-long shift registers of the
// design (each pixel re-appears W pixels later, one row lower), but are
// addressed by column like a RAM-based shift-register tap, which is how an FPGA
// maps them. win[r][c] is the pixel at (x-2+c, y-2+r) for the input pixel at
// (x, y); its centre win[1][1] is pixel (x-1, y-1). border is set when the
// window reaches outside the image (x < 2 or y < 2 with the default MARGIN of
// 2; a caller may widen the margin); the window then holds stale data and the
// filter using it must substitute its own value. outside is set when even the
// centre lies outside the image (x = 0 or y = 0). The window, border, outside
// and timing outputs are registered: latency one clock, one window per
// input pixel. The stream keeps its timing, so the filtered image it carries is
// the input image moved one pixel right and one pixel down.
module window3x3
  import cap_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned DW = 8,
  parameter int unsigned MARGIN = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  vsync_t                   s_in,
  input  logic [DW-1:0]            din,
  output vsync_t                   s_out,
  output logic [2:0][2:0][DW-1:0]  win,     // [row][column], row 0 = top
  output logic                     border,
  output logic                     outside
);

  localparam int unsigned XW = $clog2(W + 1);
  localparam int unsigned YW = $clog2(H + 1);

  logic [XW-1:0] x;
  logic [YW-1:0] y;

  pix_counter #(.W(W), .H(H)) u_cnt (
    .clk, .rst_n, .s(s_in), .x, .y, .line_end(), .frame_end()
  );

  logic [DW-1:0] line1 [W];   // previous line
  logic [DW-1:0] line2 [W];   // line before that
  logic [DW-1:0] up1, up2;
  logic [$clog2(W)-1:0] addr;

  assign addr = $clog2(W)'(x);
  assign up1  = line1[addr];
  assign up2  = line2[addr];

  always_ff @(posedge clk) begin
    if (s_in.de) begin
      line1[addr] <= din;
      line2[addr] <= up1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win    <= '0;
      border <= 1'b1;
      outside <= 1'b1;
      s_out  <= '0;
    end else begin
      s_out <= s_in;
      if (s_in.de) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= din;
        border    <= (x < XW'(MARGIN)) || (y < YW'(MARGIN));
        outside   <= (x == '0) || (y == '0);
      end
    end
  end

endmodule
