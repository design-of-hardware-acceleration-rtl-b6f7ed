// sobel_edge: Sobel edge detector producing a one-bit edge image.
//
// A window3x3 forms the neighbourhood A of each pixel. Stage 1 computes the
// horizontal and vertical Sobel gradients
//   Gx = (A02 + 2 A12 + A22) - (A00 + 2 A10 + A20)
//   Gy = (A20 + 2 A21 + A22) - (A00 + 2 A01 + A02)
// stage 2 the sum Gx^2 + Gy^2, an isqrt pipeline its square root G, and the
// last stage compares G with THRESH: the output is 1 (edge) where G > THRESH.
// Kernels, magnitude, square-root module and threshold (125) follow the
// design. Where the window reaches outside the image (first MARGIN columns and
// lines of the stream) the output is 0, this design's choice, so that the
// image border is never reported as an edge. MARGIN is 2 for a stream whose
// every pixel is filtered image data. Behind the median filter, whose first
// column and line carry no image data and whose second column and line are
// passed through unfiltered, it is set to 4, so that the gradient only ever
// sees median-filtered pixels.
//
// Latency is 4 clocks plus the square-root pipeline (11 stages for 8-bit
// pixels), 15 clocks in all; one pixel per
// clock. Like every 3 x 3 stage, the output image is the result moved one pixel
// right and one pixel down.
module sobel_edge
  import cap_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned DW     = 8,
  parameter int unsigned THRESH = SOBEL_THR,
  parameter int unsigned MARGIN = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vsync_t        s_in,
  input  logic [DW-1:0] din,
  output vsync_t        s_out,
  output logic          edge_bit
);

  localparam int unsigned GW   = DW + 3;            // signed gradient width
  localparam int unsigned SQW  = 2 * GW;            // Gx^2 + Gy^2 width (even)
  localparam int unsigned RTW  = SQW / 2;           // root width
  localparam int unsigned LAT  = 4 + RTW;           // total latency

  vsync_t                  s_w;
  logic [2:0][2:0][DW-1:0] a;
  logic                    border_w;

  window3x3 #(.W(W), .H(H), .DW(DW), .MARGIN(MARGIN)) u_win (
    .clk, .rst_n, .s_in, .din, .s_out(s_w), .win(a), .border(border_w), .outside()
  );

  function automatic logic signed [GW-1:0] px(input logic [DW-1:0] v);
    return signed'(GW'(v));
  endfunction

  logic signed [GW-1:0] gx, gy;
  logic [SQW-1:0]       mag2;
  logic [RTW-1:0]       mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gx   <= '0;
      gy   <= '0;
      mag2 <= '0;
    end else begin
      gx   <= (px(a[0][2]) + 2 * px(a[1][2]) + px(a[2][2]))
            - (px(a[0][0]) + 2 * px(a[1][0]) + px(a[2][0]));
      gy   <= (px(a[2][0]) + 2 * px(a[2][1]) + px(a[2][2]))
            - (px(a[0][0]) + 2 * px(a[0][1]) + px(a[0][2]));
      mag2 <= SQW'(gx * gx) + SQW'(gy * gy);
    end
  end

  isqrt #(.IN_W(SQW)) u_sqrt (.clk, .rst_n, .radicand(mag2), .root(mag));

  // timing and border flag follow the data through LAT-1 registers after the window
  vsync_t [LAT-2:0] s_d;
  logic   [LAT-2:0] brd_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d      <= '0;
      brd_d    <= '1;
      s_out    <= '0;
      edge_bit <= 1'b0;
    end else begin
      s_d      <= {s_d[LAT-3:0], s_w};
      brd_d    <= {brd_d[LAT-3:0], border_w};
      s_out    <= s_d[LAT-3];
      edge_bit <= s_d[LAT-3].de && !brd_d[LAT-3] && (mag > RTW'(THRESH));
    end
  end

endmodule
