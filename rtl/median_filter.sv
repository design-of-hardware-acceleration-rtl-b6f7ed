// median_filter: 3 x 3 median filter on a grey-level pixel stream.
//
// A window3x3 forms the neighbourhood of each pixel. Stage 1 sorts each of the
// three rows in descending order, so column 0 of the sorted window holds the
// row maxima, column 1 the row medians and column 2 the row minima. Stage 2
// sorts each of those columns and keeps the smallest maximum, the median of the
// medians and the largest minimum. Stage 3 sorts these three candidates; their
// middle value is the median of all nine pixels. This sorting scheme follows
// the design. Where the window reaches outside the image (first two columns and
// lines of the stream) the centre pixel is passed through unfiltered, and where
// the centre itself lies outside (first column and line) the output is 0; that
// border rule is this design's choice.
//
// Latency is four clocks (one for the window, three for sorting) and one
// pixel is accepted per clock. The output image is the filtered image moved one
// pixel right and one pixel down, because the window is centred on the pixel
// one column and one line before the incoming one.
module median_filter
  import cap_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vsync_t        s_in,
  input  logic [DW-1:0] din,
  output vsync_t        s_out,
  output logic [DW-1:0] dout
);

  vsync_t                  s_w;
  logic [2:0][2:0][DW-1:0] win;
  logic                    border_w, outside_w;

  window3x3 #(.W(W), .H(H), .DW(DW)) u_win (
    .clk, .rst_n, .s_in, .din, .s_out(s_w), .win, .border(border_w), .outside(outside_w)
  );

  // stage 1: sort rows
  logic [2:0][2:0][DW-1:0] rs_c, rs_q;   // [row][0=max,1=mid,2=min]
  for (genvar r = 0; r < 3; r++) begin : g_row
    sort3 #(.DW(DW)) u_sort (
      .a(win[r][0]), .b(win[r][1]), .c(win[r][2]),
      .hi(rs_c[r][0]), .mid(rs_c[r][1]), .lo(rs_c[r][2])
    );
  end

  // stage 2: sort columns of the row-sorted window
  logic [2:0][2:0][DW-1:0] cs;           // [column][0=max,1=mid,2=min]
  for (genvar c = 0; c < 3; c++) begin : g_col
    sort3 #(.DW(DW)) u_sort (
      .a(rs_q[0][c]), .b(rs_q[1][c]), .c(rs_q[2][c]),
      .hi(cs[c][0]), .mid(cs[c][1]), .lo(cs[c][2])
    );
  end

  logic [DW-1:0] min_of_max, med_of_med, max_of_min;

  // stage 3: median of the three candidates
  logic [DW-1:0] f_hi, f_mid, f_lo;
  sort3 #(.DW(DW)) u_final (
    .a(min_of_max), .b(med_of_med), .c(max_of_min),
    .hi(f_hi), .mid(f_mid), .lo(f_lo)
  );

  logic [DW-1:0] ctr1, ctr2;             // centre pixel for the border case
  logic [1:0]    brd;
  vsync_t        s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q       <= '0;
      min_of_max <= '0;
      med_of_med <= '0;
      max_of_min <= '0;
      ctr1       <= '0;
      ctr2       <= '0;
      brd        <= '1;
      s1         <= '0;
      s2         <= '0;
      s_out      <= '0;
      dout       <= '0;
    end else begin
      rs_q       <= rs_c;
      ctr1       <= outside_w ? '0 : win[1][1];
      brd[0]     <= border_w;
      s1         <= s_w;

      min_of_max <= cs[0][2];
      med_of_med <= cs[1][1];
      max_of_min <= cs[2][0];
      ctr2       <= ctr1;
      brd[1]     <= brd[0];
      s2         <= s1;

      dout       <= brd[1] ? ctr2 : f_mid;
      s_out      <= s2;
    end
  end

endmodule
