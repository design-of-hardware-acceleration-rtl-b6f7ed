// image_gen: reads a stored camera frame out as a video stream.
//
// The camera writes each frame to memory; this block reads it back one pixel
// per clock and emits it with the timing of a camera interface, the vertical
// sync, horizontal sync and data enable signals the processing stages expect.
// A horizontal and a vertical counter walk through H_ACT active pixels plus
// front porch, sync pulse and back porch per line, and V_ACT active lines plus
// porches and sync per frame. During the active area the block requests pixel
// (rd_x, rd_y) with rd_en; the memory answers on pix_rgb one cycle later, and
// the timing outputs are delayed by one register so that they line up with it.
// Frames repeat while run is high; a frame that has started always finishes.
//
// The camera-like timing follows the design; the porch and sync lengths are
// this design's choice (those of 640 x 480 VGA timing, 800 x 525 clocks per
// frame), as is the one-cycle read latency.
module image_gen
  import cap_pkg::*;
#(
  parameter int unsigned H_ACT  = IMG_W,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_ACT  = IMG_H,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  parameter int unsigned XW     = $clog2(H_ACT),
  parameter int unsigned YW     = $clog2(V_ACT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // pixel read port towards the stored frame
  output logic          rd_en,
  output logic [XW-1:0] rd_x,
  output logic [YW-1:0] rd_y,
  input  logic [23:0]   pix_rgb,
  // video stream out
  output vsync_t        s_out,
  output logic [23:0]   rgb_out
);

  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned HCW   = $clog2(H_TOT);
  localparam int unsigned VCW   = $clog2(V_TOT);

  logic [HCW-1:0] hc;
  logic [VCW-1:0] vc;
  logic           active;   // a frame is being sent
  vsync_t         s_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc     <= '0;
      vc     <= '0;
      active <= 1'b0;
    end else if (!active) begin
      active <= run;
      hc     <= '0;
      vc     <= '0;
    end else if (hc == HCW'(H_TOT - 1)) begin
      hc <= '0;
      if (vc == VCW'(V_TOT - 1)) begin
        vc     <= '0;
        active <= run;
      end else begin
        vc <= vc + 1'b1;
      end
    end else begin
      hc <= hc + 1'b1;
    end
  end

  always_comb begin
    s_now.de = active && (hc < HCW'(H_ACT)) && (vc < VCW'(V_ACT));
    s_now.hs = active && (hc >= HCW'(H_ACT + H_FP)) && (hc < HCW'(H_ACT + H_FP + H_SYNC));
    s_now.vs = active && (vc >= VCW'(V_ACT + V_FP)) && (vc < VCW'(V_ACT + V_FP + V_SYNC));
  end

  assign rd_en = s_now.de;
  assign rd_x  = XW'(hc);
  assign rd_y  = YW'(vc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_out <= '0;
    else        s_out <= s_now;
  end

  assign rgb_out = s_out.de ? pix_rgb : 24'h0;

endmodule
