// cap_inspect_top: edge-computing image pipeline for bottle-cap inspection.
//
// A camera frame (640 x 480, 24-bit RGB) held in memory is read out as a video
// stream by image_gen and processed at one pixel per clock, without stopping:
//   rgb2gray       -> 8-bit grey level
//   median_filter  -> impulse noise removed (3 x 3 median)
//   sobel_edge     -> one-bit edge image (gradient magnitude > 125)
// The edge image goes to position_detect, which finds the bounding box of the
// cap, and to pingpong_fb, which stores adjacent frames in alternate banks.
// Once the box of a frame is known, cut_control reads that frame's box back
// from the store (while the next frame is being written to the other bank),
// sends it out as the cropped one-bit image, counts its edge pixels and
// reports whether the cap shows its front or its back; for a back it raises
// flip_req for the actuator that turns the cap over.
//
// Each 3 x 3 stage moves its image one pixel right and down, so stored edge
// coordinates are those of the camera plus SHIFT = 2. The box and the crop
// coordinates at the ports are given in camera coordinates (SHIFT removed).
//
// Timing: the pixel read port expects pix_rgb one clock after pix_rd_en. The
// edge bit of a pixel leaves the Sobel stage 23 clocks after its read (1 + 3 +
// 4 + 15); the box of a frame is reported on the clock after the stream's
// data enable falls at the end of its last line, and the crop follows at one
// pixel per clock. The stage order, the two ping-pong areas, the thresholds
// and the one-pixel-per-clock rate follow the design; the frame timing of
// image_gen, the on-chip frame store in place of SDRAM and the coordinate
// shift are this design's choices.
module cap_inspect_top
  import cap_pkg::*;
#(
  parameter int unsigned W           = IMG_W,
  parameter int unsigned H           = IMG_H,
  parameter int unsigned H_FP        = 16,
  parameter int unsigned H_SYNC      = 96,
  parameter int unsigned H_BP        = 48,
  parameter int unsigned V_FP        = 10,
  parameter int unsigned V_SYNC      = 2,
  parameter int unsigned V_BP        = 33,
  parameter int unsigned EDGE_THRESH = SOBEL_THR,
  parameter int unsigned SIDE_THRESH = SIDE_THR,
  parameter int unsigned XW          = $clog2(W),
  parameter int unsigned YW          = $clog2(H),
  parameter int unsigned CNTW        = $clog2(W * H + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,          // keep sending frames
  // stored camera frame
  output logic            pix_rd_en,
  output logic [XW-1:0]   pix_rd_x,
  output logic [YW-1:0]   pix_rd_y,
  input  logic [23:0]     pix_rgb,
  // cap position, camera coordinates
  output logic            pos_valid,
  output logic            cap_found,
  output logic [XW-1:0]   cap_left,
  output logic [XW-1:0]   cap_right,
  output logic [YW-1:0]   cap_top,
  output logic [YW-1:0]   cap_bottom,
  // cropped edge image, camera coordinates
  output logic            crop_valid,
  output logic            crop_bit,
  output logic [XW-1:0]   crop_x,
  output logic [YW-1:0]   crop_y,
  output logic            crop_first,
  output logic            crop_last,
  // front / back judgement and actuator command
  output logic [CNTW-1:0] side_cnt,
  output logic            judge,        // side counter has reached SIDE_THRESH
  output logic            side_valid,
  output logic            side_front,
  output logic            flip_req,
  // status
  output logic            ready,        // position registers cleared after reset
  output logic            frame_done,   // an edge frame has been stored
  output logic            crop_busy,    // a crop is being read out
  output logic            bypass,       // row count served from the pending write
  output logic            overrun,      // box dropped, crop still running
  output logic            empty         // frame without any edge
);

  localparam int unsigned SHIFT = 2;

  vsync_t      s_cam, s_gray, s_med, s_edge;
  logic [23:0] rgb;
  logic [7:0]  gray, med;
  logic        edge_bit;

  image_gen #(
    .H_ACT(W), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACT(H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .XW(XW), .YW(YW)
  ) u_gen (
    .clk, .rst_n, .run,
    .rd_en(pix_rd_en), .rd_x(pix_rd_x), .rd_y(pix_rd_y), .pix_rgb,
    .s_out(s_cam), .rgb_out(rgb)
  );

  rgb2gray u_gray (
    .clk, .rst_n, .s_in(s_cam), .rgb, .s_out(s_gray), .gray
  );

  median_filter #(.W(W), .H(H)) u_med (
    .clk, .rst_n, .s_in(s_gray), .din(gray), .s_out(s_med), .dout(med)
  );

  sobel_edge #(.W(W), .H(H), .THRESH(EDGE_THRESH), .MARGIN(4)) u_sobel (
    .clk, .rst_n, .s_in(s_med), .din(med), .s_out(s_edge), .edge_bit
  );

  logic          p_valid, p_found;
  logic [XW-1:0] p_left, p_right;
  logic [YW-1:0] p_top, p_bottom;

  position_detect #(.W(W), .H(H), .XW(XW), .YW(YW)) u_pos (
    .clk, .rst_n, .s_in(s_edge), .edge_bit,
    .pos_valid(p_valid), .found(p_found), .left(p_left), .right(p_right),
    .top(p_top), .bottom(p_bottom), .ready, .bypass
  );

  logic          fb_last_bank;
  logic          fb_rd_en, fb_rd_bank, fb_rd_bit;
  logic [XW-1:0] fb_rd_x;
  logic [YW-1:0] fb_rd_y;

  pingpong_fb #(.W(W), .H(H), .XW(XW), .YW(YW)) u_fb (
    .clk, .rst_n, .s_in(s_edge), .wr_bit(edge_bit),
    .frame_done, .last_bank(fb_last_bank),
    .rd_en(fb_rd_en), .rd_bank(fb_rd_bank), .rd_x(fb_rd_x), .rd_y(fb_rd_y),
    .rd_bit(fb_rd_bit)
  );

  logic [XW-1:0] c_x;
  logic [YW-1:0] c_y;

  cut_control #(
    .W(W), .H(H), .SIDE_THRESH(SIDE_THRESH), .XW(XW), .YW(YW), .CNTW(CNTW)
  ) u_cut (
    .clk, .rst_n,
    .pos_valid(p_valid), .found(p_found), .left(p_left), .right(p_right),
    .top(p_top), .bottom(p_bottom), .bank(fb_last_bank),
    .rd_en(fb_rd_en), .rd_bank(fb_rd_bank), .rd_x(fb_rd_x), .rd_y(fb_rd_y),
    .rd_bit(fb_rd_bit),
    .crop_valid, .crop_bit, .crop_x(c_x), .crop_y(c_y), .crop_first, .crop_last,
    .side_cnt, .judge, .side_valid, .side_front, .flip_req,
    .busy(crop_busy), .overrun, .empty
  );

  assign pos_valid  = p_valid;
  assign cap_found  = p_found;
  assign cap_left   = p_left   - XW'(SHIFT);
  assign cap_right  = p_right  - XW'(SHIFT);
  assign cap_top    = p_top    - YW'(SHIFT);
  assign cap_bottom = p_bottom - YW'(SHIFT);
  assign crop_x     = c_x - XW'(SHIFT);
  assign crop_y     = c_y - YW'(SHIFT);

endmodule
