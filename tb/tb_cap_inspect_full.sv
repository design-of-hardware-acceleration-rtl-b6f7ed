// tb_cap_inspect_full: end-to-end test of the inspection pipeline with every
// parameter at its default: 640 x 480 frames with 800 x 525 clock frame
// timing, edge threshold 125, front/back threshold 3000 edge pixels. The test
// caps have a radius of 80 pixels, the 160 x 160 cap area of the design's
// experiments. Five frames pass through (front, back, empty belt, front with
// 1 % impulse noise, back) with the checks of cap_top_bench.
module tb_cap_inspect_full;
  localparam int W = 640, H = 480;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, run, pix_rd_en;
  logic [9:0] pix_rd_x;
  logic [8:0] pix_rd_y;
  logic [23:0] pix_rgb;
  logic pos_valid, cap_found;
  logic [9:0] cap_left, cap_right, crop_x;
  logic [8:0] cap_top, cap_bottom, crop_y;
  logic crop_valid, crop_bit, crop_first, crop_last;
  logic [18:0] side_cnt;
  logic judge, side_valid, side_front, flip_req, ready, frame_done, crop_busy;
  logic bypass, overrun, empty;

  cap_inspect_top dut (.*);

  cap_top_bench #(.W(W), .H(H), .SIDE_THR(3000), .RAD(80), .NOISE(1), .MAX_CYCLES(2600000)) bench (
    .*, .crop_bank(dut.fb_rd_bank)
  );
endmodule
