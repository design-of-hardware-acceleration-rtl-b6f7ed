// tb_cap_inspect_top: end-to-end test of the inspection pipeline at a reduced
// frame size (64 x 48 pixels, short blanking, cap radius 16, front/back
// threshold 400 edge pixels). Five frames pass through: a front cap, a back
// cap, an empty belt, a front cap with 3 % impulse noise and a back cap. The
// checks are those of cap_top_bench against the reference model.
module tb_cap_inspect_top;
  localparam int W = 64, H = 48;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, run, pix_rd_en;
  logic [5:0] pix_rd_x;
  logic [5:0] pix_rd_y;
  logic [23:0] pix_rgb;
  logic pos_valid, cap_found;
  logic [5:0] cap_left, cap_right, cap_top, cap_bottom, crop_x, crop_y;
  logic crop_valid, crop_bit, crop_first, crop_last;
  logic [11:0] side_cnt;
  logic judge, side_valid, side_front, flip_req, ready, frame_done, crop_busy;
  logic bypass, overrun, empty;

  cap_inspect_top #(
    .W(W), .H(H), .H_FP(4), .H_SYNC(8), .H_BP(4), .V_FP(2), .V_SYNC(2), .V_BP(2),
    .SIDE_THRESH(400)
  ) dut (.*);

  cap_top_bench #(.W(W), .H(H), .SIDE_THR(400), .RAD(16), .MAX_CYCLES(200000)) bench (
    .*, .crop_bank(dut.fb_rd_bank)
  );
endmodule
