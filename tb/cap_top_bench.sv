// cap_top_bench: scenario and checks for the complete inspection pipeline,
// shared by the reduced-size and the full-size end-to-end testbenches.
//
// The bench plays the camera memory: it answers the pipeline's pixel reads,
// one clock later, from a list of NF test frames (front caps, back caps, an
// empty belt, impulse noise), switching frames after the last pixel of each.
// For every frame it computes the expected edge image with the reference
// model below and checks, at the pipeline's outputs: the reported box (camera coordinates) and
// found flag; the cropped image pixel by pixel in raster order; the edge count,
// front/back judgement and flip request; and the time from a frame's last
// pixel read to frame_done (the pipeline latency of PIPE_LAT clocks) and from
// frame_done to the box report (POS_LAT, one clock). It also
// counts how often each mechanism occurred: row-count bypass, each of the two
// frame-store banks read by the crop, front and back judgements, flip requests
// and empty frames, and fails a mechanism that never happened.
//
// Reference model: images are flat arrays indexed y * W + x. make_image draws
// a conveyor belt (a dim gradient), optionally a round cap of radius rad, a
// bright disc whose front side carries printed concentric rings, and sprinkles
// impulse (salt-and-pepper) noise over a given percentage of the pixels.
// ref_edges computes the edge image in stream coordinates (camera coordinates
// plus 2): grey = (76 R + 150 G + 29 B) >> 8; the median output at (x, y) is
// the median of grey pixels (x-2..x, y-2..y), the grey pixel (x-1, y-1) in the
// first two columns and lines and 0 in the first; the edge bit at (x, y) is 1
// where floor(sqrt(Gx^2 + Gy^2)) > thr, i.e. Gx^2 + Gy^2 >= (thr + 1)^2, over
// median pixels (x-2..x, y-2..y), and 0 in the first four columns and lines.
module cap_top_bench #(
  parameter int W        = 64,
  parameter int H        = 48,
  parameter int EDGE_THR = 125,
  parameter int SIDE_THR = 400,
  parameter int RAD      = 16,
  parameter int NOISE    = 3,          // impulse noise of frame 3, percent
  parameter int XW       = $clog2(W),
  parameter int YW       = $clog2(H),
  parameter int CNTW     = $clog2(W * H + 1),
  parameter longint MAX_CYCLES = 200000
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            run,
  input  logic            pix_rd_en,
  input  logic [XW-1:0]   pix_rd_x,
  input  logic [YW-1:0]   pix_rd_y,
  output logic [23:0]     pix_rgb,
  input  logic            pos_valid,
  input  logic            cap_found,
  input  logic [XW-1:0]   cap_left,
  input  logic [XW-1:0]   cap_right,
  input  logic [YW-1:0]   cap_top,
  input  logic [YW-1:0]   cap_bottom,
  input  logic            crop_valid,
  input  logic            crop_bit,
  input  logic [XW-1:0]   crop_x,
  input  logic [YW-1:0]   crop_y,
  input  logic            crop_first,
  input  logic            crop_last,
  input  logic [CNTW-1:0] side_cnt,
  input  logic            judge,
  input  logic            side_valid,
  input  logic            side_front,
  input  logic            flip_req,
  input  logic            ready,
  input  logic            frame_done,
  input  logic            crop_busy,
  input  logic            bypass,
  input  logic            overrun,
  input  logic            empty,
  input  logic            crop_bank       // bank the crop reads (observed inside)
);

  // ------------------------------------------------------ reference model
  typedef int unsigned img_t[];
  typedef bit          bits_t[];

  function automatic img_t make_image(int W, int H, bit cap, int cx, int cy, int rad,
                                      bit front, int noise_pct);
    img_t img = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dx = x - cx, dy = y - cy;
        int d2 = dx * dx + dy * dy;
        int r, g, b;
        // belt: dim, slowly varying, bluish
        r = 30 + (x * 16) / W; g = 35 + (y * 16) / H; b = 60;
        if (cap && d2 <= rad * rad) begin
          r = 210; g = 200; b = 190;           // cap body
          if (front) begin
            // printed rings: 3 pixels dark every 7 pixels of radius, inner 70 %
            int rr = 0;
            while ((rr + 1) * (rr + 1) <= d2) rr++;
            if (rr < (rad * 7) / 10 && (rr % 7) < 3) begin r = 60; g = 40; b = 40; end
          end
        end
        if (noise_pct > 0 && $urandom_range(0, 99) < noise_pct) begin
          if ($urandom_range(0, 1) == 1) begin r = 255; g = 255; b = 255; end
          else begin r = 0; g = 0; b = 0; end
        end
        img[y * W + x] = (r << 16) | (g << 8) | b;
      end
    return img;
  endfunction

  function automatic int gray_of(int unsigned rgb);
    int v = (76 * int'((rgb >> 16) & 255) + 150 * int'((rgb >> 8) & 255) + 29 * int'(rgb & 255)) >> 8;
    return (v > 255) ? 255 : v;
  endfunction

  function automatic bits_t ref_edges(int W, int H, img_t img, int thr);
    int   g [] = new[W * H];
    int   m [] = new[W * H];
    bits_t e   = new[W * H];
    foreach (img[i]) g[i] = gray_of(img[i]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (x == 0 || y == 0) m[y * W + x] = 0;
        else if (x < 2 || y < 2) m[y * W + x] = g[(y - 1) * W + x - 1];
        else begin
          int v [9];
          int t;
          for (int k = 0; k < 9; k++) v[k] = g[(y - 2 + k / 3) * W + x - 2 + k % 3];
          for (int i = 0; i < 9; i++)
            for (int j = 0; j < 8 - i; j++)
              if (v[j] > v[j + 1]) begin t = v[j]; v[j] = v[j + 1]; v[j + 1] = t; end
          m[y * W + x] = v[4];
        end
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (x < 4 || y < 4) e[y * W + x] = 0;
        else begin
          int p [3][3];
          int gx, gy;
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) p[r][c] = m[(y - 2 + r) * W + x - 2 + c];
          gx = (p[0][2] + 2 * p[1][2] + p[2][2]) - (p[0][0] + 2 * p[1][0] + p[2][0]);
          gy = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
          e[y * W + x] = (gx * gx + gy * gy) >= (thr + 1) * (thr + 1);
        end
      end
    return e;
  endfunction

  // bounding box of the edge pixels; returns 0 when there is none
  function automatic bit ref_box(int W, int H, bits_t e, output int l, output int r,
                                 output int t, output int b);
    l = W; r = -1; t = H; b = -1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (e[y * W + x]) begin
          if (x < l) l = x;
          if (x > r) r = x;
          if (y < t) t = y;
          if (y > b) b = y;
        end
    return r >= 0;
  endfunction

  localparam int NF       = 5;
  localparam int PIPE_LAT = 24;   // last pixel read -> frame_done
  localparam int POS_LAT  = 1;    // frame_done -> pos_valid
  longint done_cyc = 0;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- frames
  img_t  imgs  [NF];
  bits_t edges [NF];
  bit    has_cap [NF];
  bit    is_front [NF];
  bit    exp_found [NF];
  int    bl [NF], br [NF], bt [NF], bb [NF], ecount [NF];

  initial begin
    rst_n = 1'b0;
    run   = 1'b0;
    for (int f = 0; f < NF; f++) begin
      int cx, cy, noise;
      has_cap[f]  = (f != 2);
      is_front[f] = (f == 0 || f == 3);
      cx    = (f % 2 == 0) ? W / 2 - W / 10 : W / 2 + W / 8;
      cy    = (f < 3) ? H / 2 : H / 2 - H / 10;
      noise = (f == 3) ? NOISE : 0;
      imgs[f]  = make_image(W, H, has_cap[f], cx, cy, RAD, is_front[f], noise);
      edges[f] = ref_edges(W, H, imgs[f], EDGE_THR);
      exp_found[f] = ref_box(W, H, edges[f], bl[f], br[f], bt[f], bb[f]);
      ecount[f] = 0;
      if (exp_found[f])
        for (int y = bt[f]; y <= bb[f]; y++)
          for (int x = bl[f]; x <= br[f]; x++) ecount[f] += int'(edges[f][y * W + x]);
      $display("frame %0d: cap %0d front %0d box %0d..%0d x %0d..%0d (stored) edges in box %0d",
               f, has_cap[f], is_front[f], bl[f], br[f], bt[f], bb[f], ecount[f]);
    end
  end

  // --------------------------------------------------------- camera memory
  int rd_frame = 0;
  longint last_read [NF];
  int rd_idx;
  always @(posedge clk) begin
    if (pix_rd_en) begin
      rd_idx = int'(pix_rd_y) * W + int'(pix_rd_x);
      pix_rgb <= 24'(imgs[rd_frame][rd_idx]);
      if (int'(pix_rd_x) == W - 1 && int'(pix_rd_y) == H - 1) begin
        last_read[rd_frame] = cyc;
        if (rd_frame < NF - 1) rd_frame++;
        else run <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  int n_done = 0, n_pos = 0, n_side = 0;
  int n_bypass = 0, n_front = 0, n_back = 0, n_flip = 0, n_empty = 0, n_judge = 0;
  int n_bank [2] = '{0, 0};
  int cf = 0, ex = 0, ey = 0;     // frame being cropped, expected next crop pixel
  bit judge_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (bypass) n_bypass++;
    if (empty) n_empty++;
    if (judge && !judge_q) n_judge++;
    judge_q <= judge;
    if (overrun) begin failures++; $display("box dropped (overrun)"); end
    if (frame_done) begin
      checks++;
      if (cyc - last_read[n_done] != PIPE_LAT) begin
        failures++;
        $display("frame %0d: frame_done %0d clocks after last read", n_done, cyc - last_read[n_done]);
      end
      done_cyc = cyc;
      n_done++;
    end
    if (pos_valid) begin
      int f;
      f = n_pos;
      checks++;
      if (cyc - done_cyc != POS_LAT) begin
        failures++;
        $display("frame %0d: box %0d clocks after frame_done", f, cyc - done_cyc);
      end
      checks++;
      if (cap_found !== exp_found[f] ||
          (exp_found[f] && (int'(cap_left) != bl[f] - 2 || int'(cap_right) != br[f] - 2 ||
                            int'(cap_top) != bt[f] - 2 || int'(cap_bottom) != bb[f] - 2))) begin
        failures++;
        $display("frame %0d: box %0d..%0d x %0d..%0d found %0d, expected %0d..%0d x %0d..%0d found %0d",
                 f, cap_left, cap_right, cap_top, cap_bottom, cap_found,
                 bl[f] - 2, br[f] - 2, bt[f] - 2, bb[f] - 2, exp_found[f]);
      end
      checks++;
      if (cap_found !== has_cap[f]) begin failures++; $display("frame %0d: cap presence wrong", f); end
      n_pos++;
      // next crop belongs to the next frame that has a box
      if (exp_found[f]) begin cf = f; ex = bl[f]; ey = bt[f]; end
    end
    if (crop_valid) begin
      checks++;
      n_bank[crop_bank]++;
      if (int'(crop_x) != ex - 2 || int'(crop_y) != ey - 2 ||
          crop_bit !== edges[cf][ey * W + ex] ||
          crop_first !== (ex == bl[cf] && ey == bt[cf]) ||
          crop_last !== (ex == br[cf] && ey == bb[cf])) begin
        failures++;
        if (failures < 20)
          $display("frame %0d crop pixel (%0d,%0d) bit %0d, expected (%0d,%0d) bit %0d",
                   cf, crop_x, crop_y, crop_bit, ex - 2, ey - 2, edges[cf][ey * W + ex]);
      end
      if (ex == br[cf]) begin ex = bl[cf]; ey++; end else ex++;
    end
    if (side_valid) begin
      checks++;
      n_side++;
      if (int'(side_cnt) != ecount[cf] || side_front !== (ecount[cf] >= SIDE_THR) ||
          flip_req !== (ecount[cf] < SIDE_THR)) begin
        failures++;
        $display("frame %0d: count %0d front %0d flip %0d, expected count %0d", cf,
                 side_cnt, side_front, flip_req, ecount[cf]);
      end
      checks++;
      if (side_front !== is_front[cf]) begin
        failures++;
        $display("frame %0d: judged %s, test image shows the %s", cf,
                 side_front ? "front" : "back", is_front[cf] ? "front" : "back");
      end
      if (side_front) n_front++; else n_back++;
      if (flip_req) n_flip++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-28s occurred %0d times", what, n);
    if (n == 0) begin failures++; $display("  ... never happened"); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (ready);
    @(posedge clk);
    run <= 1'b1;
    // all frames sent, then wait for the last crop and judgement
    wait (n_pos == NF && !crop_busy);
    repeat (20) @(posedge clk);
    checks++;
    if (n_done != NF || n_side != NF - 1) begin
      failures++;
      $display("%0d frames stored, %0d judgements", n_done, n_side);
    end
    need("row-count bypass", n_bypass);
    need("crop from bank 0", n_bank[0]);
    need("crop from bank 1", n_bank[1]);
    need("front judgement", n_front);
    need("back judgement", n_back);
    need("flip request", n_flip);
    need("judge reached threshold", n_judge);
    need("frame without cap", n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
