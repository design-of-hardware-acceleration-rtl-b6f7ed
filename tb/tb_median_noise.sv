// tb_median_noise: the median filter under growing impulse noise.
//
// A 160 x 120 grey image of a cap (a bright disc with a dark printed ring on
// a shaded belt) is corrupted with salt-and-pepper noise at 0, 5, 15, 25 and
// 50 % of its pixels (each hit pixel turns black or white with equal odds)
// and streamed through median_filter, one frame per level. Every output pixel
// is compared bit for bit with a reference median computed here by sorting
// the nine values (with the filter's border rules). For each level the
// testbench also reports a similarity: the share of interior pixels whose
// filtered value lies within 20 grey levels of the clean image. The checks
// on it follow the published behaviour of this kind of filter: above 0.95
// for noise up to 15 %, never rising as noise grows, and clearly degraded
// (below 0.95) at 50 %. The metric is this testbench's own; absolute values
// depend on it and on the image.
module tb_median_noise;
  import cap_pkg::*;
  localparam int W = 160, H = 120, HB = 8, LAT = 4, NLEV = 5;
  localparam int LEVEL [NLEV] = '{0, 5, 15, 25, 50};

  logic clk = 0, rst_n = 0;
  vsync_t s_in, s_out;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  median_filter #(.W(W), .H(H)) dut (.clk, .rst_n, .s_in, .din, .s_out, .dout);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] clean [H][W];
  logic [7:0] img   [H][W];
  logic [7:0] expv  [H][W];
  int n_close, n_cmp;
  real sim [NLEV];

  function automatic logic [7:0] med9(input int x, input int y);
    logic [7:0] v [9];
    logic [7:0] t;
    for (int k = 0; k < 9; k++) v[k] = img[y - 2 + k / 3][x - 2 + k % 3];
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  // output side: stream coordinates, centre pixel is one up and one left
  int ox = 0, oy = 0, diff;
  logic de_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_out.vs) begin ox = 0; oy = 0; end
    if (s_out.de) begin
      checks++;
      if (dout !== expv[oy][ox]) begin
        failures++;
        if (failures < 10) $display("median at %0d,%0d = %0d exp %0d", ox, oy, dout, expv[oy][ox]);
      end
      if (ox >= 2 && oy >= 2) begin
        diff = int'(dout) - int'(clean[oy-1][ox-1]);
        n_cmp++;
        if (diff <= 20 && diff >= -20) n_close++;
      end
      ox++;
    end else if (de_q) begin
      ox = 0; oy++;
    end
    de_q = s_out.de;
  end

  initial begin
    int dx, dy, r2;
    foreach (clean[y, x]) begin
      dx = x - 80; dy = y - 60; r2 = dx * dx + dy * dy;
      if (r2 < 45 * 45) clean[y][x] = (r2 >= 20 * 20 && r2 < 25 * 25) ? 8'd90 : 8'd200;
      else               clean[y][x] = 8'(40 + x / 4);
    end
    s_in = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < NLEV; l++) begin
      foreach (img[y, x]) begin
        img[y][x] = clean[y][x];
        if ($urandom_range(0, 99) < LEVEL[l]) img[y][x] = $urandom_range(0, 1) ? 8'hFF : 8'h00;
      end
      foreach (expv[y, x])
        expv[y][x] = (x == 0 || y == 0) ? 8'h00 :
                     (x < 2 || y < 2)   ? img[y-1][x-1] : med9(x, y);
      n_close = 0; n_cmp = 0;
      s_in <= '{vs: 1'b1, hs: 1'b0, de: 1'b0};
      repeat (4) @(posedge clk);
      s_in <= '0;
      repeat (3) @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          s_in <= '{vs: 1'b0, hs: 1'b0, de: 1'b1};
          din  <= img[y][x];
          @(posedge clk);
        end
        s_in <= '0;
        din  <= '0;
        for (int b = 0; b < HB; b++) begin
          s_in.hs <= (b == 2);
          @(posedge clk);
        end
      end
      repeat (LAT + 4) @(posedge clk);
      sim[l] = real'(n_close) / real'(n_cmp);
      $display("noise %0d %%: similarity %0.4f over %0d pixels", LEVEL[l], sim[l], n_cmp);
      checks++;
      if (oy != H) begin failures++; $display("noise %0d %%: %0d lines out", LEVEL[l], oy); end
    end
    for (int l = 0; l < NLEV; l++) begin
      if (LEVEL[l] <= 15) begin
        checks++;
        if (sim[l] <= 0.95) begin failures++; $display("noise %0d %%: similarity too low", LEVEL[l]); end
      end
      if (l > 0) begin
        checks++;
        if (sim[l] > sim[l-1]) begin failures++; $display("similarity rose at %0d %%", LEVEL[l]); end
      end
    end
    checks++;
    if (sim[NLEV-1] >= 0.95) begin failures++; $display("no degradation at %0d %%", LEVEL[NLEV-1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
