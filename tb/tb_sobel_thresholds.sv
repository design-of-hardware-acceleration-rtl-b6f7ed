// tb_sobel_thresholds: the Sobel edge detector at several thresholds.
//
// The edge threshold trades lost detail (too high) against noisy, thick
// boundaries (too low); 125 is the default. Four sobel_edge instances with
// thresholds 40, 125, 200 and 450 see the same 96 x 72 grey image: a bright
// cap on a shaded belt with a lower-contrast printed ring and a faint
// texture. Every output bit of every instance is compared with a reference
// that tests Gx^2 + Gy^2 >= (T + 1)^2 in the reference's own arithmetic. The
// number of edge pixels must fall strictly as the threshold rises, and the
// printed ring must show at the default threshold but not at 200. Run time
// is under a second.
module tb_sobel_thresholds;
  import cap_pkg::*;
  localparam int W = 96, H = 72, HB = 8, NT = 4;
  localparam int THR [NT] = '{40, 125, 200, 450};

  logic clk = 0, rst_n = 0;
  vsync_t s_in;
  vsync_t s_out [NT];
  logic [7:0] din;
  logic       dout [NT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar t = 0; t < NT; t++) begin : g_thr
    sobel_edge #(.W(W), .H(H), .THRESH(THR[t])) dut (
      .clk, .rst_n, .s_in, .din, .s_out(s_out[t]), .edge_bit(dout[t])
    );
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][W];
  bit         ring [H][W];   // pixels near the printed ring

  function automatic bit sobel_ref(input int x, input int y, input int thr);
    int p [3][3];
    int gx, gy;
    if (x < 2 || y < 2) return 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) p[r][c] = int'(img[y - 2 + r][x - 2 + c]);
    gx = (p[0][2] + 2 * p[1][2] + p[2][2]) - (p[0][0] + 2 * p[1][0] + p[2][0]);
    gy = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
    return (gx * gx + gy * gy) >= (thr + 1) * (thr + 1);
  endfunction

  int ox [NT], oy [NT], n_edge [NT], n_ring [NT];
  bit de_q [NT];
  for (genvar t = 0; t < NT; t++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (s_out[t].vs) begin ox[t] = 0; oy[t] = 0; end
      if (s_out[t].de) begin
        checks++;
        if (dout[t] !== sobel_ref(ox[t], oy[t], THR[t])) begin
          failures++;
          if (failures < 10) $display("threshold %0d: bit at %0d,%0d = %0d", THR[t], ox[t], oy[t], dout[t]);
        end
        if (dout[t]) begin
          n_edge[t]++;
          if (ring[oy[t]][ox[t]]) n_ring[t]++;
        end
        ox[t]++;
      end else if (de_q[t]) begin
        ox[t] = 0; oy[t]++;
      end
      de_q[t] = s_out[t].de;
    end
  end

  initial begin
    int dx, dy, r2;
    foreach (img[y, x]) begin
      dx = x - 48; dy = y - 36; r2 = dx * dx + dy * dy;
      if (r2 < 28 * 28)
        img[y][x] = (r2 >= 12 * 12 && r2 < 16 * 16) ? 8'd150 : 8'd190;
      else
        img[y][x] = 8'(50 + x / 3 + ((x + y) % 4));
    end
    // stream coordinates (one right, one down) of outputs near the ring
    foreach (ring[y, x]) begin
      dx = x - 1 - 48; dy = y - 1 - 36; r2 = dx * dx + dy * dy;
      ring[y][x] = (r2 >= 9 * 9 && r2 < 19 * 19);
    end
    foreach (n_edge[t]) begin n_edge[t] = 0; n_ring[t] = 0; ox[t] = 0; oy[t] = 0; de_q[t] = 0; end
    s_in = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
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
    repeat (30) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      $display("threshold %0d: %0d edge pixels, %0d of them on the printed ring", THR[t], n_edge[t], n_ring[t]);
      checks++;
      if (oy[t] != H) begin failures++; $display("threshold %0d: %0d lines out", THR[t], oy[t]); end
      if (t > 0) begin
        checks++;
        if (n_edge[t] >= n_edge[t-1]) begin failures++; $display("edge count did not fall at %0d", THR[t]); end
      end
    end
    checks++;
    if (n_ring[1] == 0 || n_ring[2] != 0) begin
      failures++;
      $display("printed ring: %0d edges at 125, %0d at 200", n_ring[1], n_ring[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
