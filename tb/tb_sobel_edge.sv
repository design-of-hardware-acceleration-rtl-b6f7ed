// tb_sobel_edge: streams 10 x 7 frames into the Sobel edge detector: random
// grey levels, and a dark/bright step pattern with a ramp, so that gradients
// fall on both sides of the threshold 125. Every output bit (stream
// coordinates x, y) is compared with a reference that convolves pixels
// (x-2..x, y-2..y) with both Sobel kernels and tests Gx^2 + Gy^2 >= 126^2,
// which is floor(sqrt(Gx^2 + Gy^2)) > 125; in the first two columns and lines
// the bit must be 0. Each output must leave 15 clocks after its input.
module tb_sobel_edge;
  import cap_pkg::*;
  localparam int W = 10, H = 7, HB = 6, LAT = 15, THR = 125;

  logic clk = 0, rst_n = 0;
  vsync_t s_in, s_out;
  logic [7:0] din;
  logic       dout;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sobel_edge #(.W(W), .H(H)) dut (.clk, .rst_n, .s_in, .din, .s_out, .edge_bit(dout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][W];
  logic       expv [H][W];
  int         n_edge = 0;
  longint     in_cyc [H][W];

  function automatic logic sobel_ref(input int x, input int y);
    int p [3][3];
    int gx, gy;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) p[r][c] = int'(img[y - 2 + r][x - 2 + c]);
    gx = (p[0][2] + 2 * p[1][2] + p[2][2]) - (p[0][0] + 2 * p[1][0] + p[2][0]);
    gy = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
    return (gx * gx + gy * gy) >= (THR + 1) * (THR + 1);
  endfunction

  int ox = 0, oy = 0;
  logic de_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_out.vs) begin ox = 0; oy = 0; end
    if (s_out.de) begin
      checks++;
      if (expv[oy][ox]) n_edge++;
      if (dout !== expv[oy][ox] || cyc - 1 != in_cyc[oy][ox] + LAT) begin
        failures++;
        if (failures < 10) $display("sobel at %0d,%0d = %0d exp %0d (latency %0d)", ox, oy, dout, expv[oy][ox], cyc - 1 - in_cyc[oy][ox]);
      end
      ox++;
    end else if (de_q) begin
      ox = 0; oy++;
    end
    de_q = s_out.de;
  end

  initial begin
    s_in = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 4; f++) begin
      foreach (img[y, x]) begin
        if (f % 2 == 0) img[y][x] = 8'($urandom);
        else img[y][x] = (x >= 3 + f / 2 && y >= 2) ? 8'(120 + 8 * y) : 8'(2 * x + 30 * f);
      end
      foreach (expv[y, x])
        expv[y][x] = (x < 2 || y < 2) ? 1'b0 : sobel_ref(x, y);
      s_in <= '{vs: 1'b1, hs: 1'b0, de: 1'b0};
      repeat (4) @(posedge clk);
      s_in <= '0;
      repeat (3) @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          s_in <= '{vs: 1'b0, hs: 1'b0, de: 1'b1};
          din  <= img[y][x];
          in_cyc[y][x] = cyc;
          @(posedge clk);
        end
        s_in <= '0;
        din  <= '0;
        for (int b = 0; b < HB; b++) begin
          s_in.hs <= (b == 2);
          @(posedge clk);
        end
      end
      repeat (20) @(posedge clk);
    end
    checks++;
    if (n_edge < 20 || n_edge > 200) begin failures++; $display("too few or too many edges: %0d", n_edge); end
    checks++;
    if (oy != H) begin failures++; $display("last frame: %0d lines out", oy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
