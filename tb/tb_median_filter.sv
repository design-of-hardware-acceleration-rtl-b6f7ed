// tb_median_filter: streams 10 x 7 frames into the median filter: random
// grey levels, and a smooth ramp with 20 % salt-and-pepper impulse noise.
// Every output pixel (stream coordinates x, y) is compared with a reference:
// the median of pixels (x-2..x, y-2..y) computed by sorting all nine values,
// the pass-through centre pixel in the border, or 0 where the centre lies
// outside the frame. Each output must leave four clocks after its input.
module tb_median_filter;
  import cap_pkg::*;
  localparam int W = 10, H = 7, HB = 6, LAT = 4;

  logic clk = 0, rst_n = 0;
  vsync_t s_in, s_out;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  median_filter #(.W(W), .H(H)) dut (.clk, .rst_n, .s_in, .din, .s_out, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][W];
  logic [7:0] expv [H][W];
  longint     in_cyc [H][W];

  function automatic logic [7:0] med9(input int x, input int y);
    logic [7:0] v [9];
    logic [7:0] t;
    for (int k = 0; k < 9; k++) v[k] = img[y - 2 + k / 3][x - 2 + k % 3];
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  int ox = 0, oy = 0;
  logic de_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_out.vs) begin ox = 0; oy = 0; end
    if (s_out.de) begin
      checks++;
      if (dout !== expv[oy][ox] || cyc - 1 != in_cyc[oy][ox] + LAT) begin
        failures++;
        if (failures < 10) $display("median at %0d,%0d = %0d exp %0d (latency %0d)", ox, oy, dout, expv[oy][ox], cyc - 1 - in_cyc[oy][ox]);
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
        else begin
          img[y][x] = 8'(20 * x + 10 * y);
          case ($urandom_range(0, 9))
            0: img[y][x] = 8'h00;
            1: img[y][x] = 8'hFF;
            default: ;
          endcase
        end
      end
      foreach (expv[y, x])
        expv[y][x] = (x == 0 || y == 0) ? 8'h00 :
                     (x < 2 || y < 2)   ? img[y-1][x-1] : med9(x, y);
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
      repeat (8) @(posedge clk);
    end
    checks++;
    if (oy != H) begin failures++; $display("last frame: %0d lines out", oy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
