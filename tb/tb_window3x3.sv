// tb_window3x3: streams three random 9 x 6 frames (with line and frame
// blanking) into the window generator and checks, one clock after each
// pixel (x, y), the border and outside flags and, away from the border, all
// nine window entries against pixels (x-2..x, y-2..y) of the frame. Frames
// differ, so data left over from the previous frame would be caught.
module tb_window3x3;
  import cap_pkg::*;
  localparam int W = 9, H = 6, HB = 5;

  logic clk = 0, rst_n = 0;
  vsync_t s_in, s_out;
  logic [7:0] din;
  logic [2:0][2:0][7:0] win;
  logic border, outside;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  window3x3 #(.W(W), .H(H), .DW(8)) dut (.clk, .rst_n, .s_in, .din, .s_out, .win, .border, .outside);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [H][W];
  int cx = -1, cy = -1;        // coordinates of the pixel sent last clock

  always @(posedge clk) if (rst_n && cx >= 0) begin
    #1;
    checks++;
    if (!s_out.de) begin failures++; $display("de not delayed by one clock"); end
    if (border !== (cx < 2 || cy < 2) || outside !== (cx == 0 || cy == 0)) begin
      failures++; $display("border flag wrong at %0d,%0d", cx, cy);
    end
    if (!(cx < 2 || cy < 2)) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (win[r][c] !== img[cy-2+r][cx-2+c]) begin
            failures++;
            if (failures < 10) $display("win[%0d][%0d] at %0d,%0d = %0d exp %0d", r, c, cx, cy, win[r][c], img[cy-2+r][cx-2+c]);
          end
        end
    end
  end

  initial begin
    s_in = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      foreach (img[y, x]) img[y][x] = 8'($urandom);
      s_in <= '{vs: 1'b1, hs: 1'b0, de: 1'b0};
      repeat (4) @(posedge clk);
      s_in <= '0;
      repeat (3) @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          s_in <= '{vs: 1'b0, hs: 1'b0, de: 1'b1};
          din  <= img[y][x];
          @(posedge clk);
          cx = x; cy = y;
        end
        s_in <= '0;
        din  <= '0;
        for (int b = 0; b < HB; b++) begin
          s_in.hs <= (b == 2);
          @(posedge clk);
          cx = -1;
        end
      end
    end
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
