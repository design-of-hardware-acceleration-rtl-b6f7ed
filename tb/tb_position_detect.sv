// tb_position_detect: streams one-bit 16 x 12 frames with line and frame
// blanking. Each frame scatters edge pixels inside a random rectangle (its
// four sides always touched), or holds no edge at all. After each frame the
// reported box and found flag are checked against the rectangle, and the
// report must come within W + 4 clocks of the frame's last pixel. The row
// profile's bypass must have been used.
module tb_position_detect;
  import cap_pkg::*;
  localparam int W = 16, H = 12, HB = 20;

  logic clk = 0, rst_n = 0;
  vsync_t s_in;
  logic edge_bit;
  logic pos_valid, found, ready, bypass;
  logic [3:0] left, right, top, bottom;
  int checks = 0, failures = 0, n_bypass = 0, n_valid = 0;
  longint cyc = 0, last_px = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (bypass) n_bypass++;

  position_detect #(.W(W), .H(H)) dut (
    .clk, .rst_n, .s_in, .edge_bit, .pos_valid, .found, .left, .right, .top, .bottom,
    .ready, .bypass
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit img [H][W];
  int l, r, t, b;
  bit any;

  always @(posedge clk) if (rst_n && pos_valid) begin
    n_valid++;
    checks++;
    if (found !== any || (any && (int'(left) != l || int'(right) != r ||
                                  int'(top) != t || int'(bottom) != b))) begin
      failures++;
      $display("box %0d..%0d x %0d..%0d found %0d, expected %0d..%0d x %0d..%0d found %0d",
               left, right, top, bottom, found, l, r, t, b, any);
    end
    checks++;
    if (cyc - last_px != 2) begin failures++; $display("report %0d clocks after frame", cyc - last_px); end
  end

  initial begin
    s_in = '0; edge_bit = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (ready);
    for (int f = 0; f < 12; f++) begin
      foreach (img[y, x]) img[y][x] = 0;
      any = (f % 4 != 3);
      if (any) begin
        l = $urandom_range(0, W - 1); r = $urandom_range(l, W - 1);
        t = $urandom_range(0, H - 1); b = $urandom_range(t, H - 1);
        for (int y = t; y <= b; y++)
          for (int x = l; x <= r; x++) img[y][x] = ($urandom_range(0, 2) == 0);
        img[t][$urandom_range(l, r)] = 1;
        img[b][$urandom_range(l, r)] = 1;
        img[$urandom_range(t, b)][l] = 1;
        img[$urandom_range(t, b)][r] = 1;
        if (f == 0) for (int x = l; x <= r; x++) img[t][x] = 1;  // a full row
      end
      s_in <= '{vs: 1'b1, hs: 1'b0, de: 1'b0};
      repeat (4) @(posedge clk);
      s_in <= '0;
      repeat (3) @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          s_in     <= '{vs: 1'b0, hs: 1'b0, de: 1'b1};
          edge_bit <= img[y][x];
          @(posedge clk);
        end
        last_px = cyc;
        s_in     <= '0;
        edge_bit <= 1'b0;
        repeat (HB) @(posedge clk);
      end
      repeat (10) @(posedge clk);
    end
    checks++;
    if (n_valid != 12) begin failures++; $display("%0d reports for 12 frames", n_valid); end
    checks++;
    if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
