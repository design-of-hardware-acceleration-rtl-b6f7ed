// tb_image_gen: runs the frame read-out with a small timing (6 x 4 active
// pixels, 13 clocks per line, 8 lines per frame). A testbench memory answers
// each read one clock later with a value made from the pixel's coordinates.
// Checked: each output pixel carries the data of the right coordinates in
// raster order, 24 pixels per frame, hsync pulses of 3 clocks once per line,
// vsync pulses of 2 lines, a frame period of 104 clocks, and that frames stop
// after run falls.
module tb_image_gen;
  import cap_pkg::*;
  localparam int HA = 6, HF = 2, HS = 3, HBP = 2, VA = 4, VF = 1, VS = 2, VBP = 1;
  localparam int HT = HA + HF + HS + HBP, VT = VA + VF + VS + VBP;

  logic clk = 0, rst_n = 0, run = 0;
  logic rd_en;
  logic [2:0] rd_x;
  logic [1:0] rd_y;
  logic [23:0] pix_rgb, rgb_out;
  vsync_t s_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  image_gen #(.H_ACT(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HBP),
              .V_ACT(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VBP)) dut (
    .clk, .rst_n, .run, .rd_en, .rd_x, .rd_y, .pix_rgb, .s_out, .rgb_out
  );

  always @(posedge clk) if (rd_en) pix_rgb <= {8'hA5, 8'(rd_y), 5'd0, rd_x};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int px = 0, py = 0, npix = 0, hs_len = 0, vs_len = 0, n_vs = 0;
  longint vs_start = -1;
  vsync_t prev = '0;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (s_out.de) begin
      checks++;
      if (rgb_out !== {8'hA5, 8'(py), 5'd0, 3'(px)}) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) data %h", px, py, rgb_out);
      end
      px++; npix++;
    end else if (prev.de) begin
      px = 0; py++;
    end
    if (s_out.hs) hs_len++;
    else if (prev.hs) begin
      checks++;
      if (hs_len != HS) begin failures++; $display("hsync %0d clocks", hs_len); end
      hs_len = 0;
    end
    if (s_out.vs) begin
      if (!prev.vs) begin
        if (vs_start >= 0) begin
          checks++;
          if (cyc - vs_start != HT * VT) begin failures++; $display("frame period %0d", cyc - vs_start); end
        end
        vs_start = cyc;
        checks++;
        if (npix != HA * VA) begin failures++; $display("%0d pixels in frame", npix); end
        npix = 0; py = 0; n_vs++;
      end
      vs_len++;
    end else if (prev.vs) begin
      checks++;
      if (vs_len != VS * HT) begin failures++; $display("vsync %0d clocks", vs_len); end
      vs_len = 0;
    end
    prev = s_out;
  end

  initial begin
    int n_at_stop;
    pix_rgb = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run <= 1;
    repeat (HT * VT * 4 + 10) @(posedge clk);
    run <= 0;
    n_at_stop = n_vs;
    repeat (HT * VT * 3) @(posedge clk);
    checks++;
    if (n_vs < 4 || n_vs > n_at_stop + 1) begin failures++; $display("%0d frames, %0d at stop", n_vs, n_at_stop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
