// tb_pingpong_fb: writes five random one-bit 8 x 4 frames through the stream
// port. After each frame, last_bank must have toggled, and both banks are
// read back through the one-clock read port: last_bank must hold the frame
// just written, the other bank the frame before it (not overwritten).
module tb_pingpong_fb;
  import cap_pkg::*;
  localparam int W = 8, H = 4, HB = 4;

  logic clk = 0, rst_n = 0;
  vsync_t s_in;
  logic wr_bit = 0, frame_done, last_bank;
  logic rd_en = 0, rd_bank = 0, rd_bit;
  logic [2:0] rd_x = '0;
  logic [1:0] rd_y = '0;
  int checks = 0, failures = 0, n_done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_done) n_done++;

  pingpong_fb #(.W(W), .H(H)) dut (
    .clk, .rst_n, .s_in, .wr_bit, .frame_done, .last_bank,
    .rd_en, .rd_bank, .rd_x, .rd_y, .rd_bit
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit img [5][H][W];

  task automatic read_check(input bit bank, input int f);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        rd_en <= 1; rd_bank <= bank; rd_x <= 3'(x); rd_y <= 2'(y);
        @(posedge clk);
        #1;
        checks++;
        if (rd_bit !== img[f][y][x]) begin
          failures++;
          if (failures < 10) $display("bank %0d (%0d,%0d) = %0d, frame %0d has %0d", bank, x, y, rd_bit, f, img[f][y][x]);
        end
      end
    rd_en <= 0;
  endtask

  initial begin
    bit prev_bank;
    s_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    prev_bank = last_bank;
    for (int f = 0; f < 5; f++) begin
      foreach (img[f][y, x]) img[f][y][x] = 1'($urandom);
      s_in <= '{vs: 1'b1, hs: 1'b0, de: 1'b0};
      repeat (2) @(posedge clk);
      s_in <= '0;
      @(posedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          s_in   <= '{vs: 1'b0, hs: 1'b0, de: 1'b1};
          wr_bit <= img[f][y][x];
          @(posedge clk);
        end
        s_in <= '0;
        repeat (HB) @(posedge clk);
      end
      checks++;
      if (last_bank === prev_bank) begin failures++; $display("bank did not toggle"); end
      prev_bank = last_bank;
      read_check(last_bank, f);
      if (f > 0) read_check(!last_bank, f - 1);
    end
    checks++;
    if (n_done != 5) begin failures++; $display("%0d frame_done pulses", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
