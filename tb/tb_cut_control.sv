// tb_cut_control: a testbench memory holds two random one-bit 16 x 12 banks
// and answers reads one clock later. Random boxes (one of them a single
// pixel) are handed to the crop controller; the crop must list exactly the
// box's pixels of the right bank in row order with their coordinates and
// first/last markers, one pixel per clock without gaps, so that the column
// steps from the right edge back to the left edge and the row down by one on
// the very next clock. The edge count and the judgement are checked against
// the threshold (20 here): judge must rise at the pixel where the count
// reaches it, side_front and flip_req must follow at the end. A box reported
// with found low must start nothing; a box arriving during a crop must be
// dropped with an overrun pulse.
module tb_cut_control;
  import cap_pkg::*;
  localparam int W = 16, H = 12, THR = 20;

  logic clk = 0, rst_n = 0;
  logic pos_valid = 0, found = 0, bank = 0;
  logic [3:0] left = '0, right = '0, top = '0, bottom = '0;
  logic rd_en, rd_bank, rd_bit;
  logic [3:0] rd_x, rd_y;
  logic crop_valid, crop_bit, crop_first, crop_last;
  logic [3:0] crop_x, crop_y;
  logic [7:0] side_cnt;
  logic judge, side_valid, side_front, flip_req, busy, overrun, empty;
  int checks = 0, failures = 0, n_front = 0, n_back = 0, n_over = 0, n_empty = 0;

  always #5 clk = ~clk;

  cut_control #(.W(W), .H(H), .SIDE_THRESH(THR), .CNTW(8)) dut (
    .clk, .rst_n, .pos_valid, .found, .left, .right, .top, .bottom, .bank,
    .rd_en, .rd_bank, .rd_x, .rd_y, .rd_bit,
    .crop_valid, .crop_bit, .crop_x, .crop_y, .crop_first, .crop_last,
    .side_cnt, .judge, .side_valid, .side_front, .flip_req, .busy, .overrun, .empty
  );

  bit mem [2][H][W];
  always @(posedge clk) if (rd_en) rd_bit <= mem[rd_bank][rd_y][rd_x];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_over++;
    if (empty) n_empty++;
  end

  task automatic crop(input int l, input int r, input int t, input int b, input bit bk,
                      input bit disturb);
    int x, y, cnt, n, reach;
    bit got_side, in_crop;
    x = l; y = t; cnt = 0; n = 0; reach = -1; got_side = 0; in_crop = 0;
    pos_valid <= 1; found <= 1; bank <= bk;
    left <= 4'(l); right <= 4'(r); top <= 4'(t); bottom <= 4'(b);
    @(posedge clk);
    pos_valid <= 0;
    while (!got_side && n < 400) begin
      @(posedge clk);
      #1;
      if (disturb && n == 3) begin
        // a new box while this crop runs: must be dropped
        pos_valid <= 1; found <= 1; left <= 0; right <= 4'(W - 1); top <= 0; bottom <= 4'(H - 1);
      end else pos_valid <= 0;
      // one pixel per clock: no gap from the first pixel to the last
      if (in_crop && !crop_valid) begin
        failures++;
        $display("gap in the crop stream before (%0d,%0d)", x, y);
      end
      if (crop_valid) begin
        in_crop = !crop_last;
        checks++;
        if (int'(crop_x) != x || int'(crop_y) != y || crop_bit !== mem[bk][y][x] ||
            crop_first !== (x == l && y == t) || crop_last !== (x == r && y == b)) begin
          failures++;
          if (failures < 10) $display("crop pixel (%0d,%0d) bit %0d first %0d last %0d, expected (%0d,%0d) bit %0d",
                                      crop_x, crop_y, crop_bit, crop_first, crop_last, x, y, mem[bk][y][x]);
        end
        cnt += int'(mem[bk][y][x]);
        if (cnt >= THR && reach < 0) reach = n;
        if (x == r) begin x = l; y++; end else x++;
      end
      // judge is registered from the pixel that reaches the threshold
      if (reach >= 0 && n == reach + 1) begin
        checks++;
        if (!judge) begin failures++; $display("judge not raised after count reached %0d", THR); end
      end
      if (reach < 0 && judge && n > 1) begin failures++; $display("judge raised early"); end
      if (side_valid) begin
        got_side = 1;
        checks++;
        if (side_front !== (cnt >= THR) || flip_req !== (cnt < THR) || int'(side_cnt) != cnt ||
            y != b + 1) begin
          failures++;
          $display("side: front %0d flip %0d count %0d, expected count %0d (rows done %0d)",
                   side_front, flip_req, side_cnt, cnt, y - t);
        end
        if (side_front) n_front++; else n_back++;
      end
      n++;
    end
    pos_valid <= 0;
    checks++;
    if (!got_side) begin failures++; $display("no judgement"); end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (busy || crop_valid) begin failures++; $display("controller still busy"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      int l, r, t, b;
      foreach (mem[i, y, x]) mem[i][y][x] = ($urandom_range(0, 3) == 0);
      l = $urandom_range(0, W - 1); r = $urandom_range(l, W - 1);
      t = $urandom_range(0, H - 1); b = $urandom_range(t, H - 1);
      if (k == 0) begin l = 5; r = 5; t = 7; b = 7; end
      if (k == 1) begin l = 0; r = W - 1; t = 0; b = H - 1; end
      if (k == 4) begin l = 1; r = W - 2; t = 2; b = 5; end
      crop(l, r, t, b, 1'(k % 2), k == 4);
    end
    // a report without a cap
    pos_valid <= 1; found <= 0;
    @(posedge clk);
    pos_valid <= 0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (busy || n_empty != 1) begin failures++; $display("empty report: busy %0d empty pulses %0d", busy, n_empty); end
    checks++;
    if (n_over != 1) begin failures++; $display("%0d overrun pulses", n_over); end
    checks++;
    if (n_front == 0 || n_back == 0) begin failures++; $display("front %0d back %0d", n_front, n_back); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
