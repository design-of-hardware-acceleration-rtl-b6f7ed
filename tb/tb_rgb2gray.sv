// tb_rgb2gray: drives random RGB pixels with a randomly gapped data enable and
// checks every grey output against floor((76 R + 150 G + 29 B) / 256), and that
// it leaves exactly three clocks after its pixel entered, with the timing
// signals delayed alike. Extremes (black, white, pure colours) are included.
module tb_rgb2gray;
  import cap_pkg::*;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  vsync_t s_in, s_out;
  logic [23:0] rgb;
  logic [7:0]  gray;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rgb2gray dut (.clk, .rst_n, .s_in, .rgb, .s_out, .gray);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint c; logic [7:0] y; vsync_t s; } exp_t;
  exp_t q [$];

  // monitor: compare outputs with the queued expectations
  always @(posedge clk) if (rst_n) begin
    if (s_out.de) begin
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (gray !== e.y || cyc - 1 != e.c + LAT || s_out !== e.s) begin
          failures++;
          if (failures < 10) $display("gray %0d exp %0d, latency %0d", gray, e.y, cyc - 1 - e.c);
        end
      end
    end
  end

  initial begin
    s_in = '0; rgb = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5000; n++) begin
      vsync_t s;
      logic [23:0] v;
      s.de = ($urandom_range(0, 3) != 0);
      s.hs = ($urandom_range(0, 9) == 0);
      s.vs = ($urandom_range(0, 29) == 0);
      case (n % 10)
        0: v = 24'hFFFFFF;
        1: v = 24'h000000;
        2: v = 24'hFF0000;
        3: v = 24'h00FF00;
        4: v = 24'h0000FF;
        default: v = 24'($urandom);
      endcase
      s_in <= s;
      rgb  <= v;
      if (s.de)
        q.push_back('{cyc, 8'((76 * int'(v[23:16]) + 150 * int'(v[15:8]) + 29 * int'(v[7:0])) / 256), s});
      @(posedge clk);
    end
    s_in <= '0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d pixels never came out", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
