// tb_boundary_profile: a 16-entry profile. After the reset clear, each of
// several frames increments random addresses (runs of the same address
// exercise the read-after-write bypass, single hits the plain path), then
// scans. The first and last address with any hit and found are checked, as
// are the report on the clock after the scan pulse and the following clear
// of DEPTH clocks. An empty frame must report found = 0. A non-empty frame
// after another one only reports its own extent if the clear worked. One frame with many hits at
// one address checks that bypassed counts do not wrap early.
module tb_boundary_profile;
  localparam int DEPTH = 16, CW = 4;

  logic clk = 0, rst_n = 0;
  logic inc = 0, scan = 0;
  logic [3:0] addr = '0;
  logic ready, done, found, bypass;
  logic [3:0] first, last;
  int checks = 0, failures = 0, n_bypass = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (bypass) n_bypass++;

  boundary_profile #(.DEPTH(DEPTH), .CW(CW)) dut (
    .clk, .rst_n, .inc, .addr, .scan, .ready, .done, .found, .first, .last, .bypass
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int mode);
    bit hit [DEPTH];
    int lo, hi, t, a, len;
    lo = DEPTH;
    hi = -1;
    foreach (hit[i]) hit[i] = 0;
    if (mode == 1) begin
      // runs of equal addresses and single hits
      for (int n = 0; n < 12; n++) begin
        a   = $urandom_range(0, DEPTH - 1);
        len = $urandom_range(1, 3);
        for (int k = 0; k < len; k++) begin
          inc <= 1; addr <= 4'(a); hit[a] = 1;
          @(posedge clk);
        end
        if ($urandom_range(0, 1) == 1) begin
          inc <= 0;
          @(posedge clk);
        end
      end
    end else if (mode == 2) begin
      // 15 hits in a row at one address: 4-bit count must not wrap to 0
      for (int k = 0; k < 15; k++) begin
        inc <= 1; addr <= 4'd9; hit[9] = 1;
        @(posedge clk);
      end
    end
    inc <= 0;
    foreach (hit[i]) if (hit[i]) begin if (i < lo) lo = i; if (i > hi) hi = i; end
    scan <= 1;
    @(posedge clk);
    scan <= 0;
    t = 0;
    #1;
    while (!done && t < 100) begin @(posedge clk); #1; t++; end
    checks++;
    if (t != 0) begin failures++; $display("report %0d clocks late", t); end
    t = 0;
    while (!ready && t < 100) begin @(posedge clk); #1; t++; end
    checks++;
    if (t != DEPTH) begin failures++; $display("clear took %0d clocks", t); end
    checks++;
    if (found !== (hi >= 0) || (hi >= 0 && (int'(first) != lo || int'(last) != hi))) begin
      failures++;
      $display("mode %0d: found %0d first %0d last %0d, expected %0d %0d", mode, found, first, last, lo, hi);
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (ready);
    @(posedge clk);
    for (int f = 0; f < 10; f++) run_frame(1);
    run_frame(0);
    run_frame(2);
    run_frame(0);
    run_frame(1);
    checks++;
    if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
