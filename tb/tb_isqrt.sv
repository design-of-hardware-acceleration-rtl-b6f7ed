// tb_isqrt: feeds a new radicand every clock into the square-root pipeline and
// checks each root, exactly IN_W/2 clocks later, against floor(sqrt(x))
// computed by a search in the testbench. Covers perfect squares, their
// neighbours, zero, the maximum value and random values.
module tb_isqrt;
  localparam int IN_W = 22;
  localparam int LAT  = IN_W / 2;

  logic clk = 0, rst_n = 0;
  logic [IN_W-1:0]   radicand;
  logic [IN_W/2-1:0] root;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isqrt #(.IN_W(IN_W)) dut (.clk, .rst_n, .radicand, .root);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_root(longint x);
    int r = 0;
    while (longint'(r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  logic [IN_W-1:0] hist [$];

  initial begin
    int n = 0;
    radicand = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3000 + LAT; k++) begin
      logic [IN_W-1:0] v;
      if (k < 3000) begin
        case (k % 5)
          0: v = IN_W'($urandom);
          1: begin int s = $urandom_range(0, 2047); v = IN_W'(s * s); end
          2: begin int s = $urandom_range(1, 2047); v = IN_W'(s * s - 1); end
          3: v = IN_W'($urandom_range(0, 300));
          default: v = (k % 2 == 1) ? '1 : '0;
        endcase
      end else v = '0;
      radicand <= v;
      hist.push_back(v);
      @(posedge clk);
      #1;
      if (hist.size() >= LAT) begin
        logic [IN_W-1:0] x;
        x = hist.pop_front();
        checks++;
        if (int'(root) != ref_root(longint'(x))) begin
          failures++;
          if (failures < 10) $display("isqrt(%0d) = %0d, expected %0d", x, root, ref_root(longint'(x)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
