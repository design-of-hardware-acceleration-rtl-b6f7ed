// tb_sort3: checks the three-value sorter against a reference ordering on
// random values, including ties. Combinational block; no clock is needed
// beyond the watchdog's time limit.
module tb_sort3;
  logic [7:0] a, b, c, hi, mid, lo;
  int checks = 0, failures = 0;

  sort3 #(.DW(8)) dut (.a, .b, .c, .hi, .mid, .lo);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v [3];
    logic [7:0] t;
    for (int n = 0; n < 2000; n++) begin
      v[0] = 8'($urandom); v[1] = 8'($urandom); v[2] = 8'($urandom);
      if (n % 4 == 0) v[1] = v[0];          // ties
      if (n % 7 == 0) v[2] = v[0];
      a = v[0]; b = v[1]; c = v[2];
      // reference: bubble sort, descending
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2 - i; j++)
          if (v[j] < v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
      #1;
      checks++;
      if (hi !== v[0] || mid !== v[1] || lo !== v[2]) begin
        failures++;
        if (failures < 10)
          $display("sort3 mismatch %0d %0d %0d -> %0d %0d %0d", a, b, c, hi, mid, lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
