// sort3: sorts three values in descending order (combinational).
//
// Three compare-and-swap steps give hi >= mid >= lo. It is the sorting unit
// the median filter instantiates for its rows, its columns and the final
// three candidates. Purely combinational; the caller registers the outputs.
module sort3 #(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] c,
  output logic [DW-1:0] hi,
  output logic [DW-1:0] mid,
  output logic [DW-1:0] lo
);

  logic [DW-1:0] p, q, r, s;

  always_comb begin
    // order a and b
    p = (a >= b) ? a : b;
    q = (a >= b) ? b : a;
    // place c
    hi = (p >= c) ? p : c;
    r  = (p >= c) ? c : p;
    // the remaining two
    s   = (q >= r) ? q : r;
    lo  = (q >= r) ? r : q;
    mid = s;
  end

endmodule
