// rgb2gray: converts 24-bit RGB pixels to 8-bit grey, Y = 0.299R + 0.587G + 0.114B.
//
// The coefficients are scaled by 256 and truncated to integers (76, 150, 29),
// so the weighted sum is the grey value shifted left by eight bits. Pipeline:
// stage 1 registers the three products, stage 2 registers their 18-bit sum,
// stage 3 registers its upper ten bits (bits 17:8). The output is then formed
// combinationally: if either of the two high bits of that ten-bit value is set
// the result is beyond 0xFF and the output saturates to 0xFF, otherwise it is
// the low eight bits. R is bits 23:16 of the input, G bits 15:8 and B bits 7:0.
// Latency is three clocks; the timing signals are delayed by the same amount.
// All of this follows the design. With the truncated coefficients (sum 255) the
// saturation cannot trigger for 8-bit inputs; it is kept because the
// coefficients are parameters.
module rgb2gray
  import cap_pkg::*;
#(
  parameter int unsigned COEF_R = 76,    // floor(0.299 * 256)
  parameter int unsigned COEF_G = 150,   // floor(0.587 * 256)
  parameter int unsigned COEF_B = 29     // floor(0.114 * 256)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vsync_t      s_in,
  input  logic [23:0] rgb,
  output vsync_t      s_out,
  output logic [7:0]  gray
);

  logic [17:0] prod_r, prod_g, prod_b;
  logic [17:0] sum18;
  logic [9:0]  top10;
  vsync_t      s_d1, s_d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_r <= '0;
      prod_g <= '0;
      prod_b <= '0;
      sum18  <= '0;
      top10  <= '0;
      s_d1   <= '0;
      s_d2   <= '0;
      s_out  <= '0;
    end else begin
      prod_r <= 18'(rgb[23:16]) * 18'(COEF_R);
      prod_g <= 18'(rgb[15:8])  * 18'(COEF_G);
      prod_b <= 18'(rgb[7:0])   * 18'(COEF_B);
      sum18  <= prod_r + prod_g + prod_b;
      top10  <= sum18[17:8];
      s_d1   <= s_in;
      s_d2   <= s_d1;
      s_out  <= s_d2;
    end
  end

  assign gray = (top10[9:8] != 2'b00) ? 8'hFF : top10[7:0];

endmodule
