// pingpong_fb: two-area frame store for the one-bit edge image.
//
// Adjacent frames are written alternately into two areas (banks) of W x H
// one-bit pixels, so one frame can be read out while the next one is being
// written. The write side takes the edge stream with its timing signals and
// derives the address from the pixel coordinates; at the end of each frame the
// write bank toggles, last_bank names the bank that now holds a complete
// frame and frame_done pulses. The read side has a registered read port (one
// clock latency) addressed by bank, column and row.
//
// The ping-pong use of two areas follows the design, which keeps them in an
// external SDRAM behind a memory controller. Here the two areas are an on-chip
// memory array with one read and one write port; the SDRAM, its controller and
// its burst timing are not part of this design.
module pingpong_fb
  import cap_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side: edge stream
  input  vsync_t        s_in,
  input  logic          wr_bit,
  output logic          frame_done,
  output logic          last_bank,
  // read side
  input  logic          rd_en,
  input  logic          rd_bank,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output logic          rd_bit
);

  localparam int unsigned FRAME = W * H;
  localparam int unsigned AW    = $clog2(2 * FRAME);

  logic [$clog2(W + 1)-1:0] x;
  logic [$clog2(H + 1)-1:0] y;
  logic                     wr_bank;

  pix_counter #(.W(W), .H(H)) u_cnt (
    .clk, .rst_n, .s(s_in), .x, .y, .line_end(), .frame_end(frame_done)
  );

  logic mem [2 * FRAME];

  function automatic logic [AW-1:0] addr_of(input logic b, input logic [YW-1:0] r,
                                            input logic [XW-1:0] c);
    return AW'(b) * AW'(FRAME) + AW'(r) * AW'(W) + AW'(c);
  endfunction

  always_ff @(posedge clk) begin
    if (s_in.de)
      mem[addr_of(wr_bank, YW'(y), XW'(x))] <= wr_bit;
    if (rd_en)
      rd_bit <= mem[addr_of(rd_bank, rd_y, rd_x)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      last_bank <= 1'b1;
    end else if (frame_done) begin
      wr_bank   <= ~wr_bank;
      last_bank <= wr_bank;
    end
  end

endmodule
