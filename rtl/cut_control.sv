// cut_control: crops the cap area out of the stored edge image and judges
// whether the cap shows its front or its back.
//
// When position detection reports a box (pos_valid with found), the block
// remembers the box and the frame-store bank holding that frame and reads the
// box out row by row: a horizontal counter runs from the left to the right
// boundary, then returns to the left boundary while the vertical counter steps
// down one row, until the bottom-right pixel has been read. Reads are issued
// one per clock; the frame store answers one clock later, and each answer
// leaves as one crop pixel (crop_valid, crop_bit, with its coordinates and
// first/last markers). A side counter counts the edge pixels of the crop;
// judge rises as soon as it reaches SIDE_THRESH. After the last pixel,
// side_valid pulses with side_front = judge: the front of a cap carries more
// printed pattern and so more edge pixels than the threshold. For a back side
// flip_req pulses together with side_valid, the instruction to the actuator
// to turn the cap over.
//
// Counters, crop order, side counter and threshold (3000) follow the design.
// A box that arrives while a crop is still running is dropped (overrun pulses)
// and a report with found low starts nothing (empty pulses); both are this
// design's choices.
module cut_control
  import cap_pkg::*;
#(
  parameter int unsigned W           = IMG_W,
  parameter int unsigned H           = IMG_H,
  parameter int unsigned SIDE_THRESH = SIDE_THR,
  parameter int unsigned XW          = $clog2(W),
  parameter int unsigned YW          = $clog2(H),
  parameter int unsigned CNTW        = $clog2(W * H + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // box from position detection
  input  logic            pos_valid,
  input  logic            found,
  input  logic [XW-1:0]   left,
  input  logic [XW-1:0]   right,
  input  logic [YW-1:0]   top,
  input  logic [YW-1:0]   bottom,
  input  logic            bank,
  // frame store read port (one clock latency)
  output logic            rd_en,
  output logic            rd_bank,
  output logic [XW-1:0]   rd_x,
  output logic [YW-1:0]   rd_y,
  input  logic            rd_bit,
  // cropped edge image
  output logic            crop_valid,
  output logic            crop_bit,
  output logic [XW-1:0]   crop_x,
  output logic [YW-1:0]   crop_y,
  output logic            crop_first,
  output logic            crop_last,
  // front / back judgement
  output logic [CNTW-1:0] side_cnt,
  output logic            judge,
  output logic            side_valid,
  output logic            side_front,
  output logic            flip_req,
  output logic            busy,
  output logic            overrun,
  output logic            empty
);

  logic [XW-1:0] l_q, r_q;
  logic [YW-1:0] b_q;
  logic          first_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      l_q      <= '0;
      r_q      <= '0;
      b_q      <= '0;
      rd_bank  <= 1'b0;
      rd_x     <= '0;
      rd_y     <= '0;
      first_rd <= 1'b0;
      overrun  <= 1'b0;
      empty    <= 1'b0;
    end else begin
      overrun <= pos_valid && found && busy;
      empty   <= pos_valid && !found;
      if (!busy) begin
        if (pos_valid && found) begin
          busy     <= 1'b1;
          l_q      <= left;
          r_q      <= right;
          b_q      <= bottom;
          rd_bank  <= bank;
          rd_x     <= left;
          rd_y     <= top;
          first_rd <= 1'b1;
        end
      end else begin
        first_rd <= 1'b0;
        if (rd_x == r_q) begin
          rd_x <= l_q;
          rd_y <= rd_y + 1'b1;
          if (rd_y == b_q) busy <= 1'b0;
        end else begin
          rd_x <= rd_x + 1'b1;
        end
      end
    end
  end

  assign rd_en = busy;

  // pixels return one clock after their read
  logic [CNTW-1:0] cnt_next;
  assign cnt_next = side_cnt + CNTW'(rd_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crop_valid <= 1'b0;
      crop_x     <= '0;
      crop_y     <= '0;
      crop_first <= 1'b0;
      crop_last  <= 1'b0;
      side_cnt   <= '0;
      judge      <= 1'b0;
      side_valid <= 1'b0;
      side_front <= 1'b0;
      flip_req   <= 1'b0;
    end else begin
      crop_valid <= busy;
      crop_x     <= rd_x;
      crop_y     <= rd_y;
      crop_first <= busy && first_rd;
      crop_last  <= busy && (rd_x == r_q) && (rd_y == b_q);
      side_valid <= 1'b0;
      flip_req   <= 1'b0;
      if (crop_valid) begin
        if (crop_first) begin
          side_cnt <= CNTW'(rd_bit);
          judge    <= (CNTW'(rd_bit) >= CNTW'(SIDE_THRESH));
        end else begin
          side_cnt <= cnt_next;
          if (cnt_next >= CNTW'(SIDE_THRESH)) judge <= 1'b1;
        end
        if (crop_last) begin
          side_valid <= 1'b1;
          side_front <= crop_first ? (CNTW'(rd_bit) >= CNTW'(SIDE_THRESH))
                                   : (cnt_next >= CNTW'(SIDE_THRESH));
          flip_req   <= crop_first ? (CNTW'(rd_bit) < CNTW'(SIDE_THRESH))
                                   : (cnt_next < CNTW'(SIDE_THRESH));
        end
      end
    end
  end

  assign crop_bit = crop_valid && rd_bit;

endmodule
