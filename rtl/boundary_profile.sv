// boundary_profile: counts edge pixels per coordinate and finds the first and
// last coordinate that holds any.
//
// A count register file of DEPTH entries is indexed by one pixel coordinate
// (the column for the horizontal extent, the row for the vertical one). When
// inc is high the entry at addr is read, incremented and written back one clock
// later at the address delayed by one clock, as in the design. A pixel that
// hits the entry still waiting for its write (always the case along a row for
// the row profile) takes the pending value instead of the stale one: a
// one-entry bypass, this design's addition that keeps the counts exact.
//
// The first and last coordinate whose count is non-zero are extracted while
// the frame runs: whenever an entry is read as zero, its coordinate holds a
// boundary for the first time in this frame and widens the running extent.
// A pulse on scan, given right after the last pixel of a frame, latches the
// extent: on the next clock done pulses and found, first and last hold the
// result until the next scan, so the position is ready one clock after the
// frame ends, as in the design. The register file is then cleared for the
// next frame, one entry per clock (DEPTH clocks, ready low), which must end
// before the next frame's first edge pixel. After reset the same clear runs
// first. Increments during a clear are ignored. scan must not coincide with
// inc; the last increment may still be pending. Counts wrap at 2^CW; an entry
// that wraps to zero is seen as new again, which cannot change the extent.
module boundary_profile #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned CW    = 10,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  input  logic [AW-1:0] addr,
  input  logic          scan,
  output logic          ready,
  output logic          done,
  output logic          found,
  output logic [AW-1:0] first,
  output logic [AW-1:0] last,
  output logic          bypass      // a read was served from the pending write
);

  typedef enum logic {S_CLEAR, S_IDLE} state_t;
  state_t state;

  logic [CW-1:0] cnt_mem [DEPTH];
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [CW-1:0] wr_data;
  logic [AW-1:0] ptr;
  logic [CW-1:0] rd_val;
  logic          run_found;          // extent of the frame so far
  logic [AW-1:0] run_first, run_last;

  // read with bypass of the write still pending from the previous clock
  assign bypass = inc && (state == S_IDLE) && wr_en && (wr_addr == addr);
  assign rd_val = bypass ? wr_data : cnt_mem[addr];

  always_ff @(posedge clk) begin
    if (wr_en)
      cnt_mem[wr_addr] <= wr_data;
    else if (state != S_IDLE)
      cnt_mem[ptr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      ptr       <= '0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      done      <= 1'b0;
      found     <= 1'b0;
      first     <= '0;
      last      <= '0;
      run_found <= 1'b0;
      run_first <= '0;
      run_last  <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          ptr <= ptr + 1'b1;
          if (ptr == AW'(DEPTH - 1)) begin
            ptr   <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (inc) begin
            wr_en   <= 1'b1;
            wr_addr <= addr;
            wr_data <= rd_val + 1'b1;
            if (rd_val == '0) begin
              // first boundary pixel at this coordinate in this frame
              run_found <= 1'b1;
              if (!run_found || addr < run_first) run_first <= addr;
              if (!run_found || addr > run_last)  run_last  <= addr;
            end
          end else if (scan) begin
            done      <= 1'b1;
            found     <= run_found;
            first     <= run_first;
            last      <= run_last;
            run_found <= 1'b0;
            ptr       <= '0;
            state     <= S_CLEAR;
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  assign ready = (state != S_CLEAR);

endmodule
