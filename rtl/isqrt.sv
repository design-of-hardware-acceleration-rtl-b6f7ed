// isqrt: pipelined integer square root, root = floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method, one result bit per pipeline stage: each
// stage brings down the next two radicand bits into the partial remainder,
// tries to subtract 4*root+1 and appends a 1 to the root if that fits, a 0
// otherwise. IN_W must be even; the result has IN_W/2 bits. A new radicand is
// accepted every clock and its root appears IN_W/2 clocks later. The design
// computes Eq. 4 of the Sobel stage with a square-root module; the method and
// the pipelining are this design's choice.
module isqrt #(
  parameter int unsigned IN_W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [IN_W-1:0]     radicand,
  output logic [IN_W/2-1:0]   root
);

  localparam int unsigned N  = IN_W / 2;   // result bits = pipeline stages
  localparam int unsigned RW = N + 2;      // partial remainder width

  for (genvar i = 0; i < N; i++) begin : g_stage
    logic [IN_W-1:0] rad_i, rad;   // radicand bits still to bring down
    logic [RW-1:0]   rem_i, rem;   // partial remainder
    logic [N-1:0]    root_i, rt;   // partial root
    logic [RW-1:0]   rem_in, trial;

    if (i == 0) begin : g_first
      assign rad_i  = radicand;
      assign rem_i  = '0;
      assign root_i = '0;
    end else begin : g_next
      assign rad_i  = g_stage[i-1].rad;
      assign rem_i  = g_stage[i-1].rem;
      assign root_i = g_stage[i-1].rt;
    end

    assign rem_in = {rem_i[RW-3:0], rad_i[IN_W-1 -: 2]};
    assign trial  = {root_i, 2'b01};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rad <= '0;
        rem <= '0;
        rt  <= '0;
      end else begin
        rad <= rad_i << 2;
        if (rem_in >= trial) begin
          rem <= rem_in - trial;
          rt  <= {root_i[N-2:0], 1'b1};
        end else begin
          rem <= rem_in;
          rt  <= {root_i[N-2:0], 1'b0};
        end
      end
    end
  end

  assign root = g_stage[N-1].rt;

endmodule
