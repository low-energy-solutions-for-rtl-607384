// mscs_rr_arbiter: round-robin arbiter of the MSCS arbitration bus.
//
// Every router of a row (or column) holds one copy. All copies see the same
// N-bit arbitration bus (one request line per source router) and the same
// grant history, so they all pick the same winner in the same cycle without
// exchanging anything else. The winner is the first requester at or after
// the priority pointer, counting upwards with wrap-around; after a grant the
// pointer moves to the position after the winner.
//
// Timing: grant/valid are combinational from req; the pointer updates at the
// clock edge of a cycle with a grant. Reset puts the pointer at 0.
module mscs_rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic                 valid,
  output logic [$clog2(N)-1:0] winner
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    int unsigned idx;
    grant  = '0;
    valid  = 1'b0;
    winner = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (!valid && req[idx]) begin
        valid      = 1'b1;
        winner     = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (valid) ptr <= (winner == IW'(N - 1)) ? '0 : winner + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) (grant & (grant - 1'b1)) == '0);

endmodule
