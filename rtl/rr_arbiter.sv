// rr_arbiter: round-robin arbiter, one grant per clock.
//
// `gnt` is one-hot (or zero when nothing requests) and combinational from
// `req`. The requester granted last has the lowest priority in the next cycle;
// the search starts just after it. Used by vsock_mem to share its single
// memory port between the base station, the channel and the subscriber station.
module rr_arbiter #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last_q;

  always_comb begin
    int unsigned idx;
    gnt = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last_q) + k) % N;
      if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= IW'(N - 1);
    else
      for (int unsigned k = 0; k < N; k++)
        if (gnt[k]) last_q <= IW'(k);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
