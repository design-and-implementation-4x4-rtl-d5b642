// rr_arbiter: round-robin arbiter for one router output.
//
// Grants at most one of N requesters per cycle. The search starts at the
// requester after the one granted last, so every requester that keeps
// requesting is served within N grants. The pointer moves only when a grant
// is actually given (en high and some request present). en is low while the
// output buffer behind the arbiter is full; the arbiter then grants nothing.
// The paper names a round-robin arbiter for the crossbar; its inner
// structure (a rotating priority pointer) is this design's choice. grant is
// combinational from req, en and the pointer register.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         nreset,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;      // highest-priority requester this cycle
  logic [IW-1:0] win;      // index granted this cycle
  logic          found;

  always_comb begin
    grant = '0;
    win   = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = int'(ptr) + k;
      if (idx >= N) idx = idx - N;
      if (!found && en && req[idx]) begin
        found      = 1'b1;
        win        = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)    ptr <= '0;
    else if (found) ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!nreset) $onehot0(grant));

endmodule
