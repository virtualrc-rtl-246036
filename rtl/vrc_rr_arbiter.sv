// vrc_rr_arbiter: round-robin arbiter for the ports of a virtual memory.
// gnt is a one-hot, combinational choice among the asserted req bits,
// searching upward from the priority pointer. When accept is high the
// granted requester was served and the pointer moves to the requester just
// after it, so every active requester is served within N grants.
// The round-robin policy follows the document; the pointer update on
// acceptance (not on every cycle) is this design's choice.
module vrc_rr_arbiter #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] gnt,
  output logic [$clog2(N>1?N:2)-1:0] gnt_idx
);
  localparam int IW = $clog2(N>1?N:2);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N-1; k >= 0; k--) begin
      // candidate index ptr+k modulo N, scanned so the lowest k wins
      automatic int idx = (int'(ptr) + k) % N;
      if (req[idx]) begin
        gnt     = '0;
        gnt[idx] = 1'b1;
        gnt_idx = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (accept && |req) ptr <= (int'(gnt_idx) == N-1) ? '0 : gnt_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_grant_when_req: assert property (@(posedge clk) disable iff (rst) (|req) |-> (|gnt));
endmodule
