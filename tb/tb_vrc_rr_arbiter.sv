// tb_vrc_rr_arbiter: checks the round-robin arbiter against a reference
// model. Random request patterns and random acceptance are applied; every
// cycle the grant must be the first requester at or after the reference
// pointer, and the pointer must advance past each accepted grant. A
// fairness check keeps all requesters asserted and requires each of them
// to be granted once in every N accepted grants.
module tb_vrc_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, gnt;
  logic accept;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;
  int ref_ptr;

  vrc_rr_arbiter #(.N(N)) dut (.clk, .rst, .req, .accept, .gnt, .gnt_idx);

  always #5 clk = ~clk;

  function automatic int expect_idx(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    int seen [N];
    req = '0; accept = 0; ref_ptr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // random traffic
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      req    = N'($urandom);
      accept = ($urandom % 3) != 0;
      #1;
      e = expect_idx(req, ref_ptr);
      checks++;
      if (e < 0) begin
        if (gnt != '0) begin failures++; $display("grant without request %b", gnt); end
      end else if (gnt != N'(1) << e || int'(gnt_idx) != e) begin
        failures++;
        $display("req=%b ptr=%0d expected %0d got %b", req, ref_ptr, e, gnt);
      end
      @(posedge clk);
      if (accept && e >= 0) ref_ptr = (e + 1) % N;
    end
    // fairness with all requesting
    @(negedge clk);
    req = '1; accept = 1;
    for (int round = 0; round < 4; round++) begin
      foreach (seen[k]) seen[k] = 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        seen[gnt_idx]++;
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (seen[k] != 1) begin failures++; $display("requester %0d served %0d times", k, seen[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
