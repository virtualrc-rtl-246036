// tb_vrc_vmem_rd_port: checks the virtual-memory read interface.
// Two instances with 16-bit elements over a 64-bit memory (four lanes per
// word): one against a memory that stalls and answers with random latency
// while the consumer applies random back-pressure, one against an ideal
// memory and an always-ready consumer. For random start lanes and counts
// (including 1 and a whole number of words) every element is compared
// with the memory's known contents, the element count must be exact, and
// the ideal instance must stream one element per cycle (a transfer of C
// elements may take at most C + 6 cycles from start to the last element).
module tb_vrc_vmem_rd_port;
  localparam int PW = 16, NW = 64, MAW = 26, AW = 32, LW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // instance 0: stalling memory, random ready
  logic           start0, busy0, v0, rdy0;
  logic [AW-1:0]  addr0;
  logic [LW-1:0]  cnt0;
  logic [PW-1:0]  d0;
  logic           mreq0, mgnt0, mrv0, mwe0;
  logic [MAW-1:0] ma0;
  logic [NW-1:0]  mrd0;
  // instance 1: ideal memory, always ready
  logic           start1, busy1, v1;
  logic [AW-1:0]  addr1;
  logic [LW-1:0]  cnt1;
  logic [PW-1:0]  d1;
  logic           mreq1, mgnt1, mrv1;
  logic [MAW-1:0] ma1;
  logic [NW-1:0]  mrd1;

  assign mwe0 = 1'b0;

  vrc_vmem_rd_port #(.PW(PW), .NW(NW), .MAW(MAW), .FIFO_DEPTH(4)) dut0 (
    .clk, .rst, .start(start0), .start_addr(addr0), .count(cnt0), .busy(busy0),
    .rd_valid(v0), .rd_data(d0), .rd_ready(rdy0),
    .m_req(mreq0), .m_addr(ma0), .m_gnt(mgnt0), .m_rvalid(mrv0), .m_rdata(mrd0));
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(30), .MAX_LAT(7)) mem0 (
    .clk, .rst, .m_req(mreq0), .m_we(mwe0), .m_addr(ma0), .m_wdata('0), .m_be('0),
    .m_gnt(mgnt0), .m_rvalid(mrv0), .m_rdata(mrd0));

  vrc_vmem_rd_port #(.PW(PW), .NW(NW), .MAW(MAW), .FIFO_DEPTH(4)) dut1 (
    .clk, .rst, .start(start1), .start_addr(addr1), .count(cnt1), .busy(busy1),
    .rd_valid(v1), .rd_data(d1), .rd_ready(1'b1),
    .m_req(mreq1), .m_addr(ma1), .m_gnt(mgnt1), .m_rvalid(mrv1), .m_rdata(mrd1));
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(0), .MAX_LAT(1)) mem1 (
    .clk, .rst, .m_req(mreq1), .m_we(1'b0), .m_addr(ma1), .m_wdata('0), .m_be('0),
    .m_gnt(mgnt1), .m_rvalid(mrv1), .m_rdata(mrd1));

  // independent reference of the memory pattern
  function automatic logic [PW-1:0] ref_elem(logic [AW-1:0] byte_addr);
    logic [31:0] w;
    logic [MAW-1:0] wa;
    wa = MAW'(byte_addr >> 3);
    w  = 32'(wa) * 32'h9E3779B1 ^ 32'h5A5A0000;
    return byte_addr[1] ? w[31:16] : w[15:0];
  endfunction

  always_ff @(negedge clk) rdy0 <= ($urandom % 100) < 60;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run0(input logic [AW-1:0] a, input int c);
    int got = 0;
    @(negedge clk);
    start0 = 1; addr0 = a; cnt0 = LW'(c);
    @(negedge clk);
    start0 = 0;
    while (busy0) begin
      @(posedge clk);
      if (v0 && rdy0) begin
        checks++;
        if (d0 !== ref_elem(a + AW'(2*got))) begin
          failures++;
          $display("addr %h elem %0d: got %h expected %h", a, got, d0, ref_elem(a + AW'(2*got)));
        end
        got++;
      end
      @(negedge clk);
    end
    checks++;
    if (got != c) begin failures++; $display("count %0d, received %0d", c, got); end
  endtask

  task automatic run1(input logic [AW-1:0] a, input int c);
    int got = 0, cyc = 0;
    @(negedge clk);
    start1 = 1; addr1 = a; cnt1 = LW'(c);
    @(negedge clk);
    start1 = 0;
    while (busy1) begin
      @(posedge clk);
      cyc++;
      if (v1) begin
        checks++;
        if (d1 !== ref_elem(a + AW'(2*got))) begin failures++; $display("ideal: elem %0d mismatch", got); end
        got++;
      end
      @(negedge clk);
    end
    checks += 2;
    if (got != c) begin failures++; $display("ideal: count %0d received %0d", c, got); end
    if (cyc > c + 6) begin failures++; $display("ideal: %0d elements took %0d cycles", c, cyc); end
  endtask

  initial begin
    start0 = 0; start1 = 0; addr0 = 0; addr1 = 0; cnt0 = 0; cnt1 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run0(32'h100, 1);
    run0(32'h106, 1);
    run0(32'h200, 8);
    run0(32'h302, 13);
    for (int i = 0; i < 25; i++) run0(($urandom % 32'h4000) & ~32'h1, 1 + ($urandom % 60));
    run1(32'h0, 64);
    run1(32'h1006, 200);
    run1(32'h2002, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
