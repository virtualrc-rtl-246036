// tb_vrc_vmem_wr_port: checks the virtual-memory write interface.
// 16-bit elements are written over a 64-bit memory that stalls at random,
// while the producer inserts random gaps. Transfers start at random lanes
// and have random counts, so words are often only partly covered. After
// each transfer every word it touched, and the words on either side, are
// compared with a byte-level reference built by the testbench: written
// bytes must hold the new elements and all other bytes must keep their
// previous contents. A second instance on an ideal memory must accept one
// element per cycle (C elements in at most C + 2 cycles).
module tb_vrc_vmem_wr_port;
  localparam int PW = 16, NW = 64, MAW = 26, AW = 32, LW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           start0, busy0, v0, rdy0, mreq0, mgnt0, mrv0;
  logic [AW-1:0]  addr0;
  logic [LW-1:0]  cnt0;
  logic [PW-1:0]  d0;
  logic [MAW-1:0] ma0;
  logic [NW-1:0]  mwd0, mrd0;
  logic [7:0]     mbe0;

  logic           start1, busy1, rdy1, mreq1, mgnt1, mrv1;
  logic [AW-1:0]  addr1;
  logic [LW-1:0]  cnt1;
  logic [PW-1:0]  d1;
  logic [MAW-1:0] ma1;
  logic [NW-1:0]  mwd1, mrd1;
  logic [7:0]     mbe1;

  vrc_vmem_wr_port #(.PW(PW), .NW(NW), .MAW(MAW), .FIFO_DEPTH(4)) dut0 (
    .clk, .rst, .start(start0), .start_addr(addr0), .count(cnt0), .busy(busy0),
    .wr_valid(v0), .wr_data(d0), .wr_ready(rdy0),
    .m_req(mreq0), .m_addr(ma0), .m_wdata(mwd0), .m_be(mbe0), .m_gnt(mgnt0));
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(40), .MAX_LAT(3)) mem0 (
    .clk, .rst, .m_req(mreq0), .m_we(1'b1), .m_addr(ma0), .m_wdata(mwd0), .m_be(mbe0),
    .m_gnt(mgnt0), .m_rvalid(mrv0), .m_rdata(mrd0));

  vrc_vmem_wr_port #(.PW(PW), .NW(NW), .MAW(MAW), .FIFO_DEPTH(4)) dut1 (
    .clk, .rst, .start(start1), .start_addr(addr1), .count(cnt1), .busy(busy1),
    .wr_valid(1'b1), .wr_data(d1), .wr_ready(rdy1),
    .m_req(mreq1), .m_addr(ma1), .m_wdata(mwd1), .m_be(mbe1), .m_gnt(mgnt1));
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(0), .MAX_LAT(1)) mem1 (
    .clk, .rst, .m_req(mreq1), .m_we(1'b1), .m_addr(ma1), .m_wdata(mwd1), .m_be(mbe1),
    .m_gnt(mgnt1), .m_rvalid(mrv1), .m_rdata(mrd1));

  // byte-level reference of memory 0: written bytes only
  logic [7:0] ref_bytes [logic [AW-1:0]];

  function automatic logic [7:0] init_byte(logic [AW-1:0] ba);
    logic [31:0] w;
    w = 32'(MAW'(ba >> 3)) * 32'h9E3779B1 ^ 32'h5A5A0000;
    return w[8*ba[1:0] +: 8];
  endfunction

  function automatic logic [NW-1:0] expect_word(logic [MAW-1:0] wa);
    logic [NW-1:0] w;
    for (int b = 0; b < 8; b++) begin
      logic [AW-1:0] ba;
      ba = {AW'(wa), 3'b000} + AW'(b);
      w[b*8 +: 8] = ref_bytes.exists(ba) ? ref_bytes[ba] : init_byte(ba);
    end
    return w;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run0(input logic [AW-1:0] a, input int c);
    int sent = 0;
    logic [PW-1:0] val;
    @(negedge clk);
    start0 = 1; addr0 = a; cnt0 = LW'(c);
    @(negedge clk);
    start0 = 0;
    val = PW'($urandom);
    v0 = ($urandom % 100) < 70; d0 = val;
    while (sent < c) begin
      @(posedge clk);
      if (v0 && rdy0) begin
        ref_bytes[a + AW'(2*sent)]     = val[7:0];
        ref_bytes[a + AW'(2*sent) + 1] = val[15:8];
        sent++;
        val = PW'($urandom);
      end
      @(negedge clk);
      v0 = ($urandom % 100) < 70; d0 = val;
    end
    v0 = 0;
    while (busy0) @(negedge clk);
    for (int wa = int'(a >> 3) - 1; wa <= int'((a + AW'(2*c)) >> 3) + 1; wa++) begin
      checks++;
      if (mem0.peek(MAW'(wa)) !== expect_word(MAW'(wa))) begin
        failures++;
        $display("word %0h: got %h expected %h", wa, mem0.peek(MAW'(wa)), expect_word(MAW'(wa)));
      end
    end
  endtask

  task automatic run1(input logic [AW-1:0] a, input int c);
    int sent = 0, cyc = 0;
    @(negedge clk);
    start1 = 1; addr1 = a; cnt1 = LW'(c);
    @(negedge clk);
    start1 = 0;
    while (sent < c) begin
      d1 = PW'(sent * 3 + 1);
      @(posedge clk);
      cyc++;
      if (rdy1) sent++;
      @(negedge clk);
    end
    while (busy1) @(negedge clk);
    checks += 2;
    if (cyc > c + 2) begin failures++; $display("ideal: %0d elements took %0d cycles", c, cyc); end
    if (mem1.peek(MAW'(a >> 3)) !== {16'd10, 16'd7, 16'd4, 16'd1}) begin
      failures++; $display("ideal: first word %h", mem1.peek(MAW'(a >> 3)));
    end
  endtask

  initial begin
    start0 = 0; start1 = 0; v0 = 0; d0 = 0; d1 = 0; addr0 = 0; addr1 = 0; cnt0 = 0; cnt1 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run0(32'h100, 1);
    run0(32'h106, 1);
    run0(32'h200, 8);
    run0(32'h302, 13);
    run0(32'h304, 2);
    for (int i = 0; i < 30; i++) run0(32'h8 + (($urandom % 32'h800) & ~32'h1), 1 + ($urandom % 40));
    run1(32'h0, 64);
    run1(32'h1000, 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
