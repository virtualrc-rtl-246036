// tb_vrc_virtual_memory: checks a virtual memory with two 32-bit read
// ports, two 16-bit write ports and a host port attached, all sharing one
// 64-bit external memory that stalls and answers with random latency. The
// small tag FIFO (4 entries) also makes the read hold-back occur.
// Phase 1: the host writes words and reads them back. Phase 2: both write
// ports stream into their own regions (one starting mid-word) while the
// host reads other words. Phase 3: both read ports stream back regions
// while the host keeps reading. All data is compared with a byte-level
// reference. The test also requires that the round-robin arbiter saw
// requests from several ports in the same cycle, and that every port was
// granted at least once.
module tb_vrc_virtual_memory;
  localparam int NUM_RD = 2, NUM_WR = 2, RD_PW = 32, WR_PW = 16, NW = 64;
  localparam int AW = 32, MAW = 26, LW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_RD-1:0]            rd_start, rd_busy, rd_valid, rd_ready;
  logic [NUM_RD-1:0][AW-1:0]    rd_addr;
  logic [NUM_RD-1:0][LW-1:0]    rd_count;
  logic [NUM_RD-1:0][RD_PW-1:0] rd_data;
  logic [NUM_WR-1:0]            wr_start, wr_busy, wr_valid, wr_ready;
  logic [NUM_WR-1:0][AW-1:0]    wr_addr;
  logic [NUM_WR-1:0][LW-1:0]    wr_count;
  logic [NUM_WR-1:0][WR_PW-1:0] wr_data;
  logic            h_req, h_we, h_gnt, h_rvalid;
  logic [MAW-1:0]  h_addr;
  logic [NW-1:0]   h_wdata, h_rdata;
  logic            m_req, m_we, m_gnt, m_rvalid;
  logic [MAW-1:0]  m_addr;
  logic [NW-1:0]   m_wdata, m_rdata;
  logic [NW/8-1:0] m_be;

  // the ports under test are attached to the virtual memory as requesters
  // 0..1 (read), 2..3 (write) and 4 (host)
  localparam int NREQ = NUM_RD + NUM_WR + 1, HOST = NUM_RD + NUM_WR;
  logic [NREQ-1:0]            q_req, q_we, q_gnt, q_rvalid;
  logic [NREQ-1:0][MAW-1:0]   q_addr;
  logic [NREQ-1:0][NW-1:0]    q_wdata;
  logic [NREQ-1:0][NW/8-1:0]  q_be;
  logic [NW-1:0]              q_rdata;

  for (genvar i = 0; i < NUM_RD; i++) begin : g_rd
    vrc_vmem_rd_port #(.PW(RD_PW), .NW(NW), .AW(AW), .MAW(MAW), .LW(LW), .FIFO_DEPTH(4)) u_rd (
      .clk, .rst, .start(rd_start[i]), .start_addr(rd_addr[i]), .count(rd_count[i]),
      .busy(rd_busy[i]), .rd_valid(rd_valid[i]), .rd_data(rd_data[i]), .rd_ready(rd_ready[i]),
      .m_req(q_req[i]), .m_addr(q_addr[i]), .m_gnt(q_gnt[i]), .m_rvalid(q_rvalid[i]),
      .m_rdata(q_rdata));
    assign q_we[i] = 1'b0;
    assign q_wdata[i] = '0;
    assign q_be[i] = '0;
  end
  for (genvar j = 0; j < NUM_WR; j++) begin : g_wr
    vrc_vmem_wr_port #(.PW(WR_PW), .NW(NW), .AW(AW), .MAW(MAW), .LW(LW), .FIFO_DEPTH(4)) u_wr (
      .clk, .rst, .start(wr_start[j]), .start_addr(wr_addr[j]), .count(wr_count[j]),
      .busy(wr_busy[j]), .wr_valid(wr_valid[j]), .wr_data(wr_data[j]), .wr_ready(wr_ready[j]),
      .m_req(q_req[NUM_RD+j]), .m_addr(q_addr[NUM_RD+j]), .m_wdata(q_wdata[NUM_RD+j]),
      .m_be(q_be[NUM_RD+j]), .m_gnt(q_gnt[NUM_RD+j]));
    assign q_we[NUM_RD+j] = 1'b1;
  end
  assign q_req[HOST]   = h_req;
  assign q_we[HOST]    = h_we;
  assign q_addr[HOST]  = h_addr;
  assign q_wdata[HOST] = h_wdata;
  assign q_be[HOST]    = '1;
  assign h_gnt         = q_gnt[HOST];
  assign h_rvalid      = q_rvalid[HOST];
  assign h_rdata       = q_rdata;

  vrc_virtual_memory #(.NUM_REQ(NREQ), .NW(NW), .MAW(MAW), .TAG_DEPTH(4)) dut (
    .clk, .rst, .req(q_req), .we(q_we), .addr(q_addr), .wdata(q_wdata), .be(q_be),
    .gnt(q_gnt), .rvalid(q_rvalid), .rdata(q_rdata),
    .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_gnt, .m_rvalid, .m_rdata);
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(20), .MAX_LAT(5)) mem (
    .clk, .rst, .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_gnt, .m_rvalid, .m_rdata);

  logic [7:0] ref_bytes [logic [AW-1:0]];
  int contention = 0, holdback = 0;
  int served [NUM_RD+NUM_WR+1];

  function automatic logic [7:0] init_byte(logic [AW-1:0] ba);
    logic [31:0] w;
    w = 32'(MAW'(ba >> 3)) * 32'h9E3779B1 ^ 32'h5A5A0000;
    return w[8*ba[1:0] +: 8];
  endfunction
  function automatic logic [7:0] ref_byte(logic [AW-1:0] ba);
    return ref_bytes.exists(ba) ? ref_bytes[ba] : init_byte(ba);
  endfunction
  function automatic logic [NW-1:0] ref_word(logic [MAW-1:0] wa);
    logic [NW-1:0] w;
    for (int b = 0; b < 8; b++) w[b*8 +: 8] = ref_byte({AW'(wa), 3'b000} + AW'(b));
    return w;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if ($countones(q_req) > 1) contention++;
    if (dut.tag_full && (q_req & ~q_we) != '0) holdback++;
    for (int k = 0; k < NREQ; k++) if (q_gnt[k]) served[k]++;
  end

  task automatic host_write(input logic [MAW-1:0] a, input logic [NW-1:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(posedge clk); while (!h_gnt) @(posedge clk);
    for (int b = 0; b < 8; b++) ref_bytes[{AW'(a), 3'b000} + AW'(b)] = d[b*8 +: 8];
    @(negedge clk); h_req = 0;
  endtask

  task automatic host_read_check(input logic [MAW-1:0] a);
    logic [NW-1:0] exp;
    @(negedge clk); h_req = 1; h_we = 0; h_addr = a;
    @(posedge clk); while (!h_gnt) @(posedge clk);
    exp = ref_word(a);
    @(negedge clk); h_req = 0;
    while (!h_rvalid) @(negedge clk);
    check(h_rdata == exp, $sformatf("host read %h: %h vs %h", a, h_rdata, exp));
  endtask

  task automatic wr_stream(input int p, input logic [AW-1:0] a, input int c);
    int sent = 0;
    logic [WR_PW-1:0] val;
    @(negedge clk); wr_start[p] = 1; wr_addr[p] = a; wr_count[p] = LW'(c);
    @(negedge clk); wr_start[p] = 0;
    val = WR_PW'($urandom);
    wr_valid[p] = 1; wr_data[p] = val;
    while (sent < c) begin
      @(posedge clk);
      if (wr_valid[p] && wr_ready[p]) begin
        ref_bytes[a + AW'(2*sent)]     = val[7:0];
        ref_bytes[a + AW'(2*sent) + 1] = val[15:8];
        sent++;
        val = WR_PW'($urandom);
      end
      @(negedge clk);
      wr_valid[p] = ($urandom % 4) != 0; wr_data[p] = val;
    end
    wr_valid[p] = 0;
    while (wr_busy[p]) @(negedge clk);
  endtask

  task automatic rd_stream(input int p, input logic [AW-1:0] a, input int c);
    int got = 0;
    logic [RD_PW-1:0] exp;
    @(negedge clk); rd_start[p] = 1; rd_addr[p] = a; rd_count[p] = LW'(c);
    @(negedge clk); rd_start[p] = 0;
    while (got < c) begin
      rd_ready[p] = ($urandom % 3) != 0;
      @(posedge clk);
      if (rd_valid[p] && rd_ready[p]) begin
        for (int b = 0; b < 4; b++) exp[b*8 +: 8] = ref_byte(a + AW'(4*got + b));
        check(rd_data[p] == exp, $sformatf("port %0d elem %0d: %h vs %h", p, got, rd_data[p], exp));
        got++;
      end
      @(negedge clk);
    end
    rd_ready[p] = 0;
    @(negedge clk);
    check(!rd_busy[p], "read port idle after its last element");
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (served[k]) served[k] = 0;
    rd_start = '0; rd_addr = '0; rd_count = '0; rd_ready = '0;
    wr_start = '0; wr_addr = '0; wr_count = '0; wr_valid = '0; wr_data = '0;
    h_req = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // phase 1: host port alone
    for (int i = 0; i < 16; i++) host_write(MAW'(32'h40 + i), {$urandom, $urandom});
    for (int i = 0; i < 16; i++) host_read_check(MAW'(32'h40 + i));
    // phase 2: both write ports and the host together
    fork
      wr_stream(0, 32'h1000, 100);
      wr_stream(1, 32'h2002, 77);
      for (int i = 0; i < 20; i++) host_read_check(MAW'(32'h40 + i));
    join
    for (int wa = 32'h1000 / 8 - 1; wa <= 32'h2002 / 8 + 21; wa++) host_read_check(MAW'(wa));
    // phase 3: both read ports and the host together
    fork
      rd_stream(0, 32'h1000, 50);
      rd_stream(1, 32'h2000, 41);
      for (int i = 0; i < 20; i++) host_read_check(MAW'(32'h800 + i));
    join
    fork
      rd_stream(0, 32'h1ffc, 30);
      rd_stream(1, 32'h0ff8, 7);
    join
    check(contention > 0, "arbiter saw simultaneous requests");
    check(holdback > 0, "reads held back while the tag FIFO was full");
    for (int k = 0; k < NUM_RD + NUM_WR + 1; k++) check(served[k] > 0, $sformatf("requester %0d served", k));
    $display("contention cycles %0d, tag-full hold-back cycles %0d", contention, holdback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
