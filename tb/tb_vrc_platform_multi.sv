// tb_vrc_platform_multi: the virtual platform in a larger configuration,
// to exercise its configuration options: three virtual memories (0 mapped
// externally, 1 and 2 on-chip with different sizes), two communication
// controllers, three read ports (8 and 32 bits on memory 0, 64 bits on
// memory 2) and three write ports (16 bits on memory 0, 64 bits on memory
// 1, 8 bits on memory 2).
// The host first fills a region of every memory over the platform bus;
// then the three write ports run at once, each starting mid-word; then the
// three read ports run at once over regions that mix host-written and
// port-written bytes. All data is compared with a byte-level reference per
// memory. Memory 1 is checked by host reads. Registers of the two
// controllers must be independent. Ports sharing memory 0 must have
// competed at its arbiter.
module tb_vrc_platform_multi;
  import vrc_pkg::*;
  localparam int NW = 64, MAW = 26, AW = 32, LW = 32;
  localparam int NUM_VM = 3, NUM_RDP = 3, NUM_WRP = 3, NUM_CC = 2;
  localparam int RW [NUM_RDP] = '{8, 32, 64};
  localparam int RV [NUM_RDP] = '{0, 0, 2};
  localparam int WW [NUM_WRP] = '{16, 64, 8};
  localparam int WV [NUM_WRP] = '{0, 1, 2};
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                                 host_valid, host_gnt, host_rvalid;
  host_req_t                            host_req;
  logic [63:0]                          host_rdata;
  logic [NUM_RDP-1:0]                   rd_start, rd_busy, rd_valid, rd_ready;
  logic [NUM_RDP-1:0][AW-1:0]           rd_addr;
  logic [NUM_RDP-1:0][LW-1:0]           rd_count;
  logic [NUM_RDP-1:0][63:0]             rd_data;
  logic [NUM_WRP-1:0]                   wr_start, wr_busy, wr_valid, wr_ready;
  logic [NUM_WRP-1:0][AW-1:0]           wr_addr;
  logic [NUM_WRP-1:0][LW-1:0]           wr_count;
  logic [NUM_WRP-1:0][63:0]             wr_data;
  logic [NUM_CC-1:0][7:0][31:0]         cc_regs;
  logic [NUM_CC-1:0][7:0]               cc_reg_wr;
  logic [NUM_CC-1:0][31:0]              cc_bram_rdata;
  logic [NUM_VM-1:0]                    x_req, x_we, x_gnt, x_rvalid;
  logic [NUM_VM-1:0][MAW-1:0]           x_addr;
  logic [NUM_VM-1:0][NW-1:0]            x_wdata, x_rdata;
  logic [NUM_VM-1:0][7:0]               x_be;

  vrc_virtual_platform #(
    .NUM_CC(NUM_CC), .NUM_VM(NUM_VM), .VM_ONCHIP(3'b110),
    .VM_DEPTH({32'd512, 32'd256, 32'd0}),
    .NUM_RDP(NUM_RDP), .RDP_VM({32'd2, 32'd0, 32'd0}), .RDP_W({32'd64, 32'd32, 32'd8}), .RD_DW(64),
    .NUM_WRP(NUM_WRP), .WRP_VM({32'd2, 32'd1, 32'd0}), .WRP_W({32'd8, 32'd64, 32'd16}), .WR_DW(64)
  ) dut (
    .clk, .rst, .host_valid, .host_req, .host_gnt, .host_rvalid, .host_rdata,
    .rd_start, .rd_addr, .rd_count, .rd_busy, .rd_valid, .rd_data, .rd_ready,
    .wr_start, .wr_addr, .wr_count, .wr_busy, .wr_valid, .wr_data, .wr_ready,
    .cc_regs, .cc_reg_wr, .cc_status('0), .cc_bram_en('0), .cc_bram_we('0), .cc_bram_addr('0),
    .cc_bram_wdata('0), .cc_bram_rdata,
    .ext_req(x_req), .ext_we(x_we), .ext_addr(x_addr), .ext_wdata(x_wdata), .ext_be(x_be),
    .ext_gnt(x_gnt), .ext_rvalid(x_rvalid), .ext_rdata(x_rdata));

  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(20), .MAX_LAT(6)) ext0 (
    .clk, .rst, .m_req(x_req[0]), .m_we(x_we[0]), .m_addr(x_addr[0]), .m_wdata(x_wdata[0]),
    .m_be(x_be[0]), .m_gnt(x_gnt[0]), .m_rvalid(x_rvalid[0]), .m_rdata(x_rdata[0]));
  assign x_gnt[2:1] = '0;
  assign x_rvalid[2:1] = '0;
  assign x_rdata[2:1] = '0;

  logic [7:0] ref_b [NUM_VM][int];
  int conflicts = 0;
  always @(posedge clk) if (!rst && $countones(dut.g_vm[0].req) > 1) conflicts++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [63:0] d);
    @(negedge clk);
    host_valid = 1; host_req = '{we: 1'b1, addr: a, wdata: d};
    @(posedge clk); while (!host_gnt) @(posedge clk);
    @(negedge clk); host_valid = 0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [63:0] d);
    @(negedge clk);
    host_valid = 1; host_req = '{we: 1'b0, addr: a, wdata: '0};
    @(posedge clk); while (!host_gnt) @(posedge clk);
    @(negedge clk); host_valid = 0;
    while (!host_rvalid) @(negedge clk);
    d = host_rdata;
  endtask

  function automatic logic [31:0] vm_base(int v);
    return 32'(NUM_CC + v) << 28;
  endfunction

  task automatic wr_stream(input int p, input int a, input int c);
    int sent = 0, nb;
    logic [63:0] val;
    nb = WW[p] / 8;
    @(negedge clk); wr_start[p] = 1; wr_addr[p] = AW'(a); wr_count[p] = LW'(c);
    @(negedge clk); wr_start[p] = 0;
    val = {$urandom, $urandom};
    wr_valid[p] = 1; wr_data[p] = val;
    while (sent < c) begin
      @(posedge clk);
      if (wr_valid[p] && wr_ready[p]) begin
        for (int b = 0; b < nb; b++) ref_b[WV[p]][a + nb*sent + b] = val[8*b +: 8];
        sent++;
        val = {$urandom, $urandom};
      end
      @(negedge clk);
      wr_valid[p] = ($urandom % 4) != 0; wr_data[p] = val;
    end
    wr_valid[p] = 0;
    while (wr_busy[p]) @(negedge clk);
  endtask

  task automatic rd_stream(input int p, input int a, input int c);
    int got = 0, nb;
    logic [63:0] exp;
    nb = RW[p] / 8;
    @(negedge clk); rd_start[p] = 1; rd_addr[p] = AW'(a); rd_count[p] = LW'(c);
    @(negedge clk); rd_start[p] = 0;
    while (got < c) begin
      rd_ready[p] = ($urandom % 3) != 0;
      @(posedge clk);
      if (rd_valid[p] && rd_ready[p]) begin
        exp = '0;
        for (int b = 0; b < nb; b++) exp[8*b +: 8] = ref_b[RV[p]][a + nb*got + b];
        check(rd_data[p] == exp, $sformatf("read port %0d elem %0d: %h vs %h", p, got, rd_data[p], exp));
        got++;
      end
      @(negedge clk);
    end
    rd_ready[p] = 0;
    @(negedge clk);
    check(!rd_busy[p], $sformatf("read port %0d idle at the end", p));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d, w;
    rd_start = '0; rd_addr = '0; rd_count = '0; rd_ready = '0;
    wr_start = '0; wr_addr = '0; wr_count = '0; wr_valid = '0; wr_data = '0;
    host_valid = 0; host_req = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // host fills words 0..63 of every memory
    for (int v = 0; v < NUM_VM; v++)
      for (int i = 0; i < 64; i++) begin
        w = {$urandom, $urandom};
        bus_write(vm_base(v) | 32'(i), w);
        for (int b = 0; b < 8; b++) ref_b[v][8*i + b] = w[8*b +: 8];
      end
    // three write ports at once
    fork
      wr_stream(0, 32'h42, 50);
      wr_stream(1, 32'h80, 20);
      wr_stream(2, 32'h13, 77);
    join
    // three read ports at once
    fork
      rd_stream(0, 32'h40, 120);
      rd_stream(1, 32'h0, 100);
      rd_stream(2, 32'h0, 40);
    join
    // memory 1 through the host
    for (int i = 0; i < 64; i++) begin
      bus_read(vm_base(1) | 32'(i), d);
      for (int b = 0; b < 8; b++) w[8*b +: 8] = ref_b[1][8*i + b];
      check(d == w, $sformatf("memory 1 word %0d: %h vs %h", i, d, w));
    end
    // two independent communication controllers
    bus_write(32'h0000_0002, 64'h1111);
    bus_write(32'h1000_0002, 64'h2222);
    check(cc_regs[0][2] == 32'h1111 && cc_regs[1][2] == 32'h2222, "controllers are independent");
    bus_read(32'h1000_0002, d);
    check(d[31:0] == 32'h2222, "controller 1 read back");
    check(conflicts > 0, "ports of memory 0 competed at its arbiter");
    $display("memory 0 arbitration conflicts: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
