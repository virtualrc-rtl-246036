// tb_vrc_virtual_platform: end-to-end test of the virtual platform at its
// default configuration (virtual memory 0 external with a 32-bit read port,
// virtual memory 1 on-chip with a 16-bit write port, one communication
// controller). A small application written against the platform's ports
// lives in this testbench: when the host writes control register 0 it
// reads the job from registers 1..3 (source byte address, element count,
// destination byte address) and an addend K from block RAM word 0, streams
// 32-bit elements x from virtual memory 0, writes y = x[31:16] + x[15:0] + K
// as 16-bit elements to virtual memory 1, and reports the count and a
// checksum in status registers 0 and 1.
// The host, through the platform bus only, loads the input into external
// memory, programs the job, polls the status while also reading memory 0
// (so host and application compete at the arbiter), and reads the results
// back from memory 1, comparing them with values it computes itself.
// Jobs cover an aligned run and runs starting mid-word with odd counts.
// Every mechanism of the platform must occur at least once: arbitration
// conflict, external-memory stall, read-stream back-pressure, read-credit
// exhaustion, partial-word write, register strobe, block-RAM access, and
// both memory mappings. Write-port back-pressure is only reported: with the
// on-chip memory accepting a word every cycle the write buffer cannot fill.
module tb_vrc_virtual_platform;
  import vrc_pkg::*;
  localparam int NW = 64, MAW = 26, AW = 32, LW = 32, CC_W = 32, NUM_REGS = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                                 host_valid, host_gnt, host_rvalid;
  host_req_t                            host_req;
  logic [HOST_DW-1:0]                   host_rdata;
  logic                                 vm0_rd_start, vm0_rd_busy, vm0_rd_valid, vm0_rd_ready;
  logic [AW-1:0]                        vm0_rd_addr, vm1_wr_addr;
  logic [LW-1:0]                        vm0_rd_count, vm1_wr_count;
  logic [31:0]                          vm0_rd_data;
  logic                                 vm1_wr_start, vm1_wr_busy, vm1_wr_valid, vm1_wr_ready;
  logic [15:0]                          vm1_wr_data;
  logic [0:0][NUM_REGS-1:0][CC_W-1:0]   cc_regs, cc_status;
  logic [0:0][NUM_REGS-1:0]             cc_reg_wr;
  logic [0:0]                           cc_bram_en, cc_bram_we;
  logic [0:0][7:0]                      cc_bram_addr;
  logic [0:0][CC_W-1:0]                 cc_bram_wdata, cc_bram_rdata;
  logic                                 ext0_req, ext0_we, ext0_gnt, ext0_rvalid;
  logic [MAW-1:0]                       ext0_addr, ext1_addr;
  logic [NW-1:0]                        ext0_wdata, ext0_rdata, ext1_wdata;
  logic [7:0]                           ext0_be, ext1_be;
  logic                                 ext1_req, ext1_we;

  logic [1:0]                           x_req, x_we, x_gnt, x_rvalid;
  logic [1:0][MAW-1:0]                  x_addr;
  logic [1:0][NW-1:0]                   x_wdata, x_rdata;
  logic [1:0][7:0]                      x_be;

  vrc_virtual_platform dut (
    .clk, .rst, .host_valid, .host_req, .host_gnt, .host_rvalid, .host_rdata,
    .rd_start(vm0_rd_start), .rd_addr(vm0_rd_addr), .rd_count(vm0_rd_count),
    .rd_busy(vm0_rd_busy), .rd_valid(vm0_rd_valid), .rd_data(vm0_rd_data),
    .rd_ready(vm0_rd_ready),
    .wr_start(vm1_wr_start), .wr_addr(vm1_wr_addr), .wr_count(vm1_wr_count),
    .wr_busy(vm1_wr_busy), .wr_valid(vm1_wr_valid), .wr_data(vm1_wr_data),
    .wr_ready(vm1_wr_ready),
    .cc_regs, .cc_reg_wr, .cc_status, .cc_bram_en, .cc_bram_we, .cc_bram_addr, .cc_bram_wdata,
    .cc_bram_rdata,
    .ext_req(x_req), .ext_we(x_we), .ext_addr(x_addr), .ext_wdata(x_wdata), .ext_be(x_be),
    .ext_gnt(x_gnt), .ext_rvalid(x_rvalid), .ext_rdata(x_rdata));

  // memory 0 is mapped externally, memory 1 on-chip (its ext port stays idle)
  assign {ext0_req, ext0_we, ext0_addr, ext0_wdata, ext0_be} = {x_req[0], x_we[0], x_addr[0], x_wdata[0], x_be[0]};
  assign {ext1_req, ext1_we, ext1_addr, ext1_wdata, ext1_be} = {x_req[1], x_we[1], x_addr[1], x_wdata[1], x_be[1]};
  assign x_gnt    = {1'b0, ext0_gnt};
  assign x_rvalid = {1'b0, ext0_rvalid};
  assign x_rdata  = {64'h0, ext0_rdata};

  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(20), .MAX_LAT(8)) ext0 (
    .clk, .rst, .m_req(ext0_req), .m_we(ext0_we), .m_addr(ext0_addr), .m_wdata(ext0_wdata),
    .m_be(ext0_be), .m_gnt(ext0_gnt), .m_rvalid(ext0_rvalid), .m_rdata(ext0_rdata));

  // ------------------------------------------------------------------
  // mechanism counters
  int n_conflict, n_ext_stall, n_rd_backpressure, n_credit_full, n_wr_backpressure;
  int n_partial_write, n_strobe, n_bram_app, n_onchip_write, n_ext_read;
  always @(posedge clk) if (!rst) begin
    if ($countones(dut.g_vm[0].req) > 1 || $countones(dut.g_vm[1].req) > 1) n_conflict++;
    if (ext0_req && !ext0_gnt) n_ext_stall++;
    if (vm0_rd_valid && !vm0_rd_ready) n_rd_backpressure++;
    if (dut.g_rdp[0].u_rd.issue_left != '0 && !dut.g_rdp[0].u_rd.m_req) n_credit_full++;
    if (vm1_wr_valid && !vm1_wr_ready) n_wr_backpressure++;
    if (dut.g_vm[1].m_req && dut.g_vm[1].m_we && dut.g_vm[1].m_be != '1) n_partial_write++;
    if (dut.g_vm[1].m_req && dut.g_vm[1].m_we) n_onchip_write++;
    if (ext0_req && ext0_gnt && !ext0_we) n_ext_read++;
    if (cc_reg_wr[0] != '0) n_strobe++;
    if (cc_bram_en[0]) n_bram_app++;
  end

  // ------------------------------------------------------------------
  // application written against the virtual platform
  logic [15:0] fifo_q [$];
  int          app_in, app_out, app_total;
  logic [31:0] app_sum;
  logic [15:0] app_k;
  logic        app_run;

  initial begin
    vm0_rd_start = 0; vm0_rd_addr = 0; vm0_rd_count = 0; vm0_rd_ready = 0;
    vm1_wr_start = 0; vm1_wr_addr = 0; vm1_wr_count = 0; vm1_wr_valid = 0; vm1_wr_data = 0;
    cc_status = '0; cc_bram_en = 0; cc_bram_we = 0; cc_bram_addr = 0; cc_bram_wdata = 0;
    app_run = 0;
    forever begin
      @(posedge clk);
      if (!rst && cc_reg_wr[0][0]) begin
        @(negedge clk);
        cc_status[0][0] = '0; cc_status[0][1] = '0;
        // fetch the addend from block RAM word 0
        cc_bram_en = 1; cc_bram_we = 0; cc_bram_addr = 0;
        @(negedge clk);
        cc_bram_en = 0;
        app_k = cc_bram_rdata[0][15:0];
        app_total = int'(cc_regs[0][2]);
        vm0_rd_start = 1; vm0_rd_addr = cc_regs[0][1]; vm0_rd_count = cc_regs[0][2];
        vm1_wr_start = 1; vm1_wr_addr = cc_regs[0][3]; vm1_wr_count = cc_regs[0][2];
        @(negedge clk);
        vm0_rd_start = 0; vm1_wr_start = 0;
        app_in = 0; app_out = 0; app_sum = 0; fifo_q.delete();
        while (app_out < app_total) begin
          vm0_rd_ready = ($urandom % 2) && fifo_q.size() < 4;
          vm1_wr_valid = fifo_q.size() > 0 && ($urandom % 4 != 0);
          vm1_wr_data  = fifo_q.size() > 0 ? fifo_q[0] : 16'h0;
          @(posedge clk);
          if (vm0_rd_valid && vm0_rd_ready) begin
            fifo_q.push_back(vm0_rd_data[31:16] + vm0_rd_data[15:0] + app_k);
            app_in++;
          end
          if (vm1_wr_valid && vm1_wr_ready) begin
            app_sum += 32'(fifo_q.pop_front());
            app_out++;
          end
          @(negedge clk);
        end
        vm0_rd_ready = 0; vm1_wr_valid = 0;
        while (vm1_wr_busy) @(negedge clk);
        cc_status[0][1] = app_sum;
        cc_status[0][0] = 32'(app_out);
      end
    end
  end

  // ------------------------------------------------------------------
  // host side, platform bus only
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

  localparam logic [31:0] CC0 = 32'h0000_0000, VM0 = 32'h1000_0000, VM1 = 32'h2000_0000;

  task automatic run_job(input int src_word, input int src_lane, input int n,
                         input int dst_byte, input logic [15:0] k);
    logic [31:0] x [];
    logic [15:0] y [];
    logic [63:0] d;
    int nwords, cyc;
    logic [31:0] sum = 0;
    logic [7:0]  before_bytes [];
    nwords = (src_lane + n + 1) / 2;
    x = new[nwords * 2];
    for (int i = 0; i < nwords * 2; i++) x[i] = $urandom;
    for (int w = 0; w < nwords; w++) bus_write(VM0 | 32'(src_word + w), {x[2*w+1], x[2*w]});
    y = new[n];
    for (int i = 0; i < n; i++) begin
      y[i] = x[src_lane + i][31:16] + x[src_lane + i][15:0] + k;
      sum += 32'(y[i]);
    end
    // remember the destination words' previous contents
    before_bytes = new[((dst_byte + 2*n + 7) / 8 - dst_byte / 8 + 1) * 8];
    for (int w = 0; w < before_bytes.size() / 8; w++) begin
      bus_read(VM1 | 32'(dst_byte / 8 + w), d);
      for (int b = 0; b < 8; b++) before_bytes[8*w + b] = d[8*b +: 8];
    end
    bus_write(CC0 | 32'h8000, 64'(k));
    bus_write(CC0 | 32'h1, 64'(src_word * 8 + src_lane * 4));
    bus_write(CC0 | 32'h2, 64'(n));
    bus_write(CC0 | 32'h3, 64'(dst_byte));
    bus_write(CC0 | 32'h0, 64'h1);
    // poll the status while also reading memory 0 (arbitration with the app)
    cyc = 0;
    do begin
      bus_read(VM0 | 32'(src_word + (cyc % nwords)), d);
      check(d == {x[2*(cyc % nwords)+1], x[2*(cyc % nwords)]}, "host read of memory 0 during the job");
      bus_read(CC0 | 32'h4000, d);
      cyc++;
    end while (d[31:0] != 32'(n) && cyc < 5000);
    check(d[31:0] == 32'(n), $sformatf("job of %0d elements reported done", n));
    bus_read(CC0 | 32'h4001, d);
    check(d[31:0] == sum, "checksum in status register 1");
    // read the results back
    for (int w = 0; w < before_bytes.size() / 8; w++) begin
      logic [63:0] exp;
      bus_read(VM1 | 32'(dst_byte / 8 + w), d);
      for (int b = 0; b < 8; b++) begin
        int ba, e;
        ba = (dst_byte / 8 + w) * 8 + b;
        e  = (ba - dst_byte) / 2;
        if (ba >= dst_byte && e < n) exp[8*b +: 8] = (ba % 2) ? y[e][15:8] : y[e][7:0];
        else exp[8*b +: 8] = before_bytes[8*w + b];
      end
      check(d == exp, $sformatf("result word %0d: %h vs %h", w, d, exp));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    {n_conflict, n_ext_stall, n_rd_backpressure, n_credit_full, n_wr_backpressure} = '0;
    {n_partial_write, n_strobe, n_bram_app, n_onchip_write, n_ext_read} = '0;
    host_valid = 0; host_req = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // the on-chip memory is not cleared by reset: give it known contents
    for (int w = 0; w < 128; w++) bus_write(VM1 | 32'(w), {2{32'(w) * 32'h01010101}});
    run_job(16, 0, 200, 0, 16'h0003);
    run_job(300, 1, 37, 32'h206, 16'h1111);
    run_job(40, 1, 1, 32'h302, 16'h0000);
    // unmapped target answers zero
    bus_read(32'h7000_0000, d);
    check(d == '0, "unmapped read returns zero");
    check(ext1_req == 1'b0, "external port of the on-chip-mapped memory stays idle");
    $display("conflict=%0d ext_stall=%0d rd_bp=%0d credit_full=%0d wr_bp=%0d partial=%0d strobe=%0d bram=%0d onchip_wr=%0d ext_rd=%0d",
             n_conflict, n_ext_stall, n_rd_backpressure, n_credit_full, n_wr_backpressure,
             n_partial_write, n_strobe, n_bram_app, n_onchip_write, n_ext_read);
    check(n_conflict > 0, "arbitration conflict happened");
    check(n_ext_stall > 0, "external memory stall happened");
    check(n_rd_backpressure > 0, "read stream back-pressure happened");
    check(n_credit_full > 0, "read credit exhaustion happened");
    check(n_partial_write > 0, "partial-word write happened");
    check(n_strobe > 0, "register strobe happened");
    check(n_bram_app > 0, "application block RAM access happened");
    check(n_onchip_write > 0, "on-chip mapped memory written");
    check(n_ext_read > 0, "external mapped memory read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
