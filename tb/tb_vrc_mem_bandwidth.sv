// tb_vrc_mem_bandwidth: FPGA-to-external-memory bandwidth workload. The
// platform is configured with a single external virtual memory and one read
// and one write port as wide as the memory itself (64 bits), the set-up used to measure the cost
// of memory virtualisation. For transfer sizes of 16 B, 1 KB, 16 KB,
// 256 KB and 1 MB the testbench writes a pattern through the write port,
// reads it back through the read port, checks every word, and counts the
// cycles from start to the last word. Against an ideal memory (no stalls,
// one cycle of latency) a transfer of W words may take at most W + 8
// cycles, so the fixed cost of the port logic vanishes for large sizes.
// The measured overhead over W cycles is printed for each size.
module tb_vrc_mem_bandwidth;
  localparam int NW = 64, AW = 32, MAW = 26, LW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [0:0]          rd_start, rd_busy, rd_valid, rd_ready;
  logic [0:0][AW-1:0]  rd_addr, wr_addr;
  logic [0:0][LW-1:0]  rd_count, wr_count;
  logic [0:0][NW-1:0]  rd_data, wr_data;
  logic [0:0]          wr_start, wr_busy, wr_valid, wr_ready;
  logic                host_gnt, host_rvalid;
  logic [63:0]         host_rdata;
  logic [0:0][7:0][31:0] cc_regs;
  logic [0:0][7:0]     cc_reg_wr;
  logic [0:0][31:0]    cc_bram_rdata;
  logic [0:0]          m_req, m_we, m_gnt, m_rvalid;
  logic [0:0][MAW-1:0] m_addr;
  logic [0:0][NW-1:0]  m_wdata, m_rdata;
  logic [0:0][NW/8-1:0] m_be;

  // the platform configured with one externally mapped virtual memory and
  // one read and one write port of the native width
  vrc_virtual_platform #(
    .NUM_VM(1), .VM_ONCHIP(1'b0), .VM_DEPTH(32'd1024),
    .NUM_RDP(1), .RDP_VM(32'd0), .RDP_W(32'd64), .RD_DW(64),
    .NUM_WRP(1), .WRP_VM(32'd0), .WRP_W(32'd64), .WR_DW(64)) dut (
    .clk, .rst, .host_valid(1'b0), .host_req('0), .host_gnt, .host_rvalid, .host_rdata,
    .rd_start, .rd_addr, .rd_count, .rd_busy, .rd_valid, .rd_data, .rd_ready,
    .wr_start, .wr_addr, .wr_count, .wr_busy, .wr_valid, .wr_data, .wr_ready,
    .cc_regs, .cc_reg_wr, .cc_status('0), .cc_bram_en('0), .cc_bram_we('0), .cc_bram_addr('0),
    .cc_bram_wdata('0), .cc_bram_rdata,
    .ext_req(m_req), .ext_we(m_we), .ext_addr(m_addr), .ext_wdata(m_wdata), .ext_be(m_be),
    .ext_gnt(m_gnt), .ext_rvalid(m_rvalid), .ext_rdata(m_rdata));
  vrc_ext_mem_model #(.NW(NW), .MAW(MAW), .STALL_PCT(0), .MAX_LAT(1)) mem (
    .clk, .rst, .m_req(m_req[0]), .m_we(m_we[0]), .m_addr(m_addr[0]), .m_wdata(m_wdata[0]),
    .m_be(m_be[0]), .m_gnt(m_gnt[0]), .m_rvalid(m_rvalid[0]), .m_rdata(m_rdata[0]));

  function automatic logic [NW-1:0] pat(int i, int sz);
    return {32'(i) ^ 32'hC0DE0000, 32'(sz) + 32'(i) * 32'd2654435761};
  endfunction

  task automatic transfer(input int bytes);
    int words, cyc, got;
    words = bytes / 8;
    // write
    @(negedge clk);
    wr_start = 1; wr_addr = '0; wr_count = LW'(words);
    @(negedge clk);
    wr_start = 0; wr_valid = 1; cyc = 0; got = 0;
    while (got < words) begin
      wr_data = pat(got, bytes);
      @(posedge clk);
      cyc++;
      if (wr_ready) got++;
      @(negedge clk);
    end
    wr_valid = 0;
    while (wr_busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > words + 8) begin failures++; $display("write %0d B took %0d cycles", bytes, cyc); end
    $display("write %7d B: %7d words in %7d cycles, overhead %0d.%02d%%", bytes, words, cyc,
             (cyc - words) * 100 / words, ((cyc - words) * 10000 / words) % 100);
    // read
    @(negedge clk);
    rd_start = 1; rd_addr = '0; rd_count = LW'(words); rd_ready = 1;
    @(negedge clk);
    rd_start = 0; cyc = 0; got = 0;
    while (got < words) begin
      @(posedge clk);
      cyc++;
      if (rd_valid) begin
        checks++;
        if (rd_data != pat(got, bytes)) begin
          failures++; $display("%0d B: word %0d wrong", bytes, got);
        end
        got++;
      end
      @(negedge clk);
    end
    checks++;
    if (cyc > words + 8) begin failures++; $display("read %0d B took %0d cycles", bytes, cyc); end
    $display("read  %7d B: %7d words in %7d cycles, overhead %0d.%02d%%", bytes, words, cyc,
             (cyc - words) * 100 / words, ((cyc - words) * 10000 / words) % 100);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_start = 0; rd_addr = 0; rd_count = 0; rd_ready = 0;
    wr_start = 0; wr_addr = 0; wr_count = 0; wr_valid = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    transfer(16);
    transfer(1024);
    transfer(16 * 1024);
    transfer(256 * 1024);
    transfer(1024 * 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
