// tb_vrc_onchip_mem: checks the on-chip block RAM target. Random reads
// and byte-enabled writes are issued every cycle; each read must come back
// exactly one cycle later with the value of a reference array, and the
// grant must always be high.
module tb_vrc_onchip_mem;
  localparam int NW = 64, DEPTH = 64, MAW = 26;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic            req, we, gnt, rvalid;
  logic [MAW-1:0]  addr;
  logic [NW-1:0]   wdata, rdata;
  logic [NW/8-1:0] be;
  logic [NW-1:0]   refm [DEPTH];
  logic [NW-1:0]   exp_q;
  logic            exp_v;

  vrc_onchip_mem #(.NW(NW), .DEPTH(DEPTH), .MAW(MAW)) dut (
    .clk, .rst, .m_req(req), .m_we(we), .m_addr(addr), .m_wdata(wdata), .m_be(be),
    .m_gnt(gnt), .m_rvalid(rvalid), .m_rdata(rdata));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; be = 0; exp_v = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = MAW'(i); be = '1; wdata = {$urandom, $urandom};
      refm[i] = wdata;
    end
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      checks++;
      if (rvalid !== exp_v || (exp_v && rdata !== exp_q)) begin
        failures++;
        $display("cycle %0d: rvalid %b data %h, expected %b %h", i, rvalid, rdata, exp_v, exp_q);
      end
      checks++;
      if (!gnt) failures++;
      req = ($urandom % 4) != 0; we = $urandom % 2; addr = MAW'($urandom % DEPTH);
      be = 8'($urandom); wdata = {$urandom, $urandom};
      exp_v = req && !we;
      if (req && !we) exp_q = refm[addr];
      if (req && we) for (int b = 0; b < 8; b++) if (be[b]) refm[addr][b*8 +: 8] = wdata[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
