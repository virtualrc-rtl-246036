// tb_vrc_comm_ctrl: checks the FPGA communication controller. The host
// writes every control register (each write must raise that register's
// one-cycle strobe and appear on app_regs), reads them back, reads the
// application's status registers, fills the block RAM for the application
// to read, and reads back words the application wrote. Read data must
// arrive exactly one cycle after the request.
module tb_vrc_comm_ctrl;
  localparam int CC_W = 32, NUM_REGS = 8, BRAM_DEPTH = 64, LAW = 16;
  localparam int BIW = $clog2(BRAM_DEPTH);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                          h_req, h_we, h_gnt, h_rvalid;
  logic [LAW-1:0]                h_addr;
  logic [CC_W-1:0]               h_wdata, h_rdata;
  logic [NUM_REGS-1:0][CC_W-1:0] app_regs, app_status;
  logic [NUM_REGS-1:0]           app_reg_wr;
  logic                          be_en, be_we;
  logic [BIW-1:0]                b_addr;
  logic [CC_W-1:0]               b_wdata, b_rdata;
  logic [CC_W-1:0]               shadow [BRAM_DEPTH];

  vrc_comm_ctrl #(.CC_W(CC_W), .NUM_REGS(NUM_REGS), .BRAM_DEPTH(BRAM_DEPTH), .LAW(LAW)) dut (
    .clk, .rst, .h_req, .h_we, .h_addr, .h_wdata, .h_gnt, .h_rvalid, .h_rdata,
    .app_regs, .app_reg_wr, .app_status, .app_bram_en(be_en), .app_bram_we(be_we),
    .app_bram_addr(b_addr), .app_bram_wdata(b_wdata), .app_bram_rdata(b_rdata));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hwrite(input logic [LAW-1:0] a, input logic [CC_W-1:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_req = 0;
  endtask

  task automatic hread(input logic [LAW-1:0] a, output logic [CC_W-1:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = a;
    @(negedge clk); h_req = 0;
    check(h_rvalid, "read answered one cycle later");
    d = h_rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CC_W-1:0] d;
    logic [CC_W-1:0] vals [NUM_REGS];
    h_req = 0; h_we = 0; h_addr = 0; h_wdata = 0; be_en = 0; be_we = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < NUM_REGS; i++) app_status[i] = CC_W'(32'hA000_0000 + i * 17);
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(app_regs == '0, "control registers cleared by reset");
    // control registers and strobes
    for (int i = 0; i < NUM_REGS; i++) begin
      vals[i] = $urandom;
      @(negedge clk); h_req = 1; h_we = 1; h_addr = LAW'(i); h_wdata = vals[i];
      @(negedge clk); h_req = 0;
      check(app_reg_wr == NUM_REGS'(1) << i, $sformatf("strobe of register %0d", i));
      check(app_regs[i] == vals[i], $sformatf("app sees register %0d", i));
      @(negedge clk);
      check(app_reg_wr == '0, "strobe lasts one cycle");
    end
    for (int i = 0; i < NUM_REGS; i++) begin
      hread(LAW'(i), d);
      check(d == vals[i], $sformatf("host reads back register %0d", i));
      hread(LAW'(16'h4000 | i), d);
      check(d == app_status[i], $sformatf("host reads status %0d", i));
    end
    // host fills block RAM, application reads it
    for (int i = 0; i < BRAM_DEPTH; i++) begin
      shadow[i] = $urandom;
      hwrite(LAW'(16'h8000 | i), shadow[i]);
    end
    for (int i = 0; i < BRAM_DEPTH; i++) begin
      @(negedge clk); be_en = 1; be_we = 0; b_addr = BIW'(i);
      @(negedge clk); be_en = 0;
      check(b_rdata == shadow[i], $sformatf("app reads bram %0d", i));
    end
    // application writes, host reads
    for (int i = 0; i < BRAM_DEPTH; i += 3) begin
      shadow[i] = $urandom;
      @(negedge clk); be_en = 1; be_we = 1; b_addr = BIW'(i); b_wdata = shadow[i];
      @(negedge clk); be_en = 0; be_we = 0;
    end
    for (int i = 0; i < BRAM_DEPTH; i++) begin
      hread(LAW'(16'h8000 | i), d);
      check(d == shadow[i], $sformatf("host reads bram %0d", i));
    end
    check(h_gnt, "host always granted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
