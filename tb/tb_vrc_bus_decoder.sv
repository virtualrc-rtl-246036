// tb_vrc_bus_decoder: checks the platform-bus decoder with three dummy
// targets that grant at random and answer reads after a target-specific
// delay with data made of the target number and the local address. Every
// write must reach only the addressed target with the right local address
// and data; every read must return that target's answer, and no second
// request may be accepted while a read is outstanding. Reads of an
// unmapped target must return zero.
module tb_vrc_bus_decoder;
  import vrc_pkg::*;
  localparam int NUM_T = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                          host_valid, host_gnt, host_rvalid;
  host_req_t                     host_req;
  logic [HOST_DW-1:0]            host_rdata;
  logic [NUM_T-1:0]              t_req, t_gnt, t_rvalid;
  logic                          t_we;
  logic [SEL_LSB-1:0]            t_addr;
  logic [HOST_DW-1:0]            t_wdata;
  logic [NUM_T-1:0][HOST_DW-1:0] t_rdata;
  int                            wr_seen [NUM_T];
  logic [SEL_LSB-1:0]            last_addr [NUM_T];
  logic [HOST_DW-1:0]            last_data [NUM_T];

  vrc_bus_decoder #(.NUM_T(NUM_T)) dut (.*);

  // dummy targets
  for (genvar t = 0; t < NUM_T; t++) begin : g_t
    int cnt;
    logic pend;
    logic [SEL_LSB-1:0] ra;
    always_ff @(negedge clk) t_gnt[t] <= ($urandom % 3) != 0;
    always_ff @(posedge clk) begin
      t_rvalid[t] <= 1'b0;
      if (rst) begin pend <= 0; cnt <= 0; end
      else begin
        if (t_req[t] && t_gnt[t]) begin
          if (t_we) begin
            wr_seen[t]   <= wr_seen[t] + 1;
            last_addr[t] <= t_addr;
            last_data[t] <= t_wdata;
          end else begin
            pend <= 1; cnt <= t + 1; ra <= t_addr;
          end
        end else if (pend) begin
          if (cnt == 0) begin
            pend <= 0;
            t_rvalid[t] <= 1'b1;
            t_rdata[t]  <= {8'(t), 28'(ra), 28'hABCDEF0};
          end else cnt <= cnt - 1;
        end
      end
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input int t, input logic [27:0] a, input logic [63:0] d);
    int prev [NUM_T];
    foreach (prev[k]) prev[k] = wr_seen[k];
    @(negedge clk);
    host_valid = 1; host_req = '{we: 1'b1, addr: {4'(t), a}, wdata: d};
    @(posedge clk);
    while (!host_gnt) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
    for (int k = 0; k < NUM_T; k++)
      check(wr_seen[k] == prev[k] + (k == t ? 1 : 0), $sformatf("write to %0d counted at %0d", t, k));
    if (t < NUM_T) check(last_addr[t] == a && last_data[t] == d, "write address and data");
  endtask

  task automatic bus_read(input int t, input logic [27:0] a);
    logic [63:0] exp;
    exp = (t < NUM_T) ? {8'(t), a, 28'hABCDEF0} : '0;
    @(negedge clk);
    host_valid = 1; host_req = '{we: 1'b0, addr: {4'(t), a}, wdata: '0};
    @(posedge clk);
    while (!host_gnt) @(posedge clk);
    @(negedge clk);
    // keep requesting a write to target 0 meanwhile: it must not be accepted
    host_req = '{we: 1'b1, addr: {4'd0, 28'h1}, wdata: 64'h1};
    while (!host_rvalid) begin
      check(!host_gnt, "no request accepted while a read is outstanding");
      @(negedge clk);
    end
    check(host_rdata == exp, $sformatf("read from target %0d: %h vs %h", t, host_rdata, exp));
    host_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wr_seen[k]) wr_seen[k] = 0;
    host_valid = 0; host_req = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      int t;
      t = $urandom % (NUM_T + 1);
      if ($urandom % 2) bus_write(t, 28'($urandom), {$urandom, $urandom});
      else bus_read(t, 28'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
