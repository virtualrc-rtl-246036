// vrc_comm_ctrl: FPGA communication controller of the virtual platform.
// It lets host software reach on-chip resources of the application over
// the platform bus: NUM_REGS control registers that the host writes and
// the application reads (with a one-cycle write strobe per register, e.g.
// to start the application), NUM_REGS status registers that the
// application drives and the host reads, and a block RAM of BRAM_DEPTH
// words shared by host and application (true dual port).
//
// Host word address map (LAW bits): top bit set -> block RAM word;
// otherwise the next bit selects the status bank (1) or the control bank
// (0), and the low bits pick the register. Host requests are always
// accepted (h_gnt = 1); reads answer one cycle later on h_rvalid/h_rdata.
// The application block RAM port also has one cycle of read latency. If
// both sides write the same block RAM word in one cycle the application's
// value is kept.
// The controller's purpose and its configurable data width follow the
// document; the register map and timing are this design's own.
module vrc_comm_ctrl #(
  parameter int CC_W       = 32,
  parameter int NUM_REGS   = 8,
  parameter int BRAM_DEPTH = 256,
  parameter int LAW        = 16
) (
  input  logic                               clk,
  input  logic                               rst,
  // host side
  input  logic                               h_req,
  input  logic                               h_we,
  input  logic [LAW-1:0]                     h_addr,
  input  logic [CC_W-1:0]                    h_wdata,
  output logic                               h_gnt,
  output logic                               h_rvalid,
  output logic [CC_W-1:0]                    h_rdata,
  // application side
  output logic [NUM_REGS-1:0][CC_W-1:0]      app_regs,
  output logic [NUM_REGS-1:0]                app_reg_wr,
  input  logic [NUM_REGS-1:0][CC_W-1:0]      app_status,
  input  logic                               app_bram_en,
  input  logic                               app_bram_we,
  input  logic [$clog2(BRAM_DEPTH)-1:0]      app_bram_addr,
  input  logic [CC_W-1:0]                    app_bram_wdata,
  output logic [CC_W-1:0]                    app_bram_rdata
);
  localparam int RIW = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;
  localparam int BIW = $clog2(BRAM_DEPTH);

  logic [CC_W-1:0] bram [BRAM_DEPTH];
  logic            is_bram, is_status;
  logic [RIW-1:0]  ridx;
  logic [BIW-1:0]  bidx;
  logic            h_rd_bram;
  logic [CC_W-1:0] h_reg_q, h_bram_q;

  assign h_gnt     = 1'b1;
  assign is_bram   = h_addr[LAW-1];
  assign is_status = h_addr[LAW-2];
  assign ridx      = h_addr[RIW-1:0];
  assign bidx      = h_addr[BIW-1:0];

  // control and status registers
  always_ff @(posedge clk) begin
    if (rst) begin
      app_regs   <= '0;
      app_reg_wr <= '0;
      h_rvalid   <= 1'b0;
      h_rd_bram  <= 1'b0;
      h_reg_q    <= '0;
    end else begin
      app_reg_wr <= '0;
      h_rvalid   <= h_req && !h_we;
      h_rd_bram  <= is_bram;
      if (h_req && h_we && !is_bram && !is_status && int'(ridx) < NUM_REGS) begin
        app_regs[ridx]   <= h_wdata;
        app_reg_wr[ridx] <= 1'b1;
      end
      if (h_req && !h_we && !is_bram)
        h_reg_q <= (int'(ridx) >= NUM_REGS) ? '0 :
                   is_status ? app_status[ridx] : app_regs[ridx];
    end
  end

  // shared block RAM, one port per side
  always_ff @(posedge clk) begin
    if (h_req && h_we && is_bram)       bram[bidx] <= h_wdata;
    if (app_bram_en && app_bram_we)     bram[app_bram_addr] <= app_bram_wdata;
    if (h_req && !h_we && is_bram)      h_bram_q <= bram[bidx];
    if (app_bram_en && !app_bram_we)    app_bram_rdata <= bram[app_bram_addr];
  end

  assign h_rdata = h_rd_bram ? h_bram_q : h_reg_q;
endmodule
