// vrc_bus_decoder: platform-bus address decoder of the virtual platform.
// The host issues word requests (vrc_pkg::host_req_t) with host_valid; bits
// [31:28] of the address select one of NUM_T targets and the remaining
// bits go to that target as its local word address. The request is passed
// to the selected target and host_gnt follows that target's grant. After a
// read is granted the decoder takes no new request until the read data has
// come back, then returns it on host_rvalid/host_rdata, so there is at
// most one read outstanding. A request to an unmapped target is accepted
// at once; a read from one returns zero.
// Routing the platform bus to the communication controllers and the
// virtual memories follows the document's architecture figure; the address
// map and the single-outstanding-read rule are this design's own.
module vrc_bus_decoder
  import vrc_pkg::*;
#(
  parameter int NUM_T = 3
) (
  input  logic                           clk,
  input  logic                           rst,
  // host side
  input  logic                           host_valid,
  input  host_req_t                      host_req,
  output logic                           host_gnt,
  output logic                           host_rvalid,
  output logic [HOST_DW-1:0]             host_rdata,
  // target side
  output logic [NUM_T-1:0]               t_req,
  output logic                           t_we,
  output logic [SEL_LSB-1:0]             t_addr,
  output logic [HOST_DW-1:0]             t_wdata,
  input  logic [NUM_T-1:0]               t_gnt,
  input  logic [NUM_T-1:0]               t_rvalid,
  input  logic [NUM_T-1:0][HOST_DW-1:0]  t_rdata
);
  localparam int TW = SEL_W;
  logic [TW-1:0] sel, rd_tgt;
  logic          mapped, rd_pending, rd_unmapped, accept;

  assign sel     = host_req.addr[HOST_AW-1:SEL_LSB];
  assign mapped  = int'(sel) < NUM_T;
  assign t_we    = host_req.we;
  assign t_addr  = host_req.addr[SEL_LSB-1:0];
  assign t_wdata = host_req.wdata;

  always_comb begin
    t_req    = '0;
    host_gnt = !rd_pending && !mapped;
    for (int t = 0; t < NUM_T; t++) begin
      if (sel == TW'(t)) begin
        t_req[t] = host_valid && !rd_pending;
        host_gnt = !rd_pending && t_gnt[t];
      end
    end
  end
  assign accept = host_valid && host_gnt;

  always_comb begin
    host_rvalid = 1'b0;
    host_rdata  = '0;
    if (rd_pending) begin
      if (rd_unmapped) host_rvalid = 1'b1;
      else begin
        for (int t = 0; t < NUM_T; t++) begin
          if (rd_tgt == TW'(t) && t_rvalid[t]) begin
            host_rvalid = 1'b1;
            host_rdata  = t_rdata[t];
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pending  <= 1'b0;
      rd_unmapped <= 1'b0;
      rd_tgt      <= '0;
    end else if (accept && !host_req.we) begin
      rd_pending  <= 1'b1;
      rd_unmapped <= !mapped;
      rd_tgt      <= sel;
    end else if (host_rvalid) begin
      rd_pending  <= 1'b0;
    end
  end

  a_one_read: assert property (@(posedge clk) disable iff (rst) rd_pending |-> !accept);
endmodule
