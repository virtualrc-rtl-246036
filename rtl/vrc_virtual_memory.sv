// vrc_virtual_memory: the shared-access core of one virtual memory.
// Any number of ports can be attached to a virtual memory. Each is a
// requester here: the read and write interfaces (vrc_vmem_rd_port,
// vrc_vmem_wr_port) of the application, and the host's single-word port.
// A round-robin arbiter (vrc_rr_arbiter) grants one of them per cycle to
// the single native NW-bit memory port, which leads to on-chip block RAM
// or to the board's external memory.
//
// Requester r presents req/we/addr/wdata/be and sees gnt[r] in the cycle
// its request is taken (granted and accepted by the memory). A requester
// that is not in use keeps req low. Every granted read pushes r into a
// tag FIFO. Since the memory answers reads in order, each returning word
// is announced on rvalid[r] of the requester at the head of that FIFO,
// with the data on the shared rdata. Reads are held back while the tag
// FIFO is full; writes are posted and need no tag.
// Memory port: m_req/m_we/m_addr/m_wdata/m_be, taken when m_gnt is high;
// read data on m_rvalid/m_rdata, in order, any latency.
// Round-robin sharing among a memory's ports follows the document; the
// request protocol and the tag FIFO are this design's own.
module vrc_virtual_memory #(
  parameter int NUM_REQ   = 3,
  parameter int NW        = 64,
  parameter int MAW       = 26,
  parameter int TAG_DEPTH = 32
) (
  input  logic                            clk,
  input  logic                            rst,
  // requesters
  input  logic [NUM_REQ-1:0]              req,
  input  logic [NUM_REQ-1:0]              we,
  input  logic [NUM_REQ-1:0][MAW-1:0]     addr,
  input  logic [NUM_REQ-1:0][NW-1:0]      wdata,
  input  logic [NUM_REQ-1:0][NW/8-1:0]    be,
  output logic [NUM_REQ-1:0]              gnt,
  output logic [NUM_REQ-1:0]              rvalid,
  output logic [NW-1:0]                   rdata,
  // physical (or on-chip) memory port
  output logic                            m_req,
  output logic                            m_we,
  output logic [MAW-1:0]                  m_addr,
  output logic [NW-1:0]                   m_wdata,
  output logic [NW/8-1:0]                 m_be,
  input  logic                            m_gnt,
  input  logic                            m_rvalid,
  input  logic [NW-1:0]                   m_rdata
);
  localparam int N  = NUM_REQ;
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  masked, arb_gnt;
  logic [IW-1:0] gnt_idx, tag_head;
  logic          accept, tag_empty, tag_full;
  logic [$clog2(TAG_DEPTH):0] tag_count;

  // a read may only be granted while its return tag can be recorded
  assign masked = req & (we | {N{!tag_full}});

  vrc_rr_arbiter #(.N(N)) u_arb (
    .clk, .rst, .req(masked), .accept(accept), .gnt(arb_gnt), .gnt_idx(gnt_idx));

  assign m_req   = |masked;
  assign m_we    = we[gnt_idx];
  assign m_addr  = addr[gnt_idx];
  assign m_wdata = wdata[gnt_idx];
  assign m_be    = be[gnt_idx];
  assign accept  = m_req && m_gnt;
  assign gnt     = arb_gnt & {N{m_gnt}};

  // in-order read return routing
  vrc_sync_fifo #(.W(IW), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst, .push(accept && !m_we), .din(gnt_idx), .pop(m_rvalid),
    .dout(tag_head), .empty(tag_empty), .full(tag_full), .count(tag_count));

  always_comb begin
    rvalid = '0;
    if (m_rvalid) rvalid[tag_head] = 1'b1;
  end
  assign rdata = m_rdata;

  a_resp_expected: assert property (@(posedge clk) disable iff (rst) m_rvalid |-> !tag_empty);
  a_gnt_onehot:    assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
endmodule
