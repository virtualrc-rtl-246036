// vrc_virtual_platform: the virtual FPGA, i.e. the top-level entity an
// application is written against. It hides the physical board behind a
// configurable set of resources:
//   * NUM_CC FPGA communication controllers (vrc_comm_ctrl) giving host
//     software access to application registers and a shared block RAM;
//   * NUM_VM virtual memories. Each is a vrc_virtual_memory that shares
//     one native NW-bit memory port round-robin among its ports, and is
//     mapped either to on-chip block RAM (VM_ONCHIP[v] = 1, VM_DEPTH[v]
//     words, vrc_onchip_mem inside) or to the board's external memory,
//     whose port is then brought out as ext_*[v];
//   * NUM_RDP application read ports and NUM_WRP write ports. Port p is
//     attached to virtual memory RDP_VM[p] / WRP_VM[p] and has its own
//     element width RDP_W[p] / WRP_W[p] (a divisor of NW). Its data appears
//     in the low bits of the RD_DW / WR_DW-bit port arrays;
//   * a platform-bus decoder (vrc_bus_decoder) that lets the host reach
//     the controllers and, word by word, each virtual memory.
// The per-memory and per-port lists are packed vectors of 32-bit entries,
// entry 0 in the lowest bits: VM_ONCHIP = 2'b10 maps memory 1 on-chip.
// The defaults are the example configuration: memory 0 with one 32-bit
// read port (e.g. streaming floating-point inputs), mapped externally, and
// memory 1 with one 16-bit write port (e.g. fixed-point results), mapped to
// 8 KB of on-chip memory. The document's example puts both memories in
// external memory; mapping memory 1 on-chip is this design's choice, so
// that the default build holds both kinds of mapping.
//
// Every virtual memory arbitrates among all NUM_RDP + NUM_WRP ports plus
// the host; ports attached to other memories never request there, and
// synthesis removes those inputs. The host is the last requester.
// Host address map (word addresses, bits [31:28] select the target):
// 0..NUM_CC-1 communication controllers, NUM_CC+v virtual memory v. The
// host bus carries 64-bit data; NW must not exceed it. Controllers see the
// low CC_W bits. The ext ports of an on-chip-mapped memory are driven low
// and their inputs ignored.
// Application ports are valid/ready streams with a start/address/count
// command per transfer (see vrc_vmem_rd_port / vrc_vmem_wr_port).
// The resource set, the configuration options (number of memories, their
// size and mapping, number, direction and width of ports, number and width
// of controllers), the example widths and round-robin sharing follow the
// document; the protocols, address map and remaining sizes are this
// design's own.
module vrc_virtual_platform
  import vrc_pkg::*;
#(
  parameter int NW                = 64,
  parameter int AW                = 32,
  parameter int MAW               = 26,
  parameter int LW                = 32,
  parameter int FIFO_DEPTH        = 8,
  parameter int TAG_DEPTH         = 32,
  parameter int NUM_CC            = 1,
  parameter int CC_W              = 32,
  parameter int NUM_REGS          = 8,
  parameter int BRAM_DEPTH        = 256,
  parameter int NUM_VM            = 2,
  parameter bit [NUM_VM-1:0]        VM_ONCHIP = 2'b10,
  parameter bit [NUM_VM-1:0][31:0]  VM_DEPTH  = {32'd1024, 32'd1024},
  parameter int NUM_RDP           = 1,
  parameter bit [NUM_RDP-1:0][31:0] RDP_VM = {32'd0},
  parameter bit [NUM_RDP-1:0][31:0] RDP_W  = {32'd32},
  parameter int RD_DW             = 32,
  parameter int NUM_WRP           = 1,
  parameter bit [NUM_WRP-1:0][31:0] WRP_VM = {32'd1},
  parameter bit [NUM_WRP-1:0][31:0] WRP_W  = {32'd16},
  parameter int WR_DW             = 16
) (
  input  logic                                      clk,
  input  logic                                      rst,
  // platform bus (host)
  input  logic                                      host_valid,
  input  host_req_t                                 host_req,
  output logic                                      host_gnt,
  output logic                                      host_rvalid,
  output logic [HOST_DW-1:0]                        host_rdata,
  // application read ports
  input  logic [NUM_RDP-1:0]                        rd_start,
  input  logic [NUM_RDP-1:0][AW-1:0]                rd_addr,
  input  logic [NUM_RDP-1:0][LW-1:0]                rd_count,
  output logic [NUM_RDP-1:0]                        rd_busy,
  output logic [NUM_RDP-1:0]                        rd_valid,
  output logic [NUM_RDP-1:0][RD_DW-1:0]             rd_data,
  input  logic [NUM_RDP-1:0]                        rd_ready,
  // application write ports
  input  logic [NUM_WRP-1:0]                        wr_start,
  input  logic [NUM_WRP-1:0][AW-1:0]                wr_addr,
  input  logic [NUM_WRP-1:0][LW-1:0]                wr_count,
  output logic [NUM_WRP-1:0]                        wr_busy,
  input  logic [NUM_WRP-1:0]                        wr_valid,
  input  logic [NUM_WRP-1:0][WR_DW-1:0]             wr_data,
  output logic [NUM_WRP-1:0]                        wr_ready,
  // communication controllers, application side
  output logic [NUM_CC-1:0][NUM_REGS-1:0][CC_W-1:0] cc_regs,
  output logic [NUM_CC-1:0][NUM_REGS-1:0]           cc_reg_wr,
  input  logic [NUM_CC-1:0][NUM_REGS-1:0][CC_W-1:0] cc_status,
  input  logic [NUM_CC-1:0]                         cc_bram_en,
  input  logic [NUM_CC-1:0]                         cc_bram_we,
  input  logic [NUM_CC-1:0][$clog2(BRAM_DEPTH)-1:0] cc_bram_addr,
  input  logic [NUM_CC-1:0][CC_W-1:0]               cc_bram_wdata,
  output logic [NUM_CC-1:0][CC_W-1:0]               cc_bram_rdata,
  // external physical memory port of each virtual memory
  output logic [NUM_VM-1:0]                         ext_req,
  output logic [NUM_VM-1:0]                         ext_we,
  output logic [NUM_VM-1:0][MAW-1:0]                ext_addr,
  output logic [NUM_VM-1:0][NW-1:0]                 ext_wdata,
  output logic [NUM_VM-1:0][NW/8-1:0]               ext_be,
  input  logic [NUM_VM-1:0]                         ext_gnt,
  input  logic [NUM_VM-1:0]                         ext_rvalid,
  input  logic [NUM_VM-1:0][NW-1:0]                 ext_rdata
);
  localparam int NUM_T = NUM_CC + NUM_VM;
  localparam int LAW   = 16;
  localparam int NREQ  = NUM_RDP + NUM_WRP + 1;
  localparam int HOST  = NUM_RDP + NUM_WRP;
  localparam int NB    = NW / 8;

  // ---------------- platform bus decoder ----------------
  logic [NUM_T-1:0]              t_req, t_gnt, t_rvalid;
  logic                          t_we;
  logic [SEL_LSB-1:0]            t_addr;
  logic [HOST_DW-1:0]            t_wdata;
  logic [NUM_T-1:0][HOST_DW-1:0] t_rdata;

  vrc_bus_decoder #(.NUM_T(NUM_T)) u_dec (
    .clk, .rst, .host_valid, .host_req, .host_gnt, .host_rvalid, .host_rdata,
    .t_req, .t_we, .t_addr, .t_wdata, .t_gnt, .t_rvalid, .t_rdata);

  // ---------------- communication controllers ----------------
  for (genvar c = 0; c < NUM_CC; c++) begin : g_cc
    logic [CC_W-1:0] rdata;
    vrc_comm_ctrl #(.CC_W(CC_W), .NUM_REGS(NUM_REGS), .BRAM_DEPTH(BRAM_DEPTH), .LAW(LAW)) u_cc (
      .clk, .rst,
      .h_req(t_req[c]), .h_we(t_we), .h_addr(t_addr[LAW-1:0]), .h_wdata(t_wdata[CC_W-1:0]),
      .h_gnt(t_gnt[c]), .h_rvalid(t_rvalid[c]), .h_rdata(rdata),
      .app_regs(cc_regs[c]), .app_reg_wr(cc_reg_wr[c]), .app_status(cc_status[c]),
      .app_bram_en(cc_bram_en[c]), .app_bram_we(cc_bram_we[c]), .app_bram_addr(cc_bram_addr[c]),
      .app_bram_wdata(cc_bram_wdata[c]), .app_bram_rdata(cc_bram_rdata[c]));
    assign t_rdata[c] = HOST_DW'(rdata);
  end

  // ---------------- requesters: application ports and host ----------------
  // request side of every port, indexed by requester number
  logic [NREQ-1:0]           p_req, p_we;
  logic [NREQ-1:0][MAW-1:0]  p_addr;
  logic [NREQ-1:0][NW-1:0]   p_wdata;
  logic [NREQ-1:0][NB-1:0]   p_be;
  logic [NREQ-1:0]           p_gnt, p_rvalid;
  logic [NREQ-1:0][NW-1:0]   p_rdata;
  // per-memory views
  logic [NUM_VM-1:0][NREQ-1:0] v_gnt, v_rvalid;
  logic [NUM_VM-1:0][NW-1:0]   v_rdata;

  for (genvar p = 0; p < NUM_RDP; p++) begin : g_rdp
    logic [RDP_W[p]-1:0] data;
    vrc_vmem_rd_port #(.PW(RDP_W[p]), .NW(NW), .AW(AW), .MAW(MAW), .LW(LW),
                       .FIFO_DEPTH(FIFO_DEPTH)) u_rd (
      .clk, .rst,
      .start(rd_start[p]), .start_addr(rd_addr[p]), .count(rd_count[p]), .busy(rd_busy[p]),
      .rd_valid(rd_valid[p]), .rd_data(data), .rd_ready(rd_ready[p]),
      .m_req(p_req[p]), .m_addr(p_addr[p]), .m_gnt(p_gnt[p]),
      .m_rvalid(p_rvalid[p]), .m_rdata(p_rdata[p]));
    assign rd_data[p] = RD_DW'(data);
    assign p_we[p]    = 1'b0;
    assign p_wdata[p] = '0;
    assign p_be[p]    = '0;
    assign p_gnt[p]    = v_gnt[RDP_VM[p]][p];
    assign p_rvalid[p] = v_rvalid[RDP_VM[p]][p];
    assign p_rdata[p]  = v_rdata[RDP_VM[p]];
    if (RDP_W[p] > RD_DW || RDP_VM[p] >= NUM_VM) begin : g_bad
      $error("read port %0d: width above RD_DW or no such virtual memory", p);
    end
  end

  for (genvar p = 0; p < NUM_WRP; p++) begin : g_wrp
    localparam int R = NUM_RDP + p;
    vrc_vmem_wr_port #(.PW(WRP_W[p]), .NW(NW), .AW(AW), .MAW(MAW), .LW(LW),
                       .FIFO_DEPTH(FIFO_DEPTH)) u_wr (
      .clk, .rst,
      .start(wr_start[p]), .start_addr(wr_addr[p]), .count(wr_count[p]), .busy(wr_busy[p]),
      .wr_valid(wr_valid[p]), .wr_data(wr_data[p][WRP_W[p]-1:0]), .wr_ready(wr_ready[p]),
      .m_req(p_req[R]), .m_addr(p_addr[R]), .m_wdata(p_wdata[R]), .m_be(p_be[R]),
      .m_gnt(p_gnt[R]));
    assign p_we[R]     = 1'b1;
    assign p_gnt[R]    = v_gnt[WRP_VM[p]][R];
    assign p_rvalid[R] = 1'b0;
    assign p_rdata[R]  = '0;
    if (WRP_W[p] > WR_DW || WRP_VM[p] >= NUM_VM) begin : g_bad
      $error("write port %0d: width above WR_DW or no such virtual memory", p);
    end
  end

  // the host port: single native words, routed to the addressed memory
  assign p_we[HOST]     = t_we;
  assign p_addr[HOST]   = MAW'(t_addr);
  assign p_wdata[HOST]  = NW'(t_wdata);
  assign p_be[HOST]     = '1;
  assign p_gnt[HOST]    = 1'b0;
  assign p_rvalid[HOST] = 1'b0;
  assign p_rdata[HOST]  = '0;
  assign p_req[HOST]    = 1'b0;

  // ---------------- virtual memories and their mapping ----------------
  for (genvar v = 0; v < NUM_VM; v++) begin : g_vm
    logic [NREQ-1:0] req;
    logic            m_req, m_we, m_gnt, m_rvalid;
    logic [MAW-1:0]  m_addr;
    logic [NW-1:0]   m_wdata, m_rdata;
    logic [NB-1:0]   m_be;

    // only the ports attached to this memory, and the host when it
    // addresses this memory, request here
    for (genvar p = 0; p < NUM_RDP; p++) begin : g_r
      assign req[p] = (RDP_VM[p] == v) && p_req[p];
    end
    for (genvar p = 0; p < NUM_WRP; p++) begin : g_w
      assign req[NUM_RDP+p] = (WRP_VM[p] == v) && p_req[NUM_RDP+p];
    end
    assign req[HOST] = t_req[NUM_CC+v];

    vrc_virtual_memory #(.NUM_REQ(NREQ), .NW(NW), .MAW(MAW), .TAG_DEPTH(TAG_DEPTH)) u_vm (
      .clk, .rst, .req, .we(p_we), .addr(p_addr), .wdata(p_wdata), .be(p_be),
      .gnt(v_gnt[v]), .rvalid(v_rvalid[v]), .rdata(v_rdata[v]),
      .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_gnt, .m_rvalid, .m_rdata);

    assign t_gnt[NUM_CC+v]    = v_gnt[v][HOST];
    assign t_rvalid[NUM_CC+v] = v_rvalid[v][HOST];
    assign t_rdata[NUM_CC+v]  = HOST_DW'(v_rdata[v]);

    if (VM_ONCHIP[v]) begin : g_onchip
      vrc_onchip_mem #(.NW(NW), .DEPTH(VM_DEPTH[v]), .MAW(MAW)) u_mem (
        .clk, .rst, .m_req, .m_we, .m_addr, .m_wdata, .m_be, .m_gnt, .m_rvalid, .m_rdata);
      assign ext_req[v]   = 1'b0;
      assign ext_we[v]    = 1'b0;
      assign ext_addr[v]  = '0;
      assign ext_wdata[v] = '0;
      assign ext_be[v]    = '0;
    end else begin : g_ext
      assign ext_req[v]   = m_req;
      assign ext_we[v]    = m_we;
      assign ext_addr[v]  = m_addr;
      assign ext_wdata[v] = m_wdata;
      assign ext_be[v]    = m_be;
      assign m_gnt        = ext_gnt[v];
      assign m_rvalid     = ext_rvalid[v];
      assign m_rdata      = ext_rdata[v];
    end
  end

  if (NW > HOST_DW || NUM_T > 16) begin : g_bad_cfg
    $error("NW above the host bus width, or too many bus targets");
  end
endmodule
