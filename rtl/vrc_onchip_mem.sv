// vrc_onchip_mem: on-chip block RAM used when a virtual memory is mapped
// internally instead of to external physical memory.
// It offers the same port as an external memory: a request (m_req, m_we,
// word address, data, byte enables) is always accepted (m_gnt = 1); a read
// returns its word on m_rvalid/m_rdata in the next cycle, a write stores
// the enabled bytes. Addresses wrap modulo DEPTH.
// Internal mapping follows the document; size, latency and byte enables
// are this design's choices.
module vrc_onchip_mem #(
  parameter int NW    = 64,
  parameter int DEPTH = 1024,
  parameter int MAW   = 26
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            m_req,
  input  logic            m_we,
  input  logic [MAW-1:0]  m_addr,
  input  logic [NW-1:0]   m_wdata,
  input  logic [NW/8-1:0] m_be,
  output logic            m_gnt,
  output logic            m_rvalid,
  output logic [NW-1:0]   m_rdata
);
  localparam int IW = $clog2(DEPTH);
  logic [NW-1:0] mem [DEPTH];
  logic [IW-1:0] idx;

  assign m_gnt = 1'b1;
  assign idx   = m_addr[IW-1:0];

  always_ff @(posedge clk) begin
    if (m_req && m_we) begin
      for (int b = 0; b < NW/8; b++)
        if (m_be[b]) mem[idx][b*8 +: 8] <= m_wdata[b*8 +: 8];
    end
    if (m_req && !m_we) m_rdata <= mem[idx];
  end

  always_ff @(posedge clk) begin
    if (rst) m_rvalid <= 1'b0;
    else     m_rvalid <= m_req && !m_we;
  end
endmodule
