// vrc_ext_mem_model: behavioural model of a board's external memory with
// its vendor controller, for simulation only (not synthesizable).
// It accepts native-word requests on the same port as vrc_onchip_mem, but
// refuses a request in about STALL_PCT percent of cycles (m_gnt low) and
// returns each read, in order, 1..MAX_LAT cycles after it was accepted.
// Unwritten words read as init_word(addr), a fixed pattern of the address,
// so testbenches can predict them. Writes honour the byte enables.
module vrc_ext_mem_model #(
  parameter int NW        = 64,
  parameter int MAW       = 26,
  parameter int STALL_PCT = 25,
  parameter int MAX_LAT   = 6
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
  logic [NW-1:0] mem [logic [MAW-1:0]];
  logic [NW-1:0] rq_data [$];
  longint        rq_due  [$];
  longint        cyc;
  longint        last_due;
  int            reads, writes, stalls;

  function automatic logic [NW-1:0] init_word(logic [MAW-1:0] a);
    return {NW/32{32'(a) * 32'h9E3779B1 ^ 32'h5A5A0000}};
  endfunction

  function automatic logic [NW-1:0] peek(logic [MAW-1:0] a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  always_ff @(negedge clk) m_gnt <= rst ? 1'b0 : (($urandom % 100) >= STALL_PCT);

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc      <= 0;
      last_due <= 0;
      m_rvalid <= 1'b0;
      rq_data.delete();
      rq_due.delete();
    end else begin
      logic [NW-1:0] w;
      longint due;
      cyc <= cyc + 1;
      m_rvalid <= 1'b0;
      if (rq_due.size() > 0 && rq_due[0] <= cyc) begin
        m_rvalid <= 1'b1;
        m_rdata  <= rq_data.pop_front();
        void'(rq_due.pop_front());
      end
      if (m_req && !m_gnt) stalls <= stalls + 1;
      if (m_req && m_gnt) begin
        if (m_we) begin
          w = peek(m_addr);
          for (int b = 0; b < NW/8; b++) if (m_be[b]) w[b*8 +: 8] = m_wdata[b*8 +: 8];
          mem[m_addr] = w;
          writes <= writes + 1;
        end else begin
          due = cyc + 1 + longint'($urandom % MAX_LAT);
          if (due <= last_due) due = last_due + 1;
          last_due <= due;
          rq_data.push_back(peek(m_addr));
          rq_due.push_back(due);
          reads <= reads + 1;
        end
      end
    end
  end

  initial begin reads = 0; writes = 0; stalls = 0; end
endmodule
