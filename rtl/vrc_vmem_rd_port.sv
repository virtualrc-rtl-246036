// vrc_vmem_rd_port: read interface of a virtual memory port.
// The application asks for COUNT elements of PW bits starting at byte
// address START_ADDR (PW-aligned, any count). The port turns this into
// reads of native NW-bit memory words, buffers the returned words in a FIFO
// and hands them out one PW-bit lane at a time, lowest lane first, on a
// valid/ready stream. This is the width-changing buffer the platform uses
// between a narrow application port and a wide physical memory.
//
// Memory side: m_req/m_addr is a native-word read request taken when m_gnt
// is high; m_rvalid/m_rdata return the words in request order, any number
// of cycles later. A request is only issued while the FIFO has a free slot
// reserved for its answer, so the buffer can never overflow however long
// the application stalls the stream.
// Timing: start is taken when busy is low; the first element can leave two
// cycles after the first word returns. busy drops after the last element.
// Transfers of any size and the width conversion follow the document; the
// protocol, FIFO depth and credit scheme are this design's own.
module vrc_vmem_rd_port #(
  parameter int PW         = 32,
  parameter int NW         = 64,
  parameter int AW         = 32,
  parameter int MAW        = 26,
  parameter int LW         = 32,
  parameter int FIFO_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst,
  // transfer control
  input  logic           start,
  input  logic [AW-1:0]  start_addr,
  input  logic [LW-1:0]  count,
  output logic           busy,
  // output stream
  output logic           rd_valid,
  output logic [PW-1:0]  rd_data,
  input  logic           rd_ready,
  // memory side
  output logic           m_req,
  output logic [MAW-1:0] m_addr,
  input  logic           m_gnt,
  input  logic           m_rvalid,
  input  logic [NW-1:0]  m_rdata
);
  localparam int R      = NW / PW;
  localparam int LANE_W = (R > 1) ? $clog2(R) : 1;
  localparam int PB     = PW / 8;
  localparam int NB     = NW / 8;
  localparam int CW     = $clog2(FIFO_DEPTH) + 1;

  logic [MAW-1:0]    issue_addr;
  logic [LW:0]       issue_left;
  logic [LW-1:0]     elem_left;
  logic [LANE_W-1:0] lane;
  logic [CW-1:0]     inflight;      // issued words not yet consumed
  logic [NW-1:0]     f_dout;
  logic              f_empty, f_full, f_pop;
  logic [CW-1:0]     f_count;
  logic              issue, take;
  logic [LANE_W-1:0] first_lane;
  logic [LW:0]       nwords;

  assign first_lane = LANE_W'((start_addr / AW'(PB)) % AW'(R));
  assign nwords     = ((LW+1)'(first_lane) + (LW+1)'(count) + (LW+1)'(R-1)) / (LW+1)'(R);

  assign busy     = (elem_left != '0) || (issue_left != '0);
  assign m_req    = (issue_left != '0) && (inflight < CW'(FIFO_DEPTH));
  assign m_addr   = issue_addr;
  assign issue    = m_req && m_gnt;
  assign rd_valid = (elem_left != '0) && !f_empty;
  assign rd_data  = f_dout[lane*PW +: PW];
  assign take     = rd_valid && rd_ready;
  assign f_pop    = take && ((int'(lane) == R-1) || (elem_left == LW'(1)));

  always_ff @(posedge clk) begin
    if (rst) begin
      issue_left <= '0;
      elem_left  <= '0;
      lane       <= '0;
      inflight   <= '0;
      issue_addr <= '0;
    end else begin
      if (start && !busy) begin
        issue_addr <= MAW'(start_addr / AW'(NB));
        issue_left <= (count == '0) ? '0 : nwords;
        elem_left  <= count;
        lane       <= first_lane;
      end else begin
        if (issue) begin
          issue_addr <= issue_addr + 1'b1;
          issue_left <= issue_left - 1'b1;
        end
        if (take) begin
          elem_left <= elem_left - 1'b1;
          lane      <= f_pop ? '0 : lane + 1'b1;
        end
      end
      inflight <= inflight + CW'(issue) - CW'(f_pop);
    end
  end

  vrc_sync_fifo #(.W(NW), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst, .push(m_rvalid), .din(m_rdata), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count));

  a_ratio:    assert property (@(posedge clk) NW % PW == 0 && PW % 8 == 0);
  a_no_spill: assert property (@(posedge clk) disable iff (rst) m_rvalid |-> !f_full);
  a_aligned:  assert property (@(posedge clk) disable iff (rst)
                 (start && !busy) |-> (start_addr % AW'(PB)) == '0);
endmodule
