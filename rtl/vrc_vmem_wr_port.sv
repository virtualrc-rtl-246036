// vrc_vmem_wr_port: write interface of a virtual memory port.
// The application announces COUNT elements of PW bits to be written from
// byte address START_ADDR (PW-aligned, any count) and then streams them in
// on a valid/ready handshake. The port packs consecutive elements into the
// lanes of a native NW-bit word, lowest lane first, and records a byte
// enable for every filled lane. A word is queued in the write FIFO when its
// last lane is filled or the transfer ends, so partial words at either end
// leave the neighbouring bytes in memory untouched.
//
// Memory side: m_req/m_addr/m_wdata/m_be is a native-word write taken
// when m_gnt is high (writes are posted, no response). busy stays high
// until the last queued word has been taken by the memory.
// Width conversion and transfers of any size follow the document; the
// protocol, byte-enable handling and FIFO depth are this design's own.
module vrc_vmem_wr_port #(
  parameter int PW         = 16,
  parameter int NW         = 64,
  parameter int AW         = 32,
  parameter int MAW        = 26,
  parameter int LW         = 32,
  parameter int FIFO_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst,
  // transfer control
  input  logic            start,
  input  logic [AW-1:0]   start_addr,
  input  logic [LW-1:0]   count,
  output logic            busy,
  // input stream
  input  logic            wr_valid,
  input  logic [PW-1:0]   wr_data,
  output logic            wr_ready,
  // memory side
  output logic            m_req,
  output logic [MAW-1:0]  m_addr,
  output logic [NW-1:0]   m_wdata,
  output logic [NW/8-1:0] m_be,
  input  logic            m_gnt
);
  localparam int R      = NW / PW;
  localparam int LANE_W = (R > 1) ? $clog2(R) : 1;
  localparam int PB     = PW / 8;
  localparam int NB     = NW / 8;
  localparam int EW     = MAW + NW + NB;   // FIFO entry: address, data, enables

  logic [LW-1:0]     elem_left;
  logic [LANE_W-1:0] lane;
  logic [MAW-1:0]    word_addr;
  logic [NW-1:0]     acc_data;
  logic [NB-1:0]     acc_be;
  logic              take, flush;
  logic [NW-1:0]     next_data;
  logic [NB-1:0]     next_be;
  logic [EW-1:0]     f_dout;
  logic              f_empty, f_full;
  logic [$clog2(FIFO_DEPTH):0] f_count;

  assign wr_ready = (elem_left != '0) && !f_full;
  assign take     = wr_valid && wr_ready;
  assign flush    = take && ((int'(lane) == R-1) || (elem_left == LW'(1)));
  assign busy     = (elem_left != '0) || !f_empty;

  always_comb begin
    next_data = acc_data;
    next_be   = acc_be;
    next_data[lane*PW +: PW] = wr_data;
    next_be[lane*PB +: PB]   = '1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      elem_left <= '0;
      lane      <= '0;
      word_addr <= '0;
      acc_be    <= '0;
      acc_data  <= '0;
    end else if (start && !busy) begin
      elem_left <= count;
      lane      <= LANE_W'((start_addr / AW'(PB)) % AW'(R));
      word_addr <= MAW'(start_addr / AW'(NB));
      acc_be    <= '0;
    end else if (take) begin
      elem_left <= elem_left - 1'b1;
      if (flush) begin
        lane      <= '0;
        word_addr <= word_addr + 1'b1;
        acc_be    <= '0;
      end else begin
        lane      <= lane + 1'b1;
        acc_be    <= next_be;
        acc_data  <= next_data;
      end
    end
  end

  vrc_sync_fifo #(.W(EW), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst, .push(flush), .din({word_addr, next_data, next_be}),
    .pop(m_req && m_gnt), .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count));

  assign m_req = !f_empty;
  assign {m_addr, m_wdata, m_be} = f_dout;

  a_ratio:   assert property (@(posedge clk) NW % PW == 0 && PW % 8 == 0);
  a_aligned: assert property (@(posedge clk) disable iff (rst)
                (start && !busy) |-> (start_addr % AW'(PB)) == '0);
endmodule
