// tx_formatter: turns TRNG counter results into a byte stream for the UART.
//
// Two modes, chosen by send_count:
//   send_count = 1  every result is sent whole, as two bytes, low byte first
//                   (count[7:0], then count[15:8] zero-extended); this is the
//                   measurement mode used to record the count distribution.
//   send_count = 0  only the LSB of every result is kept; eight LSBs are packed
//                   into one byte, the first bit in bit 0, so the bit stream
//                   leaves the serial line in generation order.
// Bytes wait in a FIFO of FIFO_DEPTH entries. A result whose bytes do not fit
// is dropped whole (a packed byte in LSB mode, both bytes in count mode) and
// the saturating overflow counter increments, so a host can tell that the
// serial line was the bottleneck. A change of mode discards a partly packed
// byte.
//
// Interface: s_valid/s_count deliver one result per cycle at most; m_data/
// m_valid/m_ready is a valid/ready byte output (a byte moves when both are
// high). Results enter the FIFO the cycle after s_valid. rst is synchronous,
// active high. An assertion checks the output rule: a byte on offer is held
// until it is taken. Sending the counter values or the bit string to a host over a
// serial line is the design's; the byte format, FIFO and drop policy are this
// implementation's.
module tx_formatter #(
  parameter int unsigned CNT_W      = 10,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned PTR_W     = $clog2(FIFO_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             send_count,
  input  logic             s_valid,
  input  logic [CNT_W-1:0] s_count,
  output logic [7:0]       m_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [15:0]      overflow_cnt
);

  timeunit 1ps;
  timeprecision 1fs;

  initial begin
    if (CNT_W > 16) $error("tx_formatter: CNT_W=%0d exceeds two bytes", CNT_W);
    if (FIFO_DEPTH < 2 || (FIFO_DEPTH & (FIFO_DEPTH - 1)) != 0)
      $error("tx_formatter: FIFO_DEPTH=%0d must be a power of two >= 2", FIFO_DEPTH);
  end

  logic [7:0]       mem [FIFO_DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   level;

  // Byte packing for LSB mode.
  logic [7:0] pack;
  logic [2:0] nbits;
  logic       mode_q;

  // Bytes to push this cycle.
  logic [1:0]  push_n;
  logic [7:0]  push0, push1;
  logic        want;
  logic [1:0]  want_n;
  logic [15:0] cnt16;
  logic        pop;

  assign cnt16 = 16'(s_count);
  assign pop   = m_valid && m_ready;

  always_comb begin
    want   = 1'b0;
    want_n = 2'd0;
    push0  = cnt16[7:0];
    push1  = cnt16[15:8];
    if (s_valid && mode_q == send_count) begin
      if (send_count) begin
        want   = 1'b1;
        want_n = 2'd2;
      end else if (nbits == 3'd7) begin
        want   = 1'b1;
        want_n = 2'd1;
        push0  = {s_count[0], pack[7:1]};
      end
    end
    // Room counts the byte leaving this cycle.
    if (want && (32'(level) - 32'(pop) + 32'(want_n) <= FIFO_DEPTH))
      push_n = want_n;
    else
      push_n = 2'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      level        <= '0;
      pack         <= '0;
      nbits        <= '0;
      mode_q       <= 1'b0;
      overflow_cnt <= '0;
    end else begin
      mode_q <= send_count;
      if (mode_q != send_count) begin
        nbits <= '0;
      end else if (s_valid && !send_count) begin
        pack  <= {s_count[0], pack[7:1]};
        nbits <= nbits + 3'd1;
      end

      if (want && push_n == 2'd0 && overflow_cnt != 16'hFFFF)
        overflow_cnt <= overflow_cnt + 16'd1;

      if (push_n != 2'd0) mem[wr_ptr] <= push0;
      if (push_n == 2'd2) mem[wr_ptr + PTR_W'(1)] <= push1;
      wr_ptr <= wr_ptr + PTR_W'(push_n);
      if (pop) rd_ptr <= rd_ptr + PTR_W'(1);
      level <= level + (PTR_W + 1)'(push_n) - (PTR_W + 1)'(pop);
    end
  end

  assign m_valid = (level != '0);
  assign m_data  = mem[rd_ptr];

  // A byte on offer stays on offer, unchanged, until the receiver takes it.
  a_offer_held: assert property (@(posedge clk) disable iff (rst)
    m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
