// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first, line idle high.
//
// The bit clock is derived from the system clock with a fractional phase
// accumulator: every cycle BAUD is added, and when the sum reaches CLK_HZ a bit
// period ends and CLK_HZ is subtracted. 3 Mbit/s from 100 MHz thus gives bit
// periods of 33 or 34 cycles averaging 33.33, with no drift. The accumulator
// restarts with each frame, so every frame is 10 bit periods long (about 333
// cycles at the defaults).
//
// Interface: a valid/ready byte input. ready is high while idle; a byte is taken
// in the cycle valid and ready are both high, and the start bit begins on the
// next cycle. rst is synchronous, active high. The 3 Mbit/s rate is the
// design's; the frame format and baud generation are this implementation's.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 3_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ACC_W = $clog2(CLK_HZ + BAUD + 1);

  logic [ACC_W-1:0] acc;
  logic [9:0]       shreg;   // {stop, data[7:0], start}
  logic [3:0]       bits_left;
  logic             tick;

  assign tick  = (acc + ACC_W'(BAUD)) >= ACC_W'(CLK_HZ);
  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      shreg     <= '1;
      bits_left <= 4'd0;
      txd       <= 1'b1;
    end else if (bits_left == 4'd0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        acc       <= '0;
        txd       <= 1'b0;
      end
    end else begin
      if (tick) begin
        acc       <= acc + ACC_W'(BAUD) - ACC_W'(CLK_HZ);
        bits_left <= bits_left - 4'd1;
        shreg     <= {1'b1, shreg[9:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : shreg[1];
      end else begin
        acc <= acc + ACC_W'(BAUD);
      end
    end
  end

endmodule
