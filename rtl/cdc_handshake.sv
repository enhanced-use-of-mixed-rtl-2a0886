// cdc_handshake: moves one data word per event from a source clock domain to a
// destination clock domain with a two-phase (toggle) request/acknowledge.
//
// Source side: when src_valid is high and no transfer is in flight, src_data is
// copied into a holding register and the request line toggles. The holding
// register stays still until the destination acknowledges, so the destination
// reads it without a multi-bit synchronizer. A src_valid that arrives while a
// transfer is still in flight is dropped and flagged on src_drop for one cycle.
// Destination side: the request passes a two-flop synchronizer; a change of it
// loads dst_data and raises dst_valid for one destination cycle, and the new
// request level is returned as the acknowledge through another two-flop
// synchronizer.
//
// Latency: about three destination cycles to dst_valid; the source is busy for
// about three more source cycles after that. Both resets are synchronous to
// their own clock, active high. An assertion checks that the holding register
// stays still while a transfer is in flight. The TRNG result crosses from the Clk_B sampling
// domain into the reference clock domain through this block; the crossing
// scheme is this implementation's choice.
module cdc_handshake #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  output logic             src_drop,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data
);

  timeunit 1ps;
  timeprecision 1fs;

  logic             req;
  logic [WIDTH-1:0] hold;
  logic [1:0]       ack_sync;
  logic             busy;
  logic [1:0]       req_sync;
  logic             ack;

  assign busy = (req != ack_sync[1]);

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      req      <= 1'b0;
      hold     <= '0;
      ack_sync <= '0;
      src_drop <= 1'b0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
      src_drop <= src_valid && busy;
      if (src_valid && !busy) begin
        hold <= src_data;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_sync  <= '0;
      ack       <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      req_sync  <= {req_sync[0], req};
      dst_valid <= 1'b0;
      if (req_sync[1] != ack) begin
        ack       <= req_sync[1];
        dst_data  <= hold;
        dst_valid <= 1'b1;
      end
    end
  end

  // The destination reads hold without synchronizing it: it must not move
  // while a transfer is in flight.
  a_hold_stable: assert property (@(posedge src_clk) disable iff (src_rst)
    $past(busy) |-> $stable(hold));

endmodule
