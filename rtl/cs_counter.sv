// cs_counter: coherent-sampling stage of the TRNG.
//
// A D flip-flop takes Clk_A on its data input and Clk_B on its clock input.
// With f_A : f_B = (N+1) : N, N consecutive samples sweep exactly one period of
// Clk_A, so the number of '1's among them is about N/2; clock jitter (and, in
// silicon, metastability) near the Clk_A edges makes that number uncertain and
// its least significant bit is the random output. The sum of '1's over a fixed
// window of WINDOW samples is used (not the length of a run of '1's), which is
// possible because the ratio of the two synthesized clocks is exact. WINDOW is
// N for the normal and jittery parameter sets and N/K when the count is taken
// over a fraction of the sweep.
//
// FULL_COUNT = 1 builds a ones counter and delivers the whole sum (used to
// measure the count distribution); FULL_COUNT = 0 keeps only a T flip-flop
// (a flip-flop and an XOR) that toggles on every '1', which is all the random
// bit needs. In both builds a free-running window counter marks the window.
//
// Interface (all in the Clk_B domain): clk_b, rst (synchronous, active high),
// clk_a (sampled as data), count/lsb/valid. valid pulses for one cycle every
// WINDOW cycles; count and lsb hold the result until the next pulse. The sum
// reported with valid covers the samples taken at the WINDOW Clk_B edges
// before the edge that raises valid. In the FULL_COUNT = 0 build count reads
// zero apart from bit 0.
// The window arithmetic follows the design; the reset style and the output
// register are this implementation's choices.
module cs_counter #(
  parameter int unsigned WINDOW     = 960,
  parameter bit          FULL_COUNT = 1'b1,
  localparam int unsigned CNT_W     = $clog2(WINDOW + 1),
  localparam int unsigned IDX_W     = (WINDOW > 1) ? $clog2(WINDOW) : 1
) (
  input  logic             clk_b,
  input  logic             rst,
  input  logic             clk_a,
  output logic [CNT_W-1:0] count,
  output logic             lsb,
  output logic             valid
);

  timeunit 1ps;
  timeprecision 1fs;

  // Sampling flip-flop: Clk_A is data, Clk_B is clock.
  logic sample_q;
  always_ff @(posedge clk_b) sample_q <= clk_a;

  // Window counter.
  logic [IDX_W-1:0] idx;
  logic             last;
  assign last = (idx == IDX_W'(WINDOW - 1));

  always_ff @(posedge clk_b) begin
    if (rst)       idx <= '0;
    else if (last) idx <= '0;
    else           idx <= idx + 1'b1;
  end

  generate
    if (FULL_COUNT) begin : g_counter
      logic [CNT_W-1:0] ones;
      always_ff @(posedge clk_b) begin
        if (rst) begin
          ones  <= '0;
          count <= '0;
          valid <= 1'b0;
        end else begin
          valid <= last;
          if (last) begin
            count <= ones + CNT_W'(sample_q);
            ones  <= '0;
          end else begin
            ones  <= ones + CNT_W'(sample_q);
          end
        end
      end
      assign lsb = count[0];
    end else begin : g_tff
      logic tff;
      logic lsb_q;
      always_ff @(posedge clk_b) begin
        if (rst) begin
          tff   <= 1'b0;
          lsb_q <= 1'b0;
          valid <= 1'b0;
        end else begin
          valid <= last;
          if (last) begin
            lsb_q <= tff ^ sample_q;
            tff   <= 1'b0;
          end else begin
            tff   <= tff ^ sample_q;
          end
        end
      end
      assign lsb   = lsb_q;
      assign count = CNT_W'(lsb_q);
    end
  endgenerate

endmodule
