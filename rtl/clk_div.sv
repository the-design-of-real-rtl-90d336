// clk_div: integer clock divider built from a synchronous counter, with the
// divided clock taken from a register.
//
// Gating or decoding a clock with combinational logic produces glitches
// ("burrs"), and a DCM cannot reach large integer division ratios, so the
// divided clocks of this design come from a free-running counter on the global
// clock whose terminal count toggles an output flip-flop. The clock that leaves
// the block is therefore a flip-flop output and cannot glitch. That method follows
// the system description; the use of this block for the RS422 bit clock and
// the ratio are this design's choices.
//
// Interface: clk_in is the global clock; clk_out runs at f(clk_in)/DIV with a
// 50 % duty cycle (DIV must be even). tick is a one-cycle pulse in the clk_in
// domain on the cycle before each rising edge of clk_out, for logic that
// prefers a clock enable to a second clock.
// Timing: after reset clk_out is low and first rises DIV/2 cycles later.
module clk_div #(
  parameter int unsigned DIV = 1302   // 150 MHz / 1302 = 115.2 kHz
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);

  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap = (cnt == CW'(HALF - 1));

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (wrap) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

  assign tick = wrap & ~clk_out;

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div: DIV must be even and >= 2");

endmodule
