// rs422_rx_model: behavioural 8N1 receiver at the far end of the RS422
// line, for simulation only. It oversamples txd with clk, finds the middle of
// each start bit and then samples every DIV clocks; received bytes are queued
// in rx, and a missing stop bit counts a framing error. It starts listening
// once the line has been idle for ten bit times.
module rs422_rx_model #(
  parameter int DIV = 1302
) (
  input logic clk,
  input logic txd
);
  logic [7:0] rx [$];
  int framing_errors = 0;

  initial begin
    // wait until the line has been idle (high) for a whole character
    for (int n = 0; n < 10 * DIV; n++) begin
      @(posedge clk);
      if (txd !== 1'b1) n = 0;
    end
    forever begin
      logic [7:0] b;
      @(posedge clk);
      if (txd == 1'b0) begin
        repeat (DIV / 2 - 1) @(posedge clk);
        if (txd == 1'b0) begin
          for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
          repeat (DIV) @(posedge clk);
          if (txd != 1'b1) framing_errors++;
          rx.push_back(b);
        end
      end
    end
  end
endmodule
