// rs422_tx: asynchronous serial transmitter that sends the compressed image
// data to the remote monitoring system over an RS422 line.
//
// The system description sends the compressed data over RS422 but gives no
// frame format; this block uses the common 8N1 character: a low start bit,
// eight data bits least significant first, and a high stop bit, with the line
// high when idle. It runs on its bit clock (one bit per rising edge of
// bit_clk), which comes from clk_div, and takes bytes from the first-word-
// fall-through FIFO that the DSP fills. The differential RS422 driver outside
// the FPGA turns txd into the line signal.
//
// Interface: when fifo_empty is low, fifo_data is the next byte; the block
// pulses fifo_pop for one bit_clk cycle when it takes the byte. busy is high
// from the start bit to the end of the stop bit.
// Timing: one character is 10 bit_clk cycles; back-to-back bytes leave no idle
// bit between the stop bit and the next start bit.
module rs422_tx (
  input  logic       bit_clk,
  input  logic       rst_n,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_data,
  output logic       fifo_pop,
  output logic       txd,
  output logic       busy
);

  logic [8:0] shreg;   // data bits then stop bit, sent LSB first
  logic [3:0] bits_left;

  assign busy     = (bits_left != '0);
  assign fifo_pop = !busy && !fifo_empty;

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      txd       <= 1'b1;
      shreg     <= '1;
      bits_left <= '0;
    end else if (fifo_pop) begin
      txd       <= 1'b0;                 // start bit
      shreg     <= {1'b1, fifo_data};
      bits_left <= 4'd9;
    end else if (busy) begin
      txd       <= shreg[0];
      shreg     <= {1'b1, shreg[8:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      txd       <= 1'b1;
    end
  end

endmodule
