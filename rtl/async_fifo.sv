// async_fifo: dual-clock first-in first-out buffer.
//
// Used twice in the FPGA: to carry pixel tokens from the camera's pixel clock
// into the system (EMIF) clock domain ahead of the SRAM ping-pong cache, and
// to hold compressed bytes written by the DSP until the RS422 transmitter,
// which runs on a divided clock, sends them. The system description names a
// FIFO cache module but not its structure; this is the usual construction:
// a DEPTH-entry array, binary read and write pointers one bit wider than the
// address, and their Gray-coded copies passed through sync_2ff chains into the
// other clock domain, so that only one bit of a crossing pointer changes at a
// time.
//
// Interface: write side (wclk) pushes wdata when winc is high and wfull is
// low; a push while wfull is dropped and sets the sticky overflow flag.
// Read side (rclk) is first-word-fall-through: rdata shows the oldest entry
// while rempty is low, and rinc pops it. wfull and rempty are pessimistic by
// the two-stage synchronizer delay, never optimistic.
module async_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wbin, wgray, rbin, rgray;
  logic [AW:0]      wgray_s, rgray_s;     // pointers seen in the other domain
  logic [AW:0]      wbin_n, rbin_n, wgray_n, rgray_n;
  logic             push, pop;

  assign push = winc & ~wfull;
  assign pop  = rinc & ~rempty;

  assign wbin_n  = wbin + (AW+1)'(push);
  assign rbin_n  = rbin + (AW+1)'(pop);
  assign wgray_n = (wbin_n >> 1) ^ wbin_n;
  assign rgray_n = (rbin_n >> 1) ^ rbin_n;

  // write domain
  always_ff @(posedge wclk) if (push) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      wfull    <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wbin  <= wbin_n;
      wgray <= wgray_n;
      // full when the next write pointer equals the read pointer with the two
      // top Gray bits inverted
      wfull <= (wgray_n == {~rgray_s[AW:AW-1], rgray_s[AW-2:0]});
      if (winc && wfull) overflow <= 1'b1;
    end
  end

  // read domain
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin   <= '0;
      rgray  <= '0;
      rempty <= 1'b1;
    end else begin
      rbin   <= rbin_n;
      rgray  <= rgray_n;
      rempty <= (rgray_n == wgray_s);
    end
  end

  assign rdata = mem[rbin[AW-1:0]];

  // pointer synchronizers
  for (genvar i = 0; i <= AW; i++) begin : g_sync
    sync_2ff u_w2r (.clk(rclk), .rst_n(rrst_n), .d(wgray[i]), .q(wgray_s[i]));
    sync_2ff u_r2w (.clk(wclk), .rst_n(wrst_n), .d(rgray[i]), .q(rgray_s[i]));
  end

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH) else $error("async_fifo: DEPTH must be a power of two >= 4");

endmodule
