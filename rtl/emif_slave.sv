// emif_slave: FPGA side of the DSP's external memory interface (EMIF), chip
// enable space CE2.
//
// The DSP's EDMA moves each finished frame out of the ping-pong SRAM through
// this port, and the DSP writes its compressed output back through it for the
// RS422 link. The EMIF is programmed for one cycle of setup, one cycle of
// strobe and no hold on a 16-bit bus clocked at 150 MHz, i.e. one 16-bit word
// every three cycles of ECLKOUT, 100 Mbyte/s; those settings follow the system
// description. This port is synchronous to ECLKOUT, which is also the system
// clock of the FPGA.
//
// Address map (EA counts 16-bit words; this design's choice):
//   EA[MSB] = 0        frame data: word EA[17:0] of the SRAM being read,
//                      two pixels per word, even pixel in the low byte.
//   EA[MSB] = 1, 0     read : status  {tx_full, cam_ovf, tx_ovf, size_err,
//                                      rd_done, wr_full, state[1:0],
//                                      channel_sel}, zero-extended
//                      write: ED[7:0] is pushed into the RS422 FIFO
//   EA[MSB] = 1, 1     read : frames acquired (16 bits)
//   EA[MSB] = 1, 2     read : frames dropped  (16 bits)
//   EA[MSB] = 1, 3     read : ping-pong swaps (16 bits)
//
// Timing: during the setup cycle (CE2 low, ARE high) the address goes to the
// read SRAM and its data is registered into ed_o at the end of the cycle, so
// ED is stable through the strobe cycle and is sampled by the DSP at its end.
// rd_strobe is high in the strobe cycle (CE2 and ARE low) and counts one word
// read. A write is taken in the cycle CE2 and AWE are both low.
module emif_slave
  import img_pkg::*;
(
  input  logic                clk,        // ECLKOUT
  input  logic                rst_n,
  // EMIF pins
  input  logic                ce2_n,
  input  logic                are_n,
  input  logic                aoe_n,
  input  logic                awe_n,
  input  logic [EMIF_AW-1:0]  ea,
  input  logic [EMIF_DW-1:0]  ed_i,
  output logic [EMIF_DW-1:0]  ed_o,
  output logic                ed_oe,
  // frame read port to the ping-pong cache
  output logic                rd_en,
  output logic [SRAM_AW-1:0]  rd_addr,
  output logic                rd_strobe,
  input  logic [SRAM_DW-1:0]  rd_data,
  // RS422 FIFO write port
  output logic                tx_we,
  output logic [7:0]          tx_data,
  // status inputs
  input  logic [8:0]          status,
  input  logic [15:0]         frames_in,
  input  logic [15:0]         drop_cnt,
  input  logic [15:0]         swap_cnt
);

  logic         sel, regs;
  logic [1:0]   ridx;
  logic [15:0]  reg_val;

  assign sel       = ~ce2_n;
  assign regs      = ea[EMIF_AW-1];
  assign ridx      = ea[1:0];

  assign rd_en     = sel & ~regs;
  assign rd_addr   = ea[SRAM_AW-1:0];
  assign rd_strobe = sel & ~regs & ~are_n;

  assign tx_we     = sel & regs & ~awe_n & (ridx == 2'd0);
  assign tx_data   = ed_i[7:0];

  always_comb begin
    unique case (ridx)
      2'd0:    reg_val = 16'(status);
      2'd1:    reg_val = frames_in;
      2'd2:    reg_val = drop_cnt;
      default: reg_val = swap_cnt;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ed_o <= '0;
    else if (sel) ed_o <= regs ? reg_val : rd_data;
  end

  assign ed_oe = sel & ~aoe_n & awe_n;

  a_strobe_in_ce: assert property (@(posedge clk) disable iff (!rst_n)
    !are_n || !awe_n |-> !ce2_n);
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n)
    !(!are_n && !awe_n));

endmodule
