// img_fpga_top: FPGA of a real-time image acquisition and compression system
// for a 100 frame/s Camera Link camera, with the compression done by a DSP.
//
// Data path: the camera's LVDS lines are converted to LVTTL by deserializer
// chips outside the FPGA. cl_receiver frames the 8-bit gray pixels on the
// camera's pixel clock; a dual-clock FIFO carries them into the system clock
// domain; pingpong_ctrl writes each frame into one of two external SRAMs at
// the pixel's fixed address while the DSP, over its EMIF (emif_slave), reads
// the previous frame out of the other SRAM. Every time a complete frame is
// ready, ext_int4 rises and the DSP starts an EDMA transfer of the frame, then
// compresses it. The DSP writes the compressed bytes back over the EMIF into a
// second FIFO, and rs422_tx sends them to the monitoring system over RS422 on
// a bit clock made by clk_div.
//
// Clocks: eclk is the DSP's EMIF clock (150 MHz) and the system clock of the
// FPGA; cl_clk is the camera pixel clock; the RS422 bit clock is eclk/BAUD_DIV.
// rst_n is an asynchronous, active-low reset; each clock domain gets its own
// copy whose release is synchronized with sync_2ff. Reset returns the
// ping-pong state machine to S0.
//
// The two SRAM chips are outside; their request buses are brought out as
// sram0_o/sram1_o (struct sram_req_t, active-low controls) and their data
// comes back on sram0_rdata/sram1_rdata. The frame geometry, the EMIF timing
// and the ping-pong scheme follow the system description; the FIFO depths, the
// EMIF address map, the baud rate and the status word are this design's
// choices.
module img_fpga_top
  import img_pkg::*;
#(
  parameter int unsigned W         = IMG_W,
  parameter int unsigned H         = IMG_H,
  parameter int unsigned CAM_DEPTH = 512,
  parameter int unsigned TX_DEPTH  = 1024,
  parameter int unsigned BAUD_DIV  = 1302,
  parameter int unsigned INT_W     = 8
) (
  input  logic                rst_n,
  // Camera Link (after the LVDS deserializer)
  input  logic                cl_clk,
  input  logic                fval,
  input  logic                lval,
  input  logic                dval,
  input  logic [PIX_BITS-1:0] port_a,
  // DSP EMIF, CE2 space
  input  logic                eclk,
  input  logic                ce2_n,
  input  logic                are_n,
  input  logic                aoe_n,
  input  logic                awe_n,
  input  logic [EMIF_AW-1:0]  ea,
  input  logic [EMIF_DW-1:0]  ed_i,
  output logic [EMIF_DW-1:0]  ed_o,
  output logic                ed_oe,
  output logic                ext_int4,
  // SRAM chips
  output sram_req_t           sram0_o,
  input  logic [SRAM_DW-1:0]  sram0_rdata,
  output sram_req_t           sram1_o,
  input  logic [SRAM_DW-1:0]  sram1_rdata,
  // RS422 line driver and indicator
  output logic                rs422_txd,
  output logic                channel_sel
);

  // ---------------------------------------------------------------- resets
  logic sys_rst_n, cl_rst_n, bit_rst_n, bit_clk, bit_tick;

  sync_2ff u_rst_sys (.clk(eclk),    .rst_n(rst_n), .d(1'b1), .q(sys_rst_n));
  sync_2ff u_rst_cl  (.clk(cl_clk),  .rst_n(rst_n), .d(1'b1), .q(cl_rst_n));
  sync_2ff u_rst_bit (.clk(bit_clk), .rst_n(rst_n), .d(1'b1), .q(bit_rst_n));

  clk_div #(.DIV(BAUD_DIV)) u_baud (
    .clk_in(eclk), .rst_n(sys_rst_n), .clk_out(bit_clk), .tick(bit_tick));

  // ---------------------------------------------------------- camera side
  pix_tok_t    cl_tok, ff_tok;
  logic        cl_tok_v, cl_size_err, size_err_sticky, cam_ovf;
  logic [15:0] cl_frames;
  logic        ff_empty, ff_full, ff_pop;

  cl_receiver #(.W(W), .H(H)) u_cl (
    .cl_clk, .rst_n(cl_rst_n), .fval, .lval, .dval, .port_a,
    .tok_o(cl_tok), .tok_valid(cl_tok_v), .size_err(cl_size_err), .frame_cnt(cl_frames));

  always_ff @(posedge cl_clk or negedge cl_rst_n) begin
    if (!cl_rst_n)        size_err_sticky <= 1'b0;
    else if (cl_size_err) size_err_sticky <= 1'b1;
  end

  async_fifo #(.WIDTH($bits(pix_tok_t)), .DEPTH(CAM_DEPTH)) u_cam_fifo (
    .wclk(cl_clk), .wrst_n(cl_rst_n), .winc(cl_tok_v), .wdata(cl_tok),
    .wfull(ff_full), .overflow(cam_ovf),
    .rclk(eclk), .rrst_n(sys_rst_n), .rinc(ff_pop), .rdata(ff_tok), .rempty(ff_empty));

  // ---------------------------------------------------------- ping-pong
  logic               rd_en, rd_strobe, wr_full, rd_done;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;
  pp_state_e          pp_state;
  logic [15:0]        frames_in, drop_cnt, swap_cnt;

  pingpong_ctrl #(.W(W), .H(H), .INT_W(INT_W)) u_pp (
    .clk(eclk), .rst_n(sys_rst_n),
    .tok_empty(ff_empty), .tok_i(ff_tok), .tok_pop(ff_pop),
    .rd_en, .rd_addr, .rd_strobe, .rd_data,
    .sram0_o, .sram0_rdata, .sram1_o, .sram1_rdata,
    .ext_int(ext_int4), .channel_sel, .state(pp_state),
    .wr_full, .rd_done, .frames_in, .drop_cnt, .stall_cnt(swap_cnt));

  // ---------------------------------------------------------- EMIF
  logic       tx_we, tx_full, tx_ovf, cam_ovf_s, size_err_s;
  logic [7:0] tx_data;
  logic [8:0] status;

  sync_2ff u_sync_ovf (.clk(eclk), .rst_n(sys_rst_n), .d(cam_ovf),         .q(cam_ovf_s));
  sync_2ff u_sync_err (.clk(eclk), .rst_n(sys_rst_n), .d(size_err_sticky), .q(size_err_s));

  assign status = {tx_full, cam_ovf_s, tx_ovf, size_err_s, rd_done, wr_full, pp_state, channel_sel};

  emif_slave u_emif (
    .clk(eclk), .rst_n(sys_rst_n),
    .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe,
    .rd_en, .rd_addr, .rd_strobe, .rd_data,
    .tx_we, .tx_data,
    .status, .frames_in, .drop_cnt, .swap_cnt);

  // ---------------------------------------------------------- RS422
  logic       tx_empty, tx_pop;
  logic [7:0] tx_q;
  logic       tx_busy;

  async_fifo #(.WIDTH(8), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .wclk(eclk), .wrst_n(sys_rst_n), .winc(tx_we), .wdata(tx_data),
    .wfull(tx_full), .overflow(tx_ovf),
    .rclk(bit_clk), .rrst_n(bit_rst_n), .rinc(tx_pop), .rdata(tx_q), .rempty(tx_empty));

  rs422_tx u_tx (
    .bit_clk, .rst_n(bit_rst_n), .fifo_empty(tx_empty), .fifo_data(tx_q),
    .fifo_pop(tx_pop), .txd(rs422_txd), .busy(tx_busy));

endmodule
