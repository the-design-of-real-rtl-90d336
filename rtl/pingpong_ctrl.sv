// pingpong_ctrl: SRAM ping-pong cache between image acquisition and the DSP.
//
// Two external SRAMs take turns: while the camera's current frame is written
// into one, the DSP reads the previous frame out of the other through the
// EMIF, so acquisition and compression run at the same time. The state
// machine follows the state transition diagram of the design:
//   S0  after reset; the first start-of-frame token moves it to S1.
//   S1  the first frame is written into SRAM0; nothing can be read yet.
//       At its end the machine enters S2.
//   S2  SRAM0 is read out by the DSP while the next frame goes into SRAM1.
//   S3  SRAM1 is read out while the next frame goes into SRAM0.
// The machine leaves S2 for S3 (and S3 for S2) once both the frame being
// written is complete and the DSP has read every word of the other SRAM.
// Reset returns it to S0 from any state. Each entry into S2 or S3 raises the
// frame-ready interrupt to the DSP (ext_int, INT_W cycles high), whose rising
// edge starts the EDMA transfer. channel_sel is the SRAM the DSP reads:
// 0 for SRAM0, 1 for SRAM1.
//
// Every pixel has a fixed SRAM address: pixel (x, y) is at byte address
// y*W + x, so the same location always holds the same pixel of the image.
// The SRAMs are 16 bits wide with byte lanes, which lets one EMIF word carry
// two neighbouring pixels: byte address a is word a/2, the low byte for even
// a and the high byte for odd a. This organisation, the frame-drop policy and
// the interrupt width are this design's choices.
//
// Policies of this design: a frame that starts while the write SRAM still
// holds a complete frame the DSP has not finished reading is dropped whole
// (drop_cnt counts them); on the cycle the SRAMs swap, the token FIFO is not
// popped (a one-cycle stall, counted in stall_cnt).
//
// Timing: all in the system clock domain. One token is taken per cycle;
// its SRAM write is registered and reaches the chip one cycle later. The read
// path is combinational: rd_addr with rd_en selects the read SRAM in the same
// cycle and rd_data returns its output; rd_strobe marks one completed access
// and is counted towards the W*H/2 words of a frame.
module pingpong_ctrl
  import img_pkg::*;
#(
  parameter int unsigned W     = IMG_W,
  parameter int unsigned H     = IMG_H,
  parameter int unsigned INT_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // token stream from the camera FIFO (first-word-fall-through)
  input  logic               tok_empty,
  input  pix_tok_t           tok_i,
  output logic               tok_pop,
  // DSP read side (word addresses within the frame)
  input  logic               rd_en,
  input  logic [SRAM_AW-1:0] rd_addr,
  input  logic               rd_strobe,
  output logic [SRAM_DW-1:0] rd_data,
  // the two SRAM chips
  output sram_req_t          sram0_o,
  input  logic [SRAM_DW-1:0] sram0_rdata,
  output sram_req_t          sram1_o,
  input  logic [SRAM_DW-1:0] sram1_rdata,
  // to the DSP and status
  output logic               ext_int,
  output logic               channel_sel,
  output pp_state_e          state,
  output logic               wr_full,
  output logic               rd_done,
  output logic [15:0]        frames_in,
  output logic [15:0]        drop_cnt,
  output logic [15:0]        stall_cnt
);

  localparam int unsigned PA_W   = $clog2(W * H);
  localparam int unsigned XW     = $clog2(W + 1);
  localparam int unsigned YW     = $clog2(H + 1);
  localparam int unsigned WORDS  = (W * H) / 2;
  localparam int unsigned RCW    = $clog2(WORDS + 1);
  localparam int unsigned ICW    = $clog2(INT_W + 1);

  pp_state_e        st, st_n;
  logic             wr_active;
  logic [XW-1:0]    col;
  logic [YW-1:0]    line;
  logic [PA_W-1:0]  line_base;
  logic [RCW-1:0]   rd_cnt;
  logic [ICW-1:0]   int_cnt;
  logic             swap;
  logic             wbank;       // SRAM being written: 0 or 1
  logic             rd_ok;       // a frame is available for reading

  // registered write request
  logic             wq_v, wq_bank;
  logic [PA_W-1:0]  wq_pa;
  logic [PIX_BITS-1:0] wq_pix;

  assign state       = st;
  assign channel_sel = (st == S3);
  assign wbank       = (st == S2);
  assign rd_ok       = (st == S2) || (st == S3);
  assign swap        = rd_ok && wr_full && rd_done;
  assign tok_pop     = !tok_empty && !swap;

  always_comb begin
    st_n = st;
    unique case (st)
      S0: if (tok_pop && tok_i.kind == TOK_SOF) st_n = S1;
      S1: if (tok_pop && tok_i.kind == TOK_EOF && wr_active) st_n = S2;
      S2: if (swap) st_n = S3;
      S3: if (swap) st_n = S2;
      default: st_n = S0;
    endcase
  end

  // write side: token handling and pixel address generation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S0;
      wr_active <= 1'b0;
      wr_full   <= 1'b0;
      col       <= '0;
      line      <= '0;
      line_base <= '0;
      wq_v      <= 1'b0;
      wq_bank   <= 1'b0;
      wq_pa     <= '0;
      wq_pix    <= '0;
      frames_in <= '0;
      drop_cnt  <= '0;
      stall_cnt <= '0;
    end else begin
      st   <= st_n;
      wq_v <= 1'b0;
      if (swap) begin
        wr_full   <= 1'b0;
        stall_cnt <= stall_cnt + 1'b1;
      end
      if (tok_pop && st != S0 || tok_pop && tok_i.kind == TOK_SOF) begin
        unique case (tok_i.kind)
          TOK_SOF: begin
            if (wr_full) begin
              wr_active <= 1'b0;
              drop_cnt  <= drop_cnt + 1'b1;
            end else begin
              wr_active <= 1'b1;
              col       <= XW'(1);
              line      <= '0;
              line_base <= '0;
              wq_v      <= 1'b1;
              wq_pa     <= '0;
            end
          end
          TOK_SOL: if (wr_active) begin
            col       <= XW'(1);
            line      <= line + 1'b1;
            line_base <= line_base + PA_W'(W);
            wq_v      <= (line + 1'b1) < YW'(H);
            wq_pa     <= line_base + PA_W'(W);
          end
          TOK_PIX: if (wr_active) begin
            if (col != XW'(W)) col <= col + 1'b1;
            wq_v      <= (col < XW'(W)) && (line < YW'(H));
            wq_pa     <= line_base + PA_W'(col);
          end
          TOK_EOF: begin
            if (wr_active) begin
              wr_full   <= (st != S1);   // in S1 the frame is handed over at once
              frames_in <= frames_in + 1'b1;
            end
            wr_active <= 1'b0;
          end
          default: ;
        endcase
        wq_pix  <= tok_i.pix;
        wq_bank <= wbank;
      end
    end
  end

  // read side: count words of the current read frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt  <= '0;
      rd_done <= 1'b0;
    end else if (st_n != st && (st_n == S2 || st_n == S3)) begin
      rd_cnt  <= '0;
      rd_done <= 1'b0;
    end else if (rd_ok && rd_en && rd_strobe && !rd_done) begin
      rd_cnt  <= rd_cnt + 1'b1;
      rd_done <= (rd_cnt == RCW'(WORDS - 1));
    end
  end

  // frame-ready interrupt to the DSP
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_cnt <= '0;
      ext_int <= 1'b0;
    end else if (st_n != st && (st_n == S2 || st_n == S3)) begin
      int_cnt <= ICW'(INT_W - 1);
      ext_int <= 1'b1;
    end else if (int_cnt != '0) begin
      int_cnt <= int_cnt - 1'b1;
    end else begin
      ext_int <= 1'b0;
    end
  end

  // SRAM port multiplexing
  function automatic sram_req_t mk_req(input logic bank);
    sram_req_t r;
    r = '{addr: '0, wdata: '0, ce_n: 1'b1, oe_n: 1'b1, we_n: 1'b1, ub_n: 1'b1, lb_n: 1'b1};
    if (wq_v && wq_bank == bank) begin
      r.addr  = SRAM_AW'(wq_pa >> 1);
      r.wdata = {wq_pix, wq_pix};
      r.ce_n  = 1'b0;
      r.we_n  = 1'b0;
      r.ub_n  = ~wq_pa[0];
      r.lb_n  =  wq_pa[0];
    end else if (rd_ok && rd_en && channel_sel == bank) begin
      r.addr  = rd_addr;
      r.ce_n  = 1'b0;
      r.oe_n  = 1'b0;
      r.ub_n  = 1'b0;
      r.lb_n  = 1'b0;
    end
    return r;
  endfunction

  always_comb sram0_o = mk_req(1'b0);
  always_comb sram1_o = mk_req(1'b1);
  assign rd_data = !rd_ok ? '0 : (channel_sel ? sram1_rdata : sram0_rdata);

  // the read SRAM is never the one being written while a frame is available
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    (wq_v && rd_ok && rd_en) |-> (wq_bank != channel_sel));

endmodule
