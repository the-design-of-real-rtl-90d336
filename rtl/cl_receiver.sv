// cl_receiver: Camera Link base-configuration receiver for an 8-bit gray-scale
// camera, on the FPGA side of the LVDS deserializer.
//
// The LVDS-to-LVTTL deserializer chip delivers, on the camera's pixel clock,
// the frame-valid, line-valid and data-valid strobes and the 8-bit port A
// (only a gray level is carried). This block registers those pins, finds the
// start of each frame and each line from the rising edges of FVAL and LVAL and
// turns the stream into tokens: the first pixel of a frame (TOK_SOF), the
// first pixel of any other line (TOK_SOL), other pixels (TOK_PIX), and an
// end-of-frame marker (TOK_EOF) emitted when FVAL falls. It also checks the
// frame geometry: size_err pulses with TOK_EOF when the frame did not have
// IMG_H lines of IMG_W pixels each.
// That the module converts the camera's LVDS signals for the FPGA follows the
// system description; the token format, the size check and the pin selection
// are this design's choices.
//
// Timing: everything is in the cl_clk domain. Input pins are registered once,
// so a token appears on tok_o/tok_valid two rising edges after its pixel is on
// the pins. One token per clock at most; there is no back-pressure.
module cl_receiver
  import img_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic                cl_clk,
  input  logic                rst_n,
  // deserialized Camera Link pins
  input  logic                fval,
  input  logic                lval,
  input  logic                dval,
  input  logic [PIX_BITS-1:0] port_a,
  // token stream
  output pix_tok_t            tok_o,
  output logic                tok_valid,
  // status
  output logic                size_err,
  output logic [15:0]         frame_cnt
);

  localparam int unsigned XW = $clog2(W + 2);
  localparam int unsigned YW = $clog2(H + 2);

  logic                fval_q, lval_q, dval_q, fval_d;
  logic [PIX_BITS-1:0] pa_q;
  logic                sof_pend, sol_pend, any_pix;
  logic [XW-1:0]       xcnt;
  logic [YW-1:0]       ycnt;
  logic                geo_bad;
  logic                pix_v;
  logic                sof_now;

  assign pix_v   = fval_q & lval_q & dval_q;
  assign sof_now = sof_pend | (fval_q & ~fval_d);

  // input registers
  always_ff @(posedge cl_clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_q <= 1'b0; lval_q <= 1'b0; dval_q <= 1'b0; pa_q <= '0; fval_d <= 1'b0;
    end else begin
      fval_q <= fval; lval_q <= lval; dval_q <= dval; pa_q <= port_a; fval_d <= fval_q;
    end
  end

  // framing
  always_ff @(posedge cl_clk or negedge rst_n) begin
    if (!rst_n) begin
      sof_pend  <= 1'b0;
      sol_pend  <= 1'b0;
      any_pix   <= 1'b0;
      xcnt      <= '0;
      ycnt      <= '0;
      geo_bad   <= 1'b0;
      tok_valid <= 1'b0;
      tok_o     <= '{kind: TOK_PIX, pix: '0};
      size_err  <= 1'b0;
      frame_cnt <= '0;
    end else begin
      tok_valid <= 1'b0;
      size_err  <= 1'b0;
      if (fval_q && !fval_d) begin
        sof_pend <= 1'b1;
        any_pix  <= 1'b0;
        ycnt     <= '0;
        geo_bad  <= 1'b0;
      end
      if (pix_v && sol_pend && !sof_now) begin
        // first pixel of a line: close the previous line's width check
        if (xcnt != XW'(W)) geo_bad <= 1'b1;
      end
      if (pix_v) begin
        tok_valid <= 1'b1;
        tok_o.pix <= pa_q;
        if (sof_now) begin
          tok_o.kind <= TOK_SOF;
          sof_pend   <= 1'b0;
          sol_pend   <= 1'b0;
          xcnt       <= XW'(1);
          ycnt       <= YW'(1);
        end else if (sol_pend) begin
          tok_o.kind <= TOK_SOL;
          sol_pend   <= 1'b0;
          xcnt       <= XW'(1);
          if (ycnt != YW'(H + 1)) ycnt <= ycnt + 1'b1;
        end else begin
          tok_o.kind <= TOK_PIX;
          if (xcnt != XW'(W + 1)) xcnt <= xcnt + 1'b1;
        end
        any_pix <= 1'b1;
      end
      // a new line starts with the first valid pixel after LVAL rises
      if (fval_q && !lval_q && !sof_now) sol_pend <= any_pix | sol_pend;
      if (!fval_q && fval_d) begin
        // end of frame
        sof_pend <= 1'b0;
        sol_pend <= 1'b0;
        if (any_pix) begin
          tok_valid  <= 1'b1;
          tok_o.kind <= TOK_EOF;
          tok_o.pix  <= '0;
          frame_cnt  <= frame_cnt + 1'b1;
          size_err   <= geo_bad | (xcnt != XW'(W)) | (ycnt != YW'(H));
        end
      end
    end
  end

endmodule
