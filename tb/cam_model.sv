// cam_model: behavioural Camera Link camera (after the LVDS deserializer),
// gray-scale on port A, for simulation only. send_frame(f, short_line) sends
// an H-line frame of W pixels per line with HBLANK idle clocks between lines
// and VBLANK after the frame; if short_line >= 0 that line lacks its last
// pixel. With gaps set, DVAL drops at random inside lines.
module cam_model #(
  parameter int W      = 16,
  parameter int H      = 8,
  parameter int HBLANK = 4,
  parameter int VBLANK = 8
) (
  input  logic       cl_clk,
  output logic       fval,
  output logic       lval,
  output logic       dval,
  output logic [7:0] port_a
);
  bit gaps = 1'b0;
  int frames_sent = 0;

  initial begin fval = 0; lval = 0; dval = 0; port_a = '0; end

  task automatic send_frame(input int f, input int short_line);
    @(negedge cl_clk); fval = 1;
    repeat (2) @(negedge cl_clk);
    for (int y = 0; y < H; y++) begin
      lval = 1;
      for (int x = 0; x < ((y == short_line) ? W - 1 : W); x++) begin
        while (gaps && ($urandom % 8) == 0) begin dval = 0; @(negedge cl_clk); end
        dval = 1; port_a = tb_pkg::pix(f, x, y);
        @(negedge cl_clk);
      end
      dval = 0; lval = 0;
      repeat (HBLANK) @(negedge cl_clk);
    end
    fval = 0;
    frames_sent++;
    repeat (VBLANK) @(negedge cl_clk);
  endtask
endmodule
