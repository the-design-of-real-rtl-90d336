// tb_img_fpga_full: the FPGA at its default parameters (600 x 480 frames,
// RS422 at ECLKOUT/1302) taking three frames at 100 frames/s.
// ECLKOUT is 150 MHz (one time unit = 1/3 ns, period 20 units); the camera
// clock is 39.5 MHz (76 units) with 40 clocks of line blanking and vertical
// blanking chosen so that one frame takes 10 ms. The DSP model reads each
// frame as soon as it is ready and then spends 4 ms compressing it. The test
// checks every pixel of the three frames, that each EMIF transfer takes
// exactly three cycles per 16-bit word (2.88 ms per frame), that the frame-
// ready interrupts come 10 ms apart (to within one camera clock) with no frame dropped, and the bytes
// that arrive over RS422.
module tb_img_fpga_full;
  import img_pkg::*;
  localparam int WORDS   = IMG_W * IMG_H / 2;
  localparam int HBLANK  = 40;
  localparam int VBLANK  = 394737 - 3 - IMG_H * (IMG_W + HBLANK);
  localparam int FRAME_T = 20 * 1500000;   // 10 ms in time units

  logic rst_n = 1'b0, cl_clk = 1'b0, eclk = 1'b0;
  logic fval, lval, dval;
  logic [7:0] port_a;
  logic ce2_n, are_n, aoe_n, awe_n, ed_oe, ext_int4, rs422_txd, channel_sel;
  logic [19:0] ea;
  logic [15:0] ed_i, ed_o, s0_rd, s1_rd;
  sram_req_t s0, s1;
  int checks = 0, failures = 0;
  longint irq_t [$];

  always #10 eclk   = ~eclk;
  always #38 cl_clk = ~cl_clk;

  img_fpga_top dut (
    .rst_n, .cl_clk, .fval, .lval, .dval, .port_a,
    .eclk, .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe, .ext_int4,
    .sram0_o(s0), .sram0_rdata(s0_rd), .sram1_o(s1), .sram1_rdata(s1_rd),
    .rs422_txd, .channel_sel);

  sram_model m0 (.clk(eclk), .req(s0), .rdata(s0_rd));
  sram_model m1 (.clk(eclk), .req(s1), .rdata(s1_rd));
  cam_model #(.W(IMG_W), .H(IMG_H), .HBLANK(HBLANK), .VBLANK(VBLANK)) cam (
    .cl_clk, .fval, .lval, .dval, .port_a);
  dsp_model #(.W(IMG_W), .H(IMG_H)) dsp (
    .eclk, .ext_int4, .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe);
  rs422_rx_model #(.DIV(1302)) far (.clk(eclk), .txd(rs422_txd));

  always @(posedge ext_int4) irq_t.push_back($time);

  initial begin
    #(FRAME_T * 6);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    int exp_ids [$];
    dsp.compress_cycles = 600000;   // 4 ms at 150 MHz
    repeat (5) @(posedge eclk);
    rst_n = 1'b1;
    repeat (5) @(posedge eclk);
    for (int f = 1; f <= 3; f++) cam.send_frame(f, -1);
    repeat (200) @(posedge eclk);
    wait (!dsp.busy && dsp.pending == 0);
    repeat (30000) @(posedge eclk);
    exp_ids = '{1, 2, 3};
    check(dsp.ids == exp_ids, $sformatf("frames read %p", dsp.ids));
    check(dsp.pixel_errors == 0, $sformatf("%0d pixel errors", dsp.pixel_errors));
    check(dsp.last_xfer_cycles == 3 * WORDS, $sformatf("transfer %0d cycles", dsp.last_xfer_cycles));
    check(irq_t.size() == 3, $sformatf("%0d interrupts", irq_t.size()));
    for (int i = 1; i < irq_t.size(); i++)
      check(irq_t[i] - irq_t[i-1] >= FRAME_T - 100 && irq_t[i] - irq_t[i-1] <= FRAME_T + 100,
            $sformatf("interrupt interval %0d units", irq_t[i] - irq_t[i-1]));
    check(dut.u_pp.drop_cnt == 0, "no frame dropped at 100 frames/s");
    check(far.rx == dsp.tx_bytes, $sformatf("RS422 bytes %0d of %0d", far.rx.size(), dsp.tx_bytes.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
