// tb_img_fpga_top: end-to-end test of the FPGA at a reduced frame size
// (16 x 8) with the camera, the DSP and the far end of the RS422 line
// modelled. The camera sends frames on its own clock, with DVAL gaps; the DSP
// model reads every frame the ping-pong cache offers and checks every pixel,
// then sends two bytes per frame back over the RS422 link. The test then
//  - streams frames 1-4 with a fast DSP (both SRAMs alternate, S2<->S3),
//  - makes the DSP slow so that frame 7 finds both SRAMs full and is dropped,
//  - sends a frame with a short line and reads the size error in status,
//  - reads the frame, drop and swap counters over the EMIF,
//  - resets in the middle of a frame and checks the restart from S0,
//  - overfills the RS422 FIFO and reads tx_full and tx_ovf in status.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_img_fpga_top;
  import img_pkg::*;
  localparam int W = 16, H = 8, WORDS = W * H / 2, DIV = 8;

  logic rst_n = 1'b0, cl_clk = 1'b0, eclk = 1'b0;
  logic fval, lval, dval;
  logic [7:0] port_a;
  logic ce2_n, are_n, aoe_n, awe_n, ed_oe, ext_int4, rs422_txd, channel_sel;
  logic [19:0] ea;
  logic [15:0] ed_i, ed_o, s0_rd, s1_rd;
  sram_req_t s0, s1;
  int checks = 0, failures = 0;

  always #3 eclk   = ~eclk;
  always #5 cl_clk = ~cl_clk;

  img_fpga_top #(.W(W), .H(H), .CAM_DEPTH(16), .TX_DEPTH(16), .BAUD_DIV(DIV), .INT_W(4)) dut (
    .rst_n, .cl_clk, .fval, .lval, .dval, .port_a,
    .eclk, .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe, .ext_int4,
    .sram0_o(s0), .sram0_rdata(s0_rd), .sram1_o(s1), .sram1_rdata(s1_rd),
    .rs422_txd, .channel_sel);

  sram_model #(.AW(7)) m0 (.clk(eclk), .req(s0), .rdata(s0_rd));
  sram_model #(.AW(7)) m1 (.clk(eclk), .req(s1), .rdata(s1_rd));
  cam_model #(.W(W), .H(H)) cam (.cl_clk, .fval, .lval, .dval, .port_a);
  dsp_model #(.W(W), .H(H)) dsp (.eclk, .ext_int4, .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe);
  rs422_rx_model #(.DIV(DIV)) far (.clk(eclk), .txd(rs422_txd));

  // mechanism counters
  int n_to_s3 = 0, n_to_s2 = 0, n_irq = 0, n_drop = 0, n_stall = 0, n_size_err = 0;
  int n_reset_s0 = 0, n_dval_gap = 0, n_bytes = 0, n_tx_full = 0;
  pp_state_e st_d = S0;
  logic irq_d = 0;
  always @(posedge eclk) begin
    if (dut.u_pp.state == S3 && st_d == S2) n_to_s3++;
    if (dut.u_pp.state == S2 && st_d == S3) n_to_s2++;
    if (ext_int4 && !irq_d) n_irq++;
    if (dut.u_pp.swap) n_stall++;
    st_d  <= dut.u_pp.state;
    irq_d <= ext_int4;
  end
  always @(posedge cl_clk) begin
    if (dut.u_cl.size_err) n_size_err++;
    if (fval && lval && !dval) n_dval_gap++;
  end

  initial begin
    #4000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  task automatic wait_dsp_idle();
    repeat (200) @(posedge eclk);
    wait (!dsp.busy && dsp.pending == 0);
    repeat (20) @(posedge eclk);
  endtask

  initial begin
    logic [15:0] r;
    int exp_ids [$];
    repeat (5) @(posedge eclk);
    rst_n = 1'b1;
    repeat (5) @(posedge eclk);
    check(dut.u_pp.state == S0, "idle after reset");

    // 1. continuous operation
    cam.gaps = 1'b1;
    for (int f = 1; f <= 4; f++) cam.send_frame(f, -1);
    wait_dsp_idle();
    exp_ids = '{1, 2, 3, 4};
    check(dsp.ids == exp_ids, $sformatf("frames read %p", dsp.ids));
    check(dsp.last_xfer_cycles == 3 * WORDS,
          $sformatf("frame transfer took %0d cycles", dsp.last_xfer_cycles));

    // 2. slow DSP: frame 7 arrives with both SRAMs holding unread frames
    dsp.hold_off = 3000;
    for (int f = 5; f <= 7; f++) cam.send_frame(f, -1);
    wait_dsp_idle();
    wait_dsp_idle();
    dsp.hold_off = 0;
    exp_ids = '{1, 2, 3, 4, 5, 6};
    check(dsp.ids == exp_ids, $sformatf("frames read %p", dsp.ids));

    // 3. a frame with a short line
    cam.send_frame(201, 3);
    wait_dsp_idle();
    dsp.read_reg(0, r);
    check(r[5] == 1'b1, $sformatf("size error in status %h", r));
    check(r[2:1] == 2'(dut.u_pp.state) && r[0] == channel_sel, "state in status");
    dsp.read_reg(1, r); check(r == 16'd7, $sformatf("frames_in %0d", r));
    dsp.read_reg(2, r); check(r == 16'd1, $sformatf("drop_cnt %0d", r));
    n_drop = r;
    dsp.read_reg(3, r); check(r == 16'(n_stall), $sformatf("swap_cnt %0d vs %0d", r, n_stall));

    // 4. RS422: two bytes per frame read
    repeat (30 * DIV * 10) @(posedge eclk);
    n_bytes = far.rx.size();
    check(far.rx == dsp.tx_bytes, $sformatf("RS422 bytes %0d of %0d", far.rx.size(), dsp.tx_bytes.size()));
    check(far.framing_errors == 0, "RS422 framing");

    // 5. reset in the middle of a frame, then carry on
    fork
      cam.send_frame(8, -1);
      begin
        repeat (300) @(posedge eclk);
        rst_n = 1'b0;
        repeat (3) @(posedge eclk);
        if (dut.u_pp.state == S0) n_reset_s0++;
        rst_n = 1'b1;
      end
    join
    cam.send_frame(9, -1);
    cam.send_frame(10, -1);
    wait_dsp_idle();
    check(dsp.ids[dsp.ids.size()-2] == 9 && dsp.ids[dsp.ids.size()-1] == 10,
          $sformatf("after reset read %p", dsp.ids));

    // 6. the DSP writes a burst longer than the RS422 FIFO
    for (int i = 0; i < 20; i++) dsp.wr(20'h80000, 16'(i));
    dsp.read_reg(0, r);
    if (r[8]) n_tx_full++;
    check(r[8] && r[6], $sformatf("RS422 FIFO full and overflow in status %h", r));

    check(dsp.pixel_errors == 0, $sformatf("%0d pixel errors", dsp.pixel_errors));
    check(dsp.oe_errors == 0, "ED driven during reads");
    $display("mechanisms: to_S3=%0d to_S2=%0d irq=%0d drop=%0d swap_stall=%0d size_err=%0d dval_gap=%0d rs422_bytes=%0d reset_S0=%0d tx_full=%0d",
             n_to_s3, n_to_s2, n_irq, n_drop, n_stall, n_size_err, n_dval_gap, n_bytes, n_reset_s0, n_tx_full);
    check(n_to_s3 > 0, "S2->S3 swap happened");
    check(n_to_s2 > 0, "S3->S2 swap happened");
    check(n_irq > 0, "interrupt happened");
    check(n_drop > 0, "frame drop happened");
    check(n_stall > 0, "swap stall happened");
    check(n_size_err > 0, "size error happened");
    check(n_dval_gap > 0, "DVAL gap happened");
    check(n_bytes > 0, "RS422 transfer happened");
    check(n_reset_s0 > 0, "reset to S0 happened");
    check(n_tx_full > 0, "RS422 FIFO full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
