// tb_pingpong_ctrl: runs the ping-pong cache on 8 x 4 frames against two
// SRAM models. Tokens are fed from a queue standing for the camera FIFO; a
// DSP-like reader fetches each ready frame as 16-bit words with the EMIF's
// three-cycle accesses after the frame-ready interrupt. It checks the state
// sequence S0-S1-S2-S3-S2, channel_sel, every word read against the pixels
// sent, the interrupt width, that pixels beyond the line width are not
// written, that a frame arriving while both SRAMs are busy is dropped and
// counted, the swap stall, and that reset returns the machine to S0.
module tb_pingpong_ctrl;
  import img_pkg::*;
  localparam int W = 8, H = 4, WORDS = W * H / 2, INT_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tok_empty, tok_pop;
  pix_tok_t tok_i;
  logic rd_en = 0, rd_strobe = 0;
  logic [SRAM_AW-1:0] rd_addr = '0;
  logic [SRAM_DW-1:0] rd_data, s0_rd, s1_rd;
  sram_req_t s0, s1;
  logic ext_int, channel_sel, wr_full, rd_done;
  pp_state_e state;
  logic [15:0] frames_in, drop_cnt, stall_cnt;
  int checks = 0, failures = 0;

  pix_tok_t q [$];
  logic [7:0] img [0:7][0:W*H-1];
  int int_len = 0, int_rises = 0;
  logic int_d = 0;

  always #5 clk = ~clk;

  pingpong_ctrl #(.W(W), .H(H), .INT_W(INT_W)) dut (
    .clk, .rst_n, .tok_empty, .tok_i, .tok_pop,
    .rd_en, .rd_addr, .rd_strobe, .rd_data,
    .sram0_o(s0), .sram0_rdata(s0_rd), .sram1_o(s1), .sram1_rdata(s1_rd),
    .ext_int, .channel_sel, .state, .wr_full, .rd_done,
    .frames_in, .drop_cnt, .stall_cnt);

  sram_model #(.AW(6)) m0 (.clk, .req(s0), .rdata(s0_rd));
  sram_model #(.AW(6)) m1 (.clk, .req(s1), .rdata(s1_rd));

  // token source
  always_comb begin
    tok_empty = (q.size() == 0);
    tok_i     = tok_empty ? '{kind: TOK_PIX, pix: 8'h00} : q[0];
  end
  always @(posedge clk) if (tok_pop) void'(q.pop_front());

  // interrupt width
  always @(posedge clk) begin
    if (ext_int) int_len++;
    if (!ext_int && int_d) begin
      checks++;
      if (int_len != INT_W) begin failures++; $display("ext_int width %0d", int_len); end
      int_len = 0;
    end
    if (ext_int && !int_d) int_rises++;
    int_d <= ext_int;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // queue frame f; the last line carries two extra pixels past the line width
  task automatic push_frame(input int f);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W + ((y == H - 1) ? 2 : 0); x++) begin
        logic [7:0] p = 8'(f * 37 + y * 11 + x * 5 + 1);
        if (x < W) img[f][y*W+x] = p;
        q.push_back('{kind: (x != 0) ? TOK_PIX : (y == 0) ? TOK_SOF : TOK_SOL, pix: p});
      end
    q.push_back('{kind: TOK_EOF, pix: 8'h00});
  endtask

  task automatic wait_idle();
    while (q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  // read one frame the way the EMIF does: setup, strobe, idle
  task automatic dsp_read(input int f);
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = SRAM_AW'(a); rd_strobe = 0;
      @(negedge clk); rd_strobe = 1;
      check(rd_data == {img[f][2*a+1], img[f][2*a]},
            $sformatf("frame %0d word %0d got %h", f, a, rd_data));
      @(negedge clk); rd_en = 0; rd_strobe = 0;
    end
  endtask

  initial begin
    m0.mem[WORDS] = 16'hA5A5; m1.mem[WORDS] = 16'hA5A5;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == S0, "S0 after reset");
    push_frame(0);
    repeat (3) @(negedge clk);
    check(state == S1, "S1 while first frame written");
    check(rd_data == 0, "no read data in S1");
    wait_idle();
    check(state == S2 && channel_sel == 0, "S2 reading SRAM0");
    push_frame(1);
    wait_idle();
    check(wr_full && state == S2, "frame 1 held in SRAM1");
    push_frame(2);
    wait_idle();
    check(drop_cnt == 1, "frame 2 dropped");
    dsp_read(0);
    repeat (3) @(negedge clk);
    check(state == S3 && channel_sel == 1, "S3 reading SRAM1");
    fork
      dsp_read(1);
      push_frame(3);
    join
    wait_idle();
    repeat (3) @(negedge clk);
    check(state == S2 && channel_sel == 0, "back to S2");
    dsp_read(3);
    repeat (3) @(negedge clk);
    check(frames_in == 3, $sformatf("frames_in %0d", frames_in));
    check(stall_cnt == 2, $sformatf("swaps %0d", stall_cnt));
    check(int_rises == 3, $sformatf("interrupts %0d", int_rises));
    check(rd_done && !wr_full && state == S2, "waiting for next frame");
    check(m0.mem[WORDS] == 16'hA5A5 && m1.mem[WORDS] == 16'hA5A5, "pixels past the line width not written");
    rst_n = 0;
    @(negedge clk);
    check(state == S0 && !ext_int, "reset returns to S0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
