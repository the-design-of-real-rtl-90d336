// tb_cl_receiver: drives Camera Link FVAL/LVAL/DVAL/port A like a camera,
// with line and frame blanking and random DVAL gaps, and compares the token
// stream against the tokens the frames should produce (SOF, SOL, PIX, EOF).
// It checks the pixel-to-token latency of two clocks, the frame counter, and
// that size_err flags a frame with a short line and a frame with a missing
// line but not a correct one.
module tb_cl_receiver;
  import img_pkg::*;
  localparam int W = 8, H = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fval = 0, lval = 0, dval = 0;
  logic [7:0] port_a = '0;
  pix_tok_t tok;
  logic tok_valid, size_err;
  logic [15:0] frame_cnt;
  int checks = 0, failures = 0;
  pix_tok_t exp_q [$];
  logic exp_err [$];
  int cyc = 0, first_drive = -1, first_tok = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  cl_receiver #(.W(W), .H(H)) dut (.cl_clk(clk), .rst_n, .fval, .lval, .dval, .port_a,
    .tok_o(tok), .tok_valid, .size_err, .frame_cnt);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(negedge clk) if (rst_n && tok_valid) begin
    pix_tok_t e;
    if (first_tok < 0) first_tok = cyc;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected token %p", tok); end
    else begin
      e = exp_q.pop_front();
      if (tok != e) begin failures++; $display("token %p exp %p", tok, e); end
      if (tok.kind == TOK_EOF) begin
        logic ee;
        ee = exp_err.pop_front();
        checks++;
        if (size_err !== ee) begin failures++; $display("size_err %b exp %b", size_err, ee); end
      end
    end
  end

  task automatic send_frame(input int lines, input int short_line);
    @(negedge clk); fval = 1;
    repeat (2) @(negedge clk);
    for (int y = 0; y < lines; y++) begin
      int w = (y == short_line) ? W - 1 : W;
      lval = 1;
      for (int x = 0; x < w; x++) begin
        while (($urandom % 4) == 0) begin dval = 0; port_a = 8'($urandom); @(negedge clk); end
        dval = 1; port_a = 8'($urandom);
        if (first_drive < 0) first_drive = cyc;
        exp_q.push_back('{kind: (x != 0) ? TOK_PIX : (y == 0) ? TOK_SOF : TOK_SOL, pix: port_a});
        @(negedge clk);
      end
      dval = 0; lval = 0;
      repeat (3) @(negedge clk);
    end
    fval = 0;
    exp_q.push_back('{kind: TOK_EOF, pix: '0});
    exp_err.push_back(lines != H || short_line >= 0);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    send_frame(H, -1);
    send_frame(H, 2);
    send_frame(H - 1, -1);
    send_frame(H, -1);
    repeat (5) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0)    begin failures++; $display("%0d tokens missing", exp_q.size()); end
    if (frame_cnt != 16'd4)   begin failures++; $display("frame_cnt %0d", frame_cnt); end
    if (first_tok - first_drive != 2) begin failures++; $display("latency %0d", first_tok - first_drive); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
