// tb_rs422_tx: feeds bytes to the RS422 transmitter from a first-word-fall-
// through queue and decodes txd as a receiver would, one sample per bit
// clock. It checks the idle level, the start and stop bits, the data bits
// (LSB first), ten bit clocks per character for back-to-back bytes, and
// that a byte arriving after an idle gap is also sent.
module tb_rs422_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fifo_empty, fifo_pop, txd, busy;
  logic [7:0] fifo_data;
  logic [7:0] q [$];
  logic [7:0] sent [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs422_tx dut (.bit_clk(clk), .rst_n, .fifo_empty, .fifo_data, .fifo_pop, .txd, .busy);

  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_data  = fifo_empty ? 8'h00 : q[0];
  end
  always @(posedge clk) if (fifo_pop) void'(q.pop_front());

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // receiver: samples txd once per bit clock
  initial begin
    int t_start, t_prev;
    t_prev = -1;
    @(posedge rst_n);
    forever begin
      logic [7:0] b;
      @(negedge clk);
      if (txd == 1'b0) begin
        t_start = $time;
        if (t_prev >= 0 && sent.size() < 4)
          check(t_start - t_prev == 100, $sformatf("character spacing %0d", t_start - t_prev));
        t_prev = t_start;
        for (int i = 0; i < 8; i++) begin @(negedge clk); b[i] = txd; end
        @(negedge clk);
        check(txd == 1'b1, "stop bit");
        sent.push_back(b);
      end
    end
  end

  initial begin
    logic [7:0] exp [$];
    repeat (3) @(negedge clk);
    check(txd == 1'b1 && !busy, "idle high in reset");
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(txd == 1'b1, "idle high");
    for (int i = 0; i < 5; i++) begin logic [7:0] b; b = 8'($urandom); q.push_back(b); exp.push_back(b); end
    repeat (60) @(negedge clk);
    check(!busy && txd == 1'b1, "idle after burst");
    q.push_back(8'h81); exp.push_back(8'h81);
    repeat (20) @(negedge clk);
    check(sent.size() == exp.size(), $sformatf("sent %0d of %0d", sent.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < sent.size(); i++)
      check(sent[i] == exp[i], $sformatf("byte %0d %h exp %h", i, sent[i], exp[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
