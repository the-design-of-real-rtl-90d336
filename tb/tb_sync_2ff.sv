// tb_sync_2ff: checks the synchronizer's reset value and that its output is
// its input delayed by exactly STAGES clock edges, for two and three stages.
module tb_sync_2ff;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q2, q3;
  int checks = 0, failures = 0;
  logic hist [0:7];

  always #5 clk = ~clk;

  sync_2ff                            dut2 (.clk, .rst_n, .d, .q(q2));
  sync_2ff #(.STAGES(3), .RST_VAL(1)) dut3 (.clk, .rst_n, .d, .q(q3));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (q2 !== 1'b0) begin failures++; $display("reset value q2=%b", q2); end
    if (q3 !== 1'b1) begin failures++; $display("reset value q3=%b", q3); end
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) hist[i] = 1'b1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      // hist[k] is the value d had k edges ago (before the coming edge)
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      @(posedge clk); #1;
      if (n >= 3) begin
        checks += 2;
        if (q2 !== hist[1]) begin failures++; $display("n=%0d q2=%b exp %b", n, q2, hist[1]); end
        if (q3 !== hist[2]) begin failures++; $display("n=%0d q3=%b exp %b", n, q3, hist[2]); end
      end
      d = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
