// tb_clk_div: measures the divided clock's period and duty cycle for an even
// small ratio and for the default ratio, and checks that tick is high exactly
// on the input cycle before each rising edge of the divided clock.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic co6, t6, cod, td;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_div #(.DIV(6)) dut6 (.clk_in(clk), .rst_n, .clk_out(co6), .tick(t6));
  clk_div            dutd (.clk_in(clk), .rst_n, .clk_out(cod), .tick(td));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int div, ref logic co, ref logic t, input int periods);
    int hi, lo, ticks, rises;
    logic prev_co, prev_t;
    hi = 0; lo = 0; ticks = 0; rises = 0;
    prev_co = co; prev_t = 0;
    // align to a rising edge
    while (!(co && !prev_co)) begin prev_co = co; prev_t = t; @(posedge clk); #1; end
    for (int c = 0; c < div * periods; c++) begin
      prev_co = co; prev_t = t;
      @(posedge clk); #1;
      if (co) hi++; else lo++;
      if (prev_t) ticks++;
      if (co && !prev_co) begin
        rises++;
        checks++;
        if (!prev_t) begin failures++; $display("DIV=%0d rising edge without tick", div); end
      end
    end
    checks += 3;
    if (hi != lo)        begin failures++; $display("DIV=%0d duty %0d/%0d", div, hi, lo); end
    if (rises != periods) begin failures++; $display("DIV=%0d rises %0d exp %0d", div, rises, periods); end
    if (ticks != periods) begin failures++; $display("DIV=%0d ticks %0d exp %0d", div, ticks, periods); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (co6 !== 1'b0 || cod !== 1'b0) begin failures++; $display("clk_out not low in reset"); end
    rst_n = 1'b1;
    // first rising edge DIV/2 cycles after reset release
    begin
      int n = 0;
      @(posedge clk); #1; n = 1;
      while (!co6) begin @(posedge clk); #1; n++; end
      if (n != 3) begin failures++; $display("first edge after %0d cycles", n); end
    end
    measure(6, co6, t6, 10);
    measure(1302, cod, td, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
