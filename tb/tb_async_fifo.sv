// tb_async_fifo: dual-clock FIFO test with unrelated write and read clocks.
// Phase 1 fills the FIFO with the reader stopped and checks that wfull rises
// after exactly DEPTH words, that a further push sets overflow and is lost,
// and that the DEPTH words drain in order. Phase 2 pushes and pops at random
// on both clocks and compares every word against a reference queue.
module tb_async_fifo;
  localparam int DEPTH = 8;
  localparam int WIDTH = 10;

  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic winc = 1'b0, rinc = 1'b0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic wfull, rempty, overflow;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  bit writer_done = 0;
  int n_wr = 0, n_rd = 0;

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .winc, .wdata, .wfull, .overflow,
    .rclk, .rrst_n(rst_n), .rinc, .rdata, .rempty);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pop_check();
    logic [WIDTH-1:0] exp;
    @(negedge rclk);
    while (rempty) @(negedge rclk);
    exp = model.pop_front();
    checks++;
    if (rdata !== exp) begin failures++; $display("rdata %h exp %h", rdata, exp); end
    rinc = 1'b1;
    @(negedge rclk);
    rinc = 1'b0;
  endtask

  initial begin
    int pushed;
    #33 rst_n = 1'b1;
    checks++;
    if (!rempty || wfull) begin failures++; $display("flags after reset"); end
    // phase 1: fill
    pushed = 0;
    @(negedge wclk);
    while (!wfull && pushed < DEPTH + 4) begin
      wdata = WIDTH'($urandom); winc = 1'b1; model.push_back(wdata); pushed++;
      @(negedge wclk);
    end
    winc = 1'b0;
    checks++;
    if (pushed != DEPTH) begin failures++; $display("wfull after %0d pushes", pushed); end
    checks++;
    if (overflow) begin failures++; $display("overflow set too early"); end
    wdata = '1; winc = 1'b1; @(negedge wclk); winc = 1'b0;
    checks++;
    if (!overflow) begin failures++; $display("overflow not set"); end
    for (int i = 0; i < DEPTH; i++) pop_check();
    repeat (6) @(negedge rclk);
    checks++;
    if (!rempty) begin failures++; $display("not empty after drain"); end
    // phase 2: random traffic
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge wclk);
          winc = 1'b0;
          if (($urandom % 3) != 0 && !wfull) begin
            wdata = WIDTH'($urandom); winc = 1'b1; model.push_back(wdata);
          end
        end
        @(negedge wclk); winc = 1'b0;
        writer_done = 1;
      end
      begin
        while (!(writer_done && model.size() == 0)) begin
          @(negedge rclk);
          rinc = 1'b0;
          if (!rempty && ($urandom % 2) == 0) begin
            checks++;
            if (model.size() == 0) begin failures++; $display("data with empty model"); end
            else if (rdata !== model[0]) begin failures++; $display("rdata %h exp %h", rdata, model[0]); end
            void'(model.pop_front());
            rinc = 1'b1;
          end
        end
        @(negedge rclk); rinc = 1'b0;
      end
    join
    repeat (6) @(negedge rclk);
    checks++;
    if (!rempty) begin failures++; $display("not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
