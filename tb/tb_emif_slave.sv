// tb_emif_slave: plays the DSP's EMIF with setup 1 / strobe 1 / hold 0
// accesses (three ECLKOUT cycles each) and checks the FPGA side: the SRAM
// read request during setup and strobe, one rd_strobe per access, the data
// the DSP samples at the end of the strobe for frame words and for the four
// status registers, ED output enable, and that only writes to register 0
// reach the RS422 FIFO.
module tb_emif_slave;
  import img_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce2_n = 1, are_n = 1, aoe_n = 1, awe_n = 1;
  logic [EMIF_AW-1:0] ea = '0;
  logic [EMIF_DW-1:0] ed_i = '0, ed_o;
  logic ed_oe, rd_en, rd_strobe, tx_we;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;
  logic [7:0] tx_data;
  logic [8:0] status = 9'h1A5;
  logic [15:0] frames_in = 16'd1234, drop_cnt = 16'd56, swap_cnt = 16'd789;
  int checks = 0, failures = 0, strobes = 0, tx_writes = 0;
  logic [7:0] tx_last;

  always #5 clk = ~clk;

  emif_slave dut (.clk, .rst_n, .ce2_n, .are_n, .aoe_n, .awe_n, .ea, .ed_i, .ed_o, .ed_oe,
    .rd_en, .rd_addr, .rd_strobe, .rd_data, .tx_we, .tx_data,
    .status, .frames_in, .drop_cnt, .swap_cnt);

  function automatic logic [15:0] sram_word(input logic [SRAM_AW-1:0] a);
    return 16'(a * 16'd40503 + 16'd7);
  endfunction
  // the read SRAM as the ping-pong cache presents it
  assign rd_data = rd_en ? sram_word(rd_addr) : 16'hDEAD;

  always @(posedge clk) begin
    if (rd_strobe) strobes++;
    if (tx_we) begin tx_writes++; tx_last = tx_data; end
  end

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

  task automatic emif_read(input logic [EMIF_AW-1:0] a, output logic [15:0] d);
    @(negedge clk); ce2_n = 0; aoe_n = 0; ea = a;           #1; // setup
    check(rd_en == !a[EMIF_AW-1] && rd_addr == a[SRAM_AW-1:0] && !rd_strobe, "setup request");
    @(negedge clk); are_n = 0; #1;                          // strobe
    check(rd_strobe == !a[EMIF_AW-1] && ed_oe, "strobe");
    @(posedge clk); d = ed_o;                               // DSP samples at end of strobe
    @(negedge clk); ce2_n = 1; aoe_n = 1; are_n = 1; #1;    // third cycle
    check(!ed_oe && !rd_en, "released");
  endtask

  task automatic emif_write(input logic [EMIF_AW-1:0] a, input logic [15:0] d);
    @(negedge clk); ce2_n = 0; ea = a; ed_i = d;
    @(negedge clk); awe_n = 0; #1;
    check(!ed_oe, "no drive during write");
    @(negedge clk); ce2_n = 1; awe_n = 1;
  endtask

  initial begin
    logic [15:0] d;
    logic [EMIF_AW-1:0] a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      a = (i < 4) ? EMIF_AW'(i) : EMIF_AW'($urandom % (1 << SRAM_AW));
      emif_read(a, d);
      check(d == sram_word(a[SRAM_AW-1:0]), $sformatf("word %0h got %h", a, d));
    end
    check(strobes == 40, $sformatf("strobes %0d", strobes));
    a = '0; a[EMIF_AW-1] = 1'b1;
    emif_read(a | 0, d); check(d == 16'h01A5, $sformatf("status %h", d));
    emif_read(a | 1, d); check(d == 16'd1234, "frames_in");
    emif_read(a | 2, d); check(d == 16'd56, "drop_cnt");
    emif_read(a | 3, d); check(d == 16'd789, "swap_cnt");
    check(strobes == 40, "register reads are not frame reads");
    emif_write(a, 16'hBE3C);
    check(tx_writes == 1 && tx_last == 8'h3C, "RS422 byte write");
    emif_write(a | 1, 16'h0011);
    emif_write(EMIF_AW'(5), 16'h0022);
    check(tx_writes == 1, "other writes ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
