// dsp_model: behavioural stand-in for the DSP side of the system, for
// simulation only. On each rising edge of ext_int4, latched as an
// interrupt flag (after hold_off ECLKOUT
// cycles) its "EDMA" reads the whole frame out of CE2 with setup 1 / strobe 1
// / hold 0 accesses, three cycles per 16-bit word, and checks every pixel
// against tb_pkg::pix for the frame number found in pixel (0,0); frames with
// a number of 200 or more are not checked. It records the frame numbers read
// and the cycles each transfer took. It then "compresses" the frame, taking
// compress_cycles cycles, into two
// bytes, the frame number and the byte-wise sum of its pixels, and writes
// them to the RS422 FIFO register. read_reg() reads a status register.
module dsp_model #(
  parameter int W = 16,
  parameter int H = 8
) (
  input  logic        eclk,
  input  logic        ext_int4,
  output logic        ce2_n,
  output logic        are_n,
  output logic        aoe_n,
  output logic        awe_n,
  output logic [19:0] ea,
  output logic [15:0] ed_i,
  input  logic [15:0] ed_o,
  input  logic        ed_oe
);
  localparam int WORDS = W * H / 2;

  int hold_off = 0;
  int compress_cycles = 0;
  int frames_read = 0, pixel_errors = 0, oe_errors = 0;
  int last_xfer_cycles = 0;
  int ids [$];
  logic [7:0] tx_bytes [$];
  bit busy = 0;
  realtime eclk_period = 1;   // measured ECLKOUT period

  initial begin ce2_n = 1; are_n = 1; aoe_n = 1; awe_n = 1; ea = '0; ed_i = '0; end

  task automatic rd(input logic [19:0] a, output logic [15:0] d);
    @(negedge eclk); ce2_n = 0; aoe_n = 0; ea = a;
    @(negedge eclk); are_n = 0;
    @(posedge eclk); d = ed_o;
    if (!ed_oe) oe_errors++;
    @(negedge eclk); ce2_n = 1; aoe_n = 1; are_n = 1;
  endtask

  task automatic wr(input logic [19:0] a, input logic [15:0] d);
    @(negedge eclk); ce2_n = 0; ea = a; ed_i = d;
    @(negedge eclk); awe_n = 0;
    @(negedge eclk); ce2_n = 1; awe_n = 1;
  endtask

  task automatic read_reg(input int idx, output logic [15:0] d);
    wait (!busy);
    rd(20'h80000 | 20'(idx), d);
  endtask

  // interrupts are latched, as the DSP's interrupt flag register does
  int pending = 0;
  always @(posedge ext_int4) pending++;

  always begin
    logic [15:0] d;
    int f, t0;
    logic [7:0] sum, v;
    int p;
    wait (pending > 0);
    pending--;
    busy = 1;
    repeat (hold_off) @(posedge eclk);
    t0 = $time;
    sum = '0;
    f = -1;
    for (int a = 0; a < WORDS; a++) begin
      rd(20'(a), d);
      if (a == 0) f = int'(d[7:0]);
      for (int b = 0; b < 2; b++) begin
        p = 2 * a + b;
        v = b ? d[15:8] : d[7:0];
        sum += v;
        if (f < 200 && v != tb_pkg::pix(f, p % W, p / W)) begin
          if (pixel_errors < 5) $display("dsp_model: frame %0d pixel %0d got %h", f, p, v);
          pixel_errors++;
        end
      end
    end
    @(posedge eclk);
    last_xfer_cycles = int'(($time - t0) / eclk_period);
    ids.push_back(f);
    frames_read++;
    repeat (compress_cycles) @(posedge eclk);
    wr(20'h80000, 16'(f));
    wr(20'h80000, 16'(sum));
    tx_bytes.push_back(8'(f));
    tx_bytes.push_back(sum);
    busy = 0;
  end

  initial begin
    realtime t1;
    @(posedge eclk); t1 = $realtime;
    @(posedge eclk); eclk_period = $realtime - t1;
  end
endmodule
