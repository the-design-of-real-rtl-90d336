// sram_model: behavioural model of one external asynchronous SRAM chip
// (2^AW words of 16 bits with upper/lower byte lanes), for simulation only.
// Reads are combinational: while CE and OE are low, rdata shows the addressed
// word (the chip's access time is taken as shorter than a clock period);
// otherwise rdata is zero. A write is taken at the rising edge of clk that
// ends a cycle in which CE and WE are low, into the byte lanes whose UB/LB
// are low, standing for the rising edge of the one-cycle WE pulse.
module sram_model
  import img_pkg::*;
#(
  parameter int unsigned AW = SRAM_AW
) (
  input  logic               clk,
  input  sram_req_t          req,
  output logic [SRAM_DW-1:0] rdata
);
  logic [SRAM_DW-1:0] mem [2**AW];

  always @(posedge clk) begin
    if (!req.ce_n && !req.we_n) begin
      if (!req.lb_n) mem[req.addr[AW-1:0]][7:0]  <= req.wdata[7:0];
      if (!req.ub_n) mem[req.addr[AW-1:0]][15:8] <= req.wdata[15:8];
    end
  end

  assign rdata = (!req.ce_n && !req.oe_n) ? mem[req.addr[AW-1:0]] : '0;
endmodule
