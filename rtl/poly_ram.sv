// poly_ram: polynomial memory of the accelerator (h, s, u, v and a scratch
// copy), DEPTH words of W bits.
//
// Two asynchronous read ports and one synchronous write port. The multiplier
// needs two adjacent words of its dense operand per cycle (its A and B
// operand registers), which the two read ports supply. The source design
// calls this the external RAM and does not give its organisation; the port
// structure here is this design's choice.
// Timing: reads are combinational; a write takes effect at the clock edge.
module poly_ram #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 139,
  parameter int unsigned AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr0,
  output logic [W-1:0]  rdata0,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata0 = (32'(raddr0) < DEPTH) ? mem[raddr0] : '0;
  assign rdata1 = (32'(raddr1) < DEPTH) ? mem[raddr1] : '0;

endmodule
