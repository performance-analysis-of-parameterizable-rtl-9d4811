// acc_lutram: accumulator memory of the polynomial multiplier.
//
// A distributed (LUT) RAM of DEPTH words of W bits with two asynchronous read
// ports and one synchronous write port, as the accumulator is described: two
// reads and one write per cycle, no block RAM. Each word carries a valid flag;
// `clear` drops every flag in one cycle and a word whose flag is down reads as
// zero. This flag-based clear is this design's own choice: it lets a new
// product start without a pass that writes zeros through the whole memory.
//
// Timing: reads are combinational from the address. A write (we) takes effect
// at the clock edge and sets the word's flag; `clear` at the same edge wins
// over nothing else but the flags it clears (a write in the same cycle is kept).
module acc_lutram #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 278,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [AW-1:0] raddr0,
  output logic [W-1:0]  rdata0,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0]     mem   [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (clear) valid <= '0;
      if (we) valid[waddr] <= 1'b1;
    end
  end

  assign rdata0 = (32'(raddr0) < DEPTH && valid[raddr0]) ? mem[raddr0] : '0;
  assign rdata1 = (32'(raddr1) < DEPTH && valid[raddr1]) ? mem[raddr1] : '0;

endmodule
