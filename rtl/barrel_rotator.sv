// barrel_rotator: two-stage pipelined barrel shifter of the polynomial multiplier.
//
// The input is the 2W-bit concatenation {A, B} of two adjacent W-bit words of
// the dense operand and a shift amount S of k = log2(W) bits. The shift is
// split into a coarse part S_hi = S[k-1:L] and a fine part S_lo = S[L-1:0],
// L = ceil(k/2). Stage 1 shifts the 2W-bit vector left by S_hi * 2^L and
// stores it, together with S_lo, in the pipeline register. Stage 2 shifts the
// stored vector left by S_lo and keeps the upper W bits. This split, and the
// result being the upper half of the shifted double word, follow the
// two-stage rotation the design is built around.
//
// Timing: in_valid/din/shift are sampled at a clock edge into the pipeline
// register; the combinational stage-2 result `dout` is valid in the next
// cycle together with `out_valid` (one register of latency; the operand
// registers A/B belong to the caller). The design's own choice is that stage 2
// is not registered here: its result goes straight to the accumulator's XOR
// and write port, whose write is the next register.
// Lint note: only the upper W bits of the 2W-bit fine-shift result are the
// output, so its lower half is intentionally unread.
module barrel_rotator #(
  parameter int unsigned W = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2*W-1:0]       din,       // {A (upper), B (lower)}
  input  logic [$clog2(W)-1:0] shift,
  output logic                 out_valid,
  output logic [W-1:0]         dout
);
  localparam int unsigned K = $clog2(W);
  localparam int unsigned L = (K + 1) / 2;
  localparam int unsigned R = 1 << L;

  logic [2*W-1:0] mid_q;
  logic [L-1:0]   fine_q;
  logic           valid_q;
  logic [K-L-1:0] s_hi;
  logic [L-1:0]   s_lo;
  logic [2*W-1:0] fine_shifted;

  assign s_hi = shift[K-1:L];
  assign s_lo = shift[L-1:0];

  // Stage 1: coarse shift by multiples of R, captured in the pipeline register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_q   <= '0;
      fine_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) begin
        mid_q  <= din << (s_hi * R);
        fine_q <= s_lo;
      end
    end
  end

  // Stage 2: fine shift and truncation to the upper W bits.
  assign fine_shifted = mid_q << fine_q;
  assign dout         = fine_shifted[2*W-1:W];
  assign out_valid    = valid_q;

endmodule
