// xof_model: behavioural stand-in for the external SHAKE256 core.
// Not SHAKE256 and not cryptographic: it only gives the accelerator a
// deterministic extendable-output function with the same port behaviour, so
// that whole operations can be simulated. Absorbed words are folded into a
// 64-bit state with a SplitMix64-style mixer (domain byte and word count
// included); after xof_final the output is the mixer applied to the state
// and a counter. in_ready and out_valid drop at random when STALL is set.
module xof_model #(
  parameter bit STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        xof_init,
  input  logic [7:0]  xof_dom,
  input  logic        xof_in_valid,
  output logic        xof_in_ready,
  input  logic [31:0] xof_in_data,
  input  logic        xof_final,
  output logic        xof_out_valid,
  input  logic        xof_out_ready,
  output logic [31:0] xof_out_data
);
  function automatic logic [63:0] mix(input logic [63:0] z0);
    logic [63:0] z;
    z = z0 + 64'h9E3779B97F4A7C15;
    z = (z ^ (z >> 30)) * 64'hBF58476D1CE4E5B9;
    z = (z ^ (z >> 27)) * 64'h94D049BB133111EB;
    return z ^ (z >> 31);
  endfunction

  logic [63:0] state, ctr, nabs;
  logic        squeezing;
  logic        rdy, vld;

  always_ff @(negedge clk) begin
    rdy <= STALL ? (($urandom % 5) != 0) : 1'b1;
    vld <= STALL ? (($urandom % 5) != 0) : 1'b1;
  end

  assign xof_in_ready  = rdy && !squeezing;
  assign xof_out_valid = vld && squeezing;
  assign xof_out_data  = mix(state ^ mix(ctr))[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0; ctr <= '0; nabs <= '0; squeezing <= 1'b0;
    end else if (xof_init) begin
      state <= mix(64'(xof_dom) ^ 64'hC0DE_0000);
      nabs <= '0; ctr <= '0; squeezing <= 1'b0;
    end else if (xof_final) begin
      squeezing <= 1'b1;
      ctr <= '0;
      state <= mix(state ^ nabs);
    end else if (xof_in_valid && xof_in_ready) begin
      state <= mix(state ^ {nabs[31:0], xof_in_data});
      nabs <= nabs + 1;
    end else if (xof_out_valid && xof_out_ready) begin
      ctr <= ctr + 1;
    end
  end
endmodule
