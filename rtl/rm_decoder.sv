// rm_decoder: decoder of the duplicated first-order Reed-Muller code RM(1,7).
//
// One Reed-Solomon symbol is carried by MULT copies of a 128-bit RM(1,7)
// codeword. The decoder adds the copies as +1/-1 values (bit 0 -> +1,
// bit 1 -> -1) into 128 signed sums, applies a fast Hadamard transform
// (seven butterfly stages, one stage per cycle, in place), and picks the
// entry with the largest magnitude: its index gives message bits 6:0 and its
// sign bit 7 (negative -> 1). This is maximum-likelihood decoding for the
// encoding of rm_encoder.
// Interface: 128-bit pieces on a valid/ready stream; after the MULT-th piece
// the decoder stops accepting input for 8 cycles (7 transform stages, 1 peak
// search) and then pulses out_valid with the decoded byte.
// Timing: MULT + 8 cycles per symbol when input is always available.
// The source design names this decoding step only; the transform-based
// method, its schedule and the interface are this design's choices.
module rm_decoder #(
  parameter int unsigned MULT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] in_data,
  output logic         out_valid,
  output logic [7:0]   out_byte
);
  localparam int unsigned SW = $clog2(MULT * 128 + 1) + 2;   // signed width

  typedef enum logic [1:0] {S_ACC, S_FHT, S_PEAK} state_e;
  state_e state;

  logic signed [SW-1:0] f [128];
  logic [$clog2(MULT+1)-1:0] ccnt;
  logic [2:0]           stage;

  logic [6:0]           best_idx;
  logic signed [SW-1:0] best_val;
  logic [SW-1:0]        best_abs, cur_abs;

  assign in_ready = (state == S_ACC);

  // peak search over the transformed vector (first maximum wins)
  always_comb begin
    best_idx = '0;
    best_val = f[0];
    best_abs = (f[0] < 0) ? SW'(-f[0]) : SW'(f[0]);
    for (int i = 1; i < 128; i++) begin
      cur_abs = (f[i] < 0) ? SW'(-f[i]) : SW'(f[i]);
      if (cur_abs > best_abs) begin
        best_abs = cur_abs;
        best_val = f[i];
        best_idx = 7'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_ACC;
      ccnt      <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      for (int i = 0; i < 128; i++) f[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_ACC: if (in_valid) begin
          for (int i = 0; i < 128; i++)
            f[i] <= ((ccnt == 0) ? SW'(0) : f[i]) + (in_data[i] ? -SW'(1) : SW'(1));
          if (32'(ccnt) == MULT - 1) begin
            ccnt  <= '0;
            stage <= '0;
            state <= S_FHT;
          end else begin
            ccnt <= ccnt + 1'b1;
          end
        end
        S_FHT: begin
          for (int i = 0; i < 128; i++) begin
            if ((i & (1 << stage)) == 0) begin
              f[i]                <= f[i] + f[i + (1 << stage)];
              f[i + (1 << stage)] <= f[i] - f[i + (1 << stage)];
            end
          end
          stage <= stage + 1'b1;
          if (stage == 3'd6) state <= S_PEAK;
        end
        S_PEAK: begin
          out_valid <= 1'b1;
          out_byte  <= {best_val < 0, best_idx};
          state     <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end

endmodule
