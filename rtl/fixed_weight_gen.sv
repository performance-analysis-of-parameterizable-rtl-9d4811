// fixed_weight_gen: constant-weight word generator (sampling of x, y, r1, r2, e).
//
// Produces `weight` distinct bit positions in [0, N) from 32-bit random words
// with the constant-weight-word method of the HQC specification:
//   1. for i = 0..weight-1:  pos[i] = i + floor(rnd[i] * (N - i) / 2^32)
//   2. for i = weight-1..0:  if pos[i] equals a later pos, pos[i] = i
// Step 2 is done in one pass over the list with a bitmap of N bits kept in a
// memory of 32-bit words: an address decoder splits a position into word
// address pos/32 and bit pos%32, the bitmap is read, the position (or i, when
// it is a duplicate) is emitted and its bit set. A replacement value i can
// never collide with a later entry, because every later entry is >= its own
// index > i; it is still marked so that earlier entries see it. Step 3 clears
// the words that were touched, so the bitmap is all zero for the next run; a
// one-time pass after reset zeroes it at first.
//
// Interface: `start` with `weight` (held constant), random words on a
// valid/ready stream (rnd_*), and the result as writes out_we/out_idx/out_pos
// into the caller's position list, one per cycle during step 2, in
// descending index order. `done` pulses at the end.
// Timing: weight cycles of step 1 when the random stream never stalls, then
// weight cycles of step 2 and weight cycles of step 3: 3*weight + 1 cycles
// from start to done. Sampling and bitmap duplicate detection follow the
// source design; the bitmap word width (32), the one-position-per-cycle
// schedule and the reset-time clearing pass are this design's own choices.
module fixed_weight_gen #(
  parameter int unsigned N      = 17669,
  parameter int unsigned MAX_WT = 75,
  localparam int unsigned PW    = $clog2(N),
  localparam int unsigned WTW   = $clog2(MAX_WT + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [WTW-1:0] weight,
  output logic           busy,
  output logic           done,
  input  logic           rnd_valid,
  output logic           rnd_ready,
  input  logic [31:0]    rnd_data,
  output logic           out_we,
  output logic [WTW-1:0] out_idx,
  output logic [PW-1:0]  out_pos
);
  localparam int unsigned BMW = (N + 31) / 32;   // bitmap words
  localparam int unsigned BAW = $clog2(BMW);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_GEN, S_DEDUP, S_CLEAR} state_e;
  state_e state;

  logic [31:0]    bitmap [BMW];
  logic [PW-1:0]  plist  [MAX_WT];
  logic [WTW-1:0] wt_q, i_q;
  logic [BAW-1:0] init_q;

  logic [PW-1:0]  cur;
  logic [BAW-1:0] wa_cur, wa_idx;
  logic [31:0]    word_cur, word_idx;
  logic           is_dup;
  logic [63:0]    prod;
  logic [PW-1:0]  sel_pos;

  assign cur      = plist[i_q];
  assign wa_cur   = BAW'(cur >> 5);
  assign wa_idx   = BAW'(i_q >> 5);
  assign word_cur = bitmap[wa_cur];
  assign word_idx = bitmap[wa_idx];
  assign is_dup   = word_cur[cur[4:0]];
  assign sel_pos  = is_dup ? PW'(i_q) : cur;
  assign prod     = 64'(rnd_data) * 64'(N - 32'(i_q));

  assign busy      = (state != S_IDLE);
  assign rnd_ready = (state == S_GEN);
  assign out_we    = (state == S_DEDUP);
  assign out_idx   = i_q;
  assign out_pos   = sel_pos;

  // bitmap memory: one write per cycle
  always_ff @(posedge clk) begin
    unique case (state)
      S_INIT:  bitmap[init_q] <= '0;
      S_DEDUP: if (is_dup) bitmap[wa_idx] <= word_idx | (32'd1 << i_q[4:0]);
               else        bitmap[wa_cur] <= word_cur | (32'd1 << cur[4:0]);
      S_CLEAR: bitmap[wa_cur] <= '0;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_GEN && rnd_valid) plist[i_q] <= PW'(32'(i_q) + 32'(prod >> 32));
    else if (state == S_DEDUP)       plist[i_q] <= sel_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_INIT;
      init_q <= '0;
      wt_q   <= '0;
      i_q    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (32'(init_q) == BMW - 1) state <= S_IDLE;
        end
        S_IDLE: if (start) begin
          wt_q  <= weight;
          i_q   <= '0;
          state <= (weight == 0) ? S_IDLE : S_GEN;
          done  <= (weight == 0);
        end
        S_GEN: if (rnd_valid) begin
          if (i_q == wt_q - 1'b1) state <= S_DEDUP;
          else                    i_q   <= i_q + 1'b1;
        end
        S_DEDUP: begin
          if (i_q == 0) state <= S_CLEAR;
          else          i_q   <= i_q - 1'b1;
        end
        S_CLEAR: begin
          if (i_q == wt_q - 1'b1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
