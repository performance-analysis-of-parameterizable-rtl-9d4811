// poly_mult: sparse x dense polynomial multiplier, c = a * b mod (X^N - 1).
//
// `a` is dense: N bits held by the caller in a memory of D = ceil(N/W) words
// of W bits (the "external RAM"; bits of the last word above N must be zero).
// `b` is sparse: `weight` bit positions read one at a time through pos_addr /
// pos_data. For every position s the sparse controller streams the D+1 words
// of a*X^s: it reads the adjacent words a[j] and a[j-1] on two read ports into
// operand registers A and B, the two-stage pipelined barrel rotator shifts
// {A,B} left by s mod W (coarse then fine), and the W-bit result is XORed
// (GF(2) addition) into accumulator word floor(s/W)+j of a 2D-word
// distributed RAM. The shifted copies are therefore accumulated unreduced;
// after the last position a fold pass of D cycles adds the bits at positions
// >= N back onto positions 0..N-1 (X^N = 1), reading the accumulator's two
// ports and one saved word per cycle, and masks the last word to N bits.
// Words are cleared by dropping the accumulator's valid flags at start.
//
// Latency: weight*(ceil(N/W)+4) + ceil(N/W) + 2 cycles from the cycle in which
// `start` is high to the cycle in which `done` pulses. That is the cycle
// formula of the source design; what the terms are spent on here is this
// design's own: per position 1 fetch cycle, D+1 issue cycles and 2 pipeline
// drain cycles; 1 start cycle; 1 fold preload cycle and D fold cycles (where
// the source spends its D cycles on clearing the memory). The unreduced
// accumulation and fold are this design's way of resolving the wrap-around
// at X^N when N is not a multiple of W.
//
// After `done`, res_data is combinational from res_addr (word index < D)
// until the next start. `a` and the position list must stay unchanged while
// busy.
// Lint note: the fold takes W bits out of a 2W-bit concatenation, so the
// upper half of that intermediate is intentionally unread.
module poly_mult #(
  parameter int unsigned N      = 17669,
  parameter int unsigned W      = 128,
  parameter int unsigned MAX_WT = 75,
  localparam int unsigned D     = (N + W - 1) / W,
  localparam int unsigned DAW   = $clog2(D + 1),
  localparam int unsigned PW    = $clog2(N),
  localparam int unsigned WTW   = $clog2(MAX_WT + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [WTW-1:0] weight,
  output logic           busy,
  output logic           done,
  // sparse operand: list of bit positions
  output logic [WTW-1:0] pos_addr,
  input  logic [PW-1:0]  pos_data,
  // dense operand: two asynchronous read ports of the external RAM
  output logic [DAW-1:0] da_addr,
  input  logic [W-1:0]   da_data,
  output logic [DAW-1:0] db_addr,
  input  logic [W-1:0]   db_data,
  // product read port (valid while idle after done)
  input  logic [DAW-1:0] res_addr,
  output logic [W-1:0]   res_data
);
  localparam int unsigned DEPTH = 2 * D;
  localparam int unsigned AAW   = $clog2(DEPTH);
  localparam int unsigned KS    = $clog2(W);
  localparam int unsigned PAD   = D * W - N;          // unused bits of word D-1
  localparam int unsigned LASTB = N - (D - 1) * W;    // used bits of word D-1

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_ISSUE, S_DRAIN, S_FPRE, S_FOLD} state_e;
  state_e state;

  logic [WTW-1:0] wt_q, idx_q;
  logic [DAW-1:0] j_q;            // issue / fold word counter
  logic [AAW-1:0] q_q;            // coarse word offset floor(s/W)
  logic [KS-1:0]  f_q;            // bit offset s mod W
  logic           drain_q;

  // operand registers A, B and their destination word
  logic [W-1:0]   a_reg, b_reg;
  logic           ab_valid;
  logic [AAW-1:0] ab_dst, mid_dst;
  logic [KS-1:0]  ab_shift;

  logic           rot_valid;
  logic [W-1:0]   rot_out;
  logic [W-1:0]   prev_q;

  // accumulator ports
  logic           acc_clear, acc_we;
  logic [AAW-1:0] acc_ra0, acc_ra1, acc_wa;
  logic [W-1:0]   acc_rd0, acc_rd1, acc_wd;

  logic [2*W-1:0] fold_cat;
  logic [W-1:0]   fold_word, last_mask;

  acc_lutram #(.W(W), .DEPTH(DEPTH), .AW(AAW)) u_acc (
    .clk, .rst_n, .clear(acc_clear),
    .raddr0(acc_ra0), .rdata0(acc_rd0),
    .raddr1(acc_ra1), .rdata1(acc_rd1),
    .we(acc_we), .waddr(acc_wa), .wdata(acc_wd)
  );

  barrel_rotator #(.W(W)) u_rot (
    .clk, .rst_n,
    .in_valid(ab_valid), .din({a_reg, b_reg}), .shift(ab_shift),
    .out_valid(rot_valid), .dout(rot_out)
  );

  assign busy     = (state != S_IDLE);
  assign pos_addr = idx_q;
  assign da_addr  = j_q;
  assign db_addr  = j_q - 1'b1;
  assign acc_clear = (state == S_IDLE) && start;

  always_comb begin
    last_mask = '0;
    for (int unsigned t = 0; t < W; t++) last_mask[t] = (t < LASTB);
  end

  assign fold_cat  = {acc_rd1, prev_q} >> (W - PAD);
  assign fold_word = fold_cat[W-1:0];

  // accumulator port usage
  always_comb begin
    acc_ra0 = AAW'(res_addr);
    acc_ra1 = AAW'(D - 1);
    acc_we  = 1'b0;
    acc_wa  = mid_dst;
    acc_wd  = '0;
    if (rot_valid) begin
      acc_ra0 = mid_dst;
      acc_we  = 1'b1;
      acc_wa  = mid_dst;
      acc_wd  = acc_rd0 ^ rot_out;
    end else if (state == S_FOLD) begin
      acc_ra0 = AAW'(j_q);
      acc_ra1 = AAW'(D) + AAW'(j_q);
      acc_we  = 1'b1;
      acc_wa  = AAW'(j_q);
      acc_wd  = acc_rd0 ^ fold_word;
      if (32'(j_q) == D - 1) acc_wd = acc_wd & last_mask;
    end
  end
  assign res_data = acc_rd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wt_q     <= '0;
      idx_q    <= '0;
      j_q      <= '0;
      q_q      <= '0;
      f_q      <= '0;
      drain_q  <= 1'b0;
      a_reg    <= '0;
      b_reg    <= '0;
      ab_valid <= 1'b0;
      ab_dst   <= '0;
      ab_shift <= '0;
      mid_dst  <= '0;
      prev_q   <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      ab_valid <= 1'b0;
      mid_dst  <= ab_dst;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            wt_q  <= weight;
            idx_q <= '0;
            state <= (weight == 0) ? S_FPRE : S_FETCH;
          end
        end
        S_FETCH: begin
          q_q   <= AAW'(pos_data / W);
          f_q   <= KS'(pos_data % W);
          j_q   <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          a_reg    <= (32'(j_q) < D) ? da_data : '0;
          b_reg    <= (j_q != 0) ? db_data : '0;
          ab_valid <= 1'b1;
          ab_dst   <= q_q + AAW'(j_q);
          ab_shift <= f_q;
          if (32'(j_q) == D) begin
            drain_q <= 1'b0;
            state   <= S_DRAIN;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_q <= 1'b1;
          if (drain_q) begin
            idx_q <= idx_q + 1'b1;
            state <= (idx_q + 1'b1 == wt_q) ? S_FPRE : S_FETCH;
          end
        end
        S_FPRE: begin
          prev_q <= acc_rd1;
          j_q    <= '0;
          state  <= S_FOLD;
        end
        S_FOLD: begin
          prev_q <= acc_rd1;
          j_q    <= j_q + 1'b1;
          if (32'(j_q) == D - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
