// encoder: concatenated-code encoder Encode(m) with a W-bit output wrapper.
//
// The KB-byte message is Reed-Solomon encoded (rs_encoder) into N1 bytes.
// Each byte is then Reed-Muller encoded (rm_encoder) into a 128-bit word and
// repeated MULT = N2/128 times, giving the N1*N2-bit codeword; symbol j
// occupies bits [j*N2, (j+1)*N2). A shift-register wrapper collects W/128
// of the 128-bit pieces into each W-bit output word (lowest bits first), so
// the same encoder serves every datapath width; the last word is zero-padded
// when N1*N2 is not a multiple of W.
// Interface: `start` samples `msg`; words come out on a valid/ready stream,
// word index 0 first, ceil(N1*N2/W) words in all; `done` pulses when the last
// word has been accepted. One 128-bit piece is produced per cycle while the
// output is not stalled. RS-then-RM order, duplication and the sequential
// W-bit wrapper follow the source design; the stream interface is this
// design's own. W must be a multiple of 128.
module encoder #(
  parameter int unsigned N1 = 46,
  parameter int unsigned N2 = 384,
  parameter int unsigned KB = 16,
  parameter int unsigned W  = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [KB*8-1:0] msg,
  output logic            busy,
  output logic            done,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [W-1:0]    out_data
);
  localparam int unsigned MULT   = N2 / 128;
  localparam int unsigned CPW    = W / 128;       // pieces per output word
  localparam int unsigned PIECES = N1 * MULT;

  typedef enum logic [1:0] {S_IDLE, S_RS, S_RM, S_FLUSH} state_e;
  state_e state;

  logic             rs_done, rs_busy;
  logic [N1*8-1:0]  cdw;
  logic [7:0]       sym;
  logic [127:0]     piece;
  logic [W-1:0]     sr, assembled;
  logic [$clog2(PIECES+1)-1:0] pcnt;
  logic [$clog2(N1+1)-1:0]     jsym;
  logic [$clog2(MULT+1)-1:0]   copy;
  logic [$clog2(CPW+1)-1:0]    slot;
  logic             can_go, word_full, last_piece;

  rs_encoder #(.N1(N1), .KB(KB)) u_rs (
    .clk, .rst_n, .start(start && state == S_IDLE), .msg,
    .busy(rs_busy), .done(rs_done), .cdw
  );
  rm_encoder u_rm (.msg(sym), .cw(piece));

  assign sym        = cdw[jsym*8 +: 8];
  assign can_go     = !out_valid || out_ready;
  assign last_piece = (32'(pcnt) == PIECES - 1);
  assign word_full  = (32'(slot) == CPW - 1) || last_piece;
  assign busy       = (state != S_IDLE);

  always_comb begin
    assembled = sr;
    assembled[slot*128 +: 128] = piece;
  end

  initial assert (W % 128 == 0 && N2 % 128 == 0) else $error("W and N2 must be multiples of 128");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sr        <= '0;
      pcnt      <= '0;
      jsym      <= '0;
      copy      <= '0;
      slot      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_RS;
        S_RS: if (rs_done) begin
          pcnt <= '0; jsym <= '0; copy <= '0; slot <= '0; sr <= '0;
          state <= S_RM;
        end
        S_RM: if (can_go) begin
          if (word_full) begin
            out_data  <= assembled;
            out_valid <= 1'b1;
            sr        <= '0;
            slot      <= '0;
          end else begin
            sr   <= assembled;
            slot <= slot + 1'b1;
          end
          pcnt <= pcnt + 1'b1;
          if (32'(copy) == MULT - 1) begin
            copy <= '0;
            jsym <= jsym + 1'b1;
          end else begin
            copy <= copy + 1'b1;
          end
          if (last_piece) state <= S_FLUSH;
        end
        S_FLUSH: if (!out_valid || out_ready) begin   // last word taken
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
