// decoder: concatenated-code decoder Decode(v') with a W-bit input wrapper.
//
// Takes the N1*N2-bit word v - u*y as ceil(N1*N2/W) W-bit words on a
// valid/ready stream (word 0 first, bits beyond N1*N2 ignored). A shift
// register cuts each word into W/128 pieces of 128 bits and hands them to
// the duplicated Reed-Muller decoder (rm_decoder), which returns one byte per
// MULT = N2/128 pieces. After N1 bytes the shortened Reed-Solomon decoder
// (rs_decoder) corrects them and `done` pulses with the KB-byte message in
// `msg`, held until the next start.
// Timing: about N1*(MULT+8) cycles for the Reed-Muller part plus the
// Reed-Solomon latency. The RM-then-RS order and the shift-register wrapper
// for arbitrary W follow the source design; the rest is this design's own.
// W must be a multiple of 128.
module decoder #(
  parameter int unsigned N1 = 46,
  parameter int unsigned N2 = 384,
  parameter int unsigned KB = 16,
  parameter int unsigned W  = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [W-1:0]    in_data,
  output logic [KB*8-1:0] msg
);
  localparam int unsigned MULT   = N2 / 128;
  localparam int unsigned CPW    = W / 128;
  localparam int unsigned PIECES = N1 * MULT;

  typedef enum logic [1:0] {S_IDLE, S_RM, S_RS} state_e;
  state_e state;

  logic [W-1:0]    buf_q;
  logic [$clog2(CPW+1)-1:0]    left;      // pieces left in buf_q
  logic [$clog2(PIECES+1)-1:0] fed;       // pieces given to the RM decoder
  logic [$clog2(N1+1)-1:0]     nsym;
  logic [N1*8-1:0] rx;
  logic            rm_in_valid, rm_in_ready, rm_out_valid;
  logic [7:0]      rm_byte;
  logic            rs_start, rs_busy, rs_done;

  rm_decoder #(.MULT(MULT)) u_rm (
    .clk, .rst_n,
    .in_valid(rm_in_valid), .in_ready(rm_in_ready), .in_data(buf_q[127:0]),
    .out_valid(rm_out_valid), .out_byte(rm_byte)
  );

  rs_decoder #(.N1(N1), .KB(KB)) u_rs (
    .clk, .rst_n, .start(rs_start), .rx, .busy(rs_busy), .done(rs_done), .msg
  );

  assign busy        = (state != S_IDLE);
  assign rm_in_valid = (state == S_RM) && (left != 0) && (32'(fed) < PIECES);
  assign in_ready    = (state == S_RM) && (left == 0) && (32'(fed) < PIECES);
  assign rs_start    = (state == S_RM) && (32'(nsym) == N1);
  assign done        = rs_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      buf_q <= '0;
      left  <= '0;
      fed   <= '0;
      nsym  <= '0;
      rx    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          left  <= '0;
          fed   <= '0;
          nsym  <= '0;
          state <= S_RM;
        end
        S_RM: begin
          if (in_valid && in_ready) begin
            buf_q <= in_data;
            left  <= ($clog2(CPW+1))'(CPW);
          end else if (rm_in_valid && rm_in_ready) begin
            buf_q <= buf_q >> 128;
            left  <= left - 1'b1;
            fed   <= fed + 1'b1;
          end
          if (rm_out_valid) begin
            rx[nsym*8 +: 8] <= rm_byte;
            nsym <= nsym + 1'b1;
          end
          if (rs_start) state <= S_RS;
        end
        S_RS: if (rs_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
