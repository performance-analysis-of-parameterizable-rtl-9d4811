// rm_encoder: first-order Reed-Muller RM(1,7) encoder, one byte to 128 bits.
//
// The codeword is the vector-matrix product of the byte with the 8 x 128
// generator matrix: row 7 is all ones and row b (b < 7) has bit t set when
// bit b of t is one, so codeword bit t = m[7] XOR parity(m[6:0] AND t).
// The rows are constants of this module (they play the role of the stored
// generator rows) and the product is a combinational XOR of the selected rows.
// The matrix follows the HQC Reed-Muller code; making it combinational with no
// register is this design's choice: the caller registers the result.
module rm_encoder (
  input  logic [7:0]   msg,
  output logic [127:0] cw
);
  logic [127:0] rows [8];

  always_comb begin
    for (int b = 0; b < 7; b++)
      for (int t = 0; t < 128; t++) rows[b][t] = t[b];
    rows[7] = '1;
    cw = '0;
    for (int b = 0; b < 8; b++) if (msg[b]) cw ^= rows[b];
  end

endmodule
