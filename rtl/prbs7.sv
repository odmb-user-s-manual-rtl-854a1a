// prbs7: one 16-bit step of the PRBS 2^7-1 sequence (x^7 + x^6 + 1).
//
// The sequence bit b[n] = b[n-7] ^ b[n-6]. A word carries 16 consecutive
// bits, bit 0 first in time. state holds the last seven bits sent, with
// state[6] the most recent. Given the state, the block returns the next
// word and the state after it. Since 16 x 127 = 2032 is a whole number of
// periods, 127 words bring the state back to where it started. Purely
// combinational.
module prbs7 (
  input  logic [6:0]  state,
  output logic [15:0] word,
  output logic [6:0]  next_state
);
  always_comb begin
    logic [6:0] s;
    logic       b;
    s = state;
    for (int i = 0; i < 16; i++) begin
      b       = s[0] ^ s[1];        // b[n-7] ^ b[n-6]
      word[i] = b;
      s       = {b, s[6:1]};
    end
    next_state = s;
  end
endmodule
