// prbs_gen: pseudo-random bit stream, W bits per clock.
//
// PRBS-23, x^23 + x^18 + 1: each new bit is s[22] ^ s[17] and is shifted in
// at the bottom of the 23-bit state. Every clock with `en` the next W bits
// of the sequence come out on `word`, the earliest bit in the MSB. For W of
// 23 or more, the state after a word is its lowest 23 bits, so a receiver
// can seed its own generator (load) from one received word and predict all
// later words. Both the ADF board and the link tester use this module to
// produce the same stream, as on the real boards; the polynomial and the
// bit order are this design's choices.
//
// Timing: `word` is registered; it changes one clock after en. load
// replaces the state with seed (a zero seed is replaced by all ones).
module prbs_gen #(
  parameter int W = 36
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [22:0]  seed,
  input  logic         en,
  output logic [W-1:0] word
);
  logic [22:0]  state, nstate;
  logic [W-1:0] nword;

  always_comb begin
    nstate = state;
    for (int i = W - 1; i >= 0; i--) begin
      nword[i] = nstate[22] ^ nstate[17];
      nstate   = {nstate[21:0], nword[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '1;
      word  <= '0;
    end else if (load) begin
      state <= (seed == '0) ? '1 : seed;
    end else if (en) begin
      state <= nstate;
      word  <= nword;
    end
  end
endmodule
