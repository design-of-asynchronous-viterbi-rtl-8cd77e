// soft_mapper: turns the two code bits of an encoder token into the soft
// symbols seen by the decoder.
//
// A code bit 0 is sent as -3 and a code bit 1 as +3 (the fixed soft levels of
// the original design). The channel perturbation carried in the token (n0 for V1, n1
// for V2) is then added and the sum clipped to -3..+3, the range the branch
// metric unit accepts. The perturbation input is this implementation's way of
// modelling a noisy channel in simulation; with n0 = n1 = 0 the symbols are
// exactly +-3. Purely combinational.
module soft_mapper
  import viterbi_pkg::*;
(
  input  enc_tok_t tok,
  output sym_t     sym
);

  function automatic soft_t map_bit(input logic b, input noise_t n);
    logic signed [NOISE_W:0] s;
    s = (b ? (NOISE_W+1)'(SOFT_MAX) : -(NOISE_W+1)'(SOFT_MAX)) + (NOISE_W+1)'(n);
    if (s > (NOISE_W+1)'(SOFT_MAX))       return soft_t'(SOFT_MAX);
    else if (s < -(NOISE_W+1)'(SOFT_MAX)) return soft_t'(-SOFT_MAX);
    else                                 return soft_t'(s);
  endfunction

  always_comb begin
    sym.i0 = map_bit(tok.v1, tok.n0);
    sym.i1 = map_bit(tok.v2, tok.n1);
  end

endmodule
