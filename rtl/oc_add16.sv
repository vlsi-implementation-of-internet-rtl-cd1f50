// oc_add16: direct 16-bit 1's complement adder ("DIR" structure).
//
// A carry-lookahead adder whose carry out is fed back as carry in
// (end-around carry) without a second carry-propagation pass: the group
// generate of all 16 bits is exactly the end-around carry, so every bit
// carry is c[i] = G[i-1:0] | (P[i-1:0] & G[15:0]).  The prefix (G, P) terms
// are formed with a Kogge-Stone tree, four levels for 16 bits.
// Purely combinational.  0x0000 and 0xFFFF are the two zeros of the number
// system; a sum of two non-zero operands never yields 0x0000.
// The document chooses a direct carry-lookahead 1's complement adder for its
// area-delay product; the prefix-tree form is this design's choice.
module oc_add16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] sum
);
  localparam int unsigned N = 16;
  localparam int unsigned LEVELS = 4;

  // gp[l][i]: group generate/propagate of bits [i : max(0, i-2^l+1)]
  logic [N-1:0] gen [LEVELS+1];
  logic [N-1:0] prp [LEVELS+1];
  logic [N-1:0] c;
  logic         eac;

  always_comb begin
    gen[0] = a & b;
    prp[0] = a ^ b;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < N; i++) begin
        if (i >= (1 << l)) begin
          gen[l+1][i] = gen[l][i] | (prp[l][i] & gen[l][i-(1<<l)]);
          prp[l+1][i] = prp[l][i] & prp[l][i-(1<<l)];
        end else begin
          gen[l+1][i] = gen[l][i];
          prp[l+1][i] = prp[l][i];
        end
      end
    end
    eac = gen[LEVELS][N-1];
    c[0] = eac;
    for (int i = 1; i < N; i++) begin
      c[i] = gen[LEVELS][i-1] | (prp[LEVELS][i-1] & eac);
    end
    sum = (a ^ b) ^ c;
  end
endmodule
