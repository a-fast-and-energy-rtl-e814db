// log_shifter: the 5-level logarithmic shifter (iM-shifter) of a CiM array.
//
// Level k (k = 0..4) moves the word by 2**k columns left, right or not at
// all, so any shift from 0 to 31 either way takes one pass (a multiply or
// divide by a power of two). In column i a level passes either its own
// input (transistor M), input i+2**k (M_R, right shift towards bit 0) or
// input i-2**k (M_L, left shift). Each level is steered by three bits of
// the 15-bit shift mask S: S(3k+1) left, S(3k+2) pass, S(3k+3) right; the
// mask vector holds S_k at bit k-1. Columns shifted in from outside the
// word read 0. If no bit of a level is set its outputs read 0; if several
// are set their inputs are ORed (a wired node). Exactly one bit per level
// is the intended use. Combinational.
//
// Five levels, shifts of 1 to 16 and the 15-bit mask follow the published
// shifter. The zero fill and the OR of several enabled paths are this
// design's reading of the pass-transistor circuit.
module log_shifter #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] oop,
  input  logic [14:0]  mask,
  output logic [N-1:0] out
);
  logic [N-1:0] st [6];

  always_comb begin
    st[0] = oop;
    for (int k = 0; k < 5; k++) begin
      st[k+1] = '0;
      if (mask[3*k])   st[k+1] = st[k+1] | (st[k] << (1 << k));
      if (mask[3*k+1]) st[k+1] = st[k+1] | st[k];
      if (mask[3*k+2]) st[k+1] = st[k+1] | (st[k] >> (1 << k));
    end
    out = st[5];
  end
endmodule
