// im_cla_block: one 4-bit block of the in-memory carry-look-ahead adder.
//
// The carry chain is a Manchester chain: at each stage the carry into bit
// i+1 is the generate G_i, or the incoming carry passed on when the
// propagate P_i is set. A carry-skip path forwards the block's carry-in
// straight to its carry-out when all four propagate signals are set, so a
// carry never has to ripple through a block that only propagates. The sum
// of each bit is P_i XOR C_i. G_i = A_i & B_i and P_i = A_i ^ B_i come from
// the sense amplifiers. The dynamic (precharge/evaluate) timing of the
// circuit is not modelled: the block is combinational.
//
// The block size, the Manchester chain, the skip path and the XOR sum follow
// the published circuit; only its logic function is modelled.
module im_cla_block (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [4:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_chain
    assign c[i+1] = g[i] | (p[i] & c[i]);
    assign sum[i] = p[i] ^ c[i];
  end
  assign cout = (&p) ? cin : c[4];
endmodule
