// row_decoder: one of the two row decoders (A and B) of a CiM array.
//
// Turns a row address into one-hot wordlines WL1..WLM. With en low no
// wordline is raised. Purely combinational. The array has two such decoders
// so that two words can be put on the bitlines at once for the in-memory
// bitwise operations; decoder A also picks the row written by the copy
// buffers (a choice of this design).
module row_decoder #(
  parameter int unsigned M  = 64,
  parameter int unsigned AW = 8
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [M-1:0]  wl
);
  always_comb begin
    wl = '0;
    for (int unsigned r = 0; r < M; r++)
      if (en && addr == AW'(r)) wl[r] = 1'b1;
  end
endmodule
