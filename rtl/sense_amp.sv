// sense_amp: the customized sense amplifiers of one CiM array (N columns).
//
// The sense amplifiers resolve the two bitlines of each column into the AND
// (from BL) and the NOR (from BLB) of the activated words. Inverters give
// OR and NAND, and an AND gate combining the NOR and AND results
// (~NOR & ~AND) gives XOR, which the adder uses as its propagate signal.
// With one activated row, OR is the stored word (READ) and NOR its
// complement (NOT). Combinational.
//
// The five outputs and how each is derived follow the published circuit;
// sensing is modelled as an ideal logic level.
module sense_amp #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] bl,
  input  logic [N-1:0] blb,
  output logic [N-1:0] and_o,
  output logic [N-1:0] nor_o,
  output logic [N-1:0] or_o,
  output logic [N-1:0] nand_o,
  output logic [N-1:0] xor_o
);
  always_comb begin
    and_o  = bl;
    nor_o  = blb;
    or_o   = ~nor_o;
    nand_o = ~and_o;
    xor_o  = or_o & nand_o;
  end
endmodule
