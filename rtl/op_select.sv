// op_select: the operation selectors between the sense amplifiers / adder
// and the shifter of a CiM array.
//
// One multiplexer per column forwards the result chosen by the opcode: the
// adder sum (ADD), or one of the sense-amplifier outputs XOR, OR (READ with
// one row), NOR (NOT with one row), AND, NAND. The outputs OOP_1..OOP_N
// drive the logarithmic shifter. Combinational.
//
// The ADD, XOR, OR/READ and NOR/NOT selections follow the published array;
// AND and NAND are extra selections of this design, taken from outputs the
// sense amplifiers produce anyway.
module op_select
  import cim_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  cim_op_e      op,
  input  logic [N-1:0] sum,
  input  logic [N-1:0] xor_i,
  input  logic [N-1:0] or_i,
  input  logic [N-1:0] nor_i,
  input  logic [N-1:0] and_i,
  input  logic [N-1:0] nand_i,
  output logic [N-1:0] oop
);
  always_comb begin
    unique case (op)
      OP_ADD:  oop = sum;
      OP_XOR:  oop = xor_i;
      OP_OR:   oop = or_i;
      OP_NOR:  oop = nor_i;
      OP_AND:  oop = and_i;
      OP_NAND: oop = nand_i;
      default: oop = or_i;
    endcase
  end
endmodule
