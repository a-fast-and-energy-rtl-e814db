// im_cla: N-bit in-memory carry-look-ahead adder (iM-CLA).
//
// N/4 four-bit Manchester carry blocks with carry skip (im_cla_block) are
// cascaded, the carry-out of each block feeding the carry-in of the next.
// Inputs are the per-column generate (A AND B) and propagate (A XOR B)
// produced by the sense amplifiers when rows A and B are read together, plus
// a carry-in (1 for subtraction A + NOT B + 1). Outputs are the N-bit sum
// and the carry-out of the last block. Combinational; N must be a multiple
// of 4.
//
// The cascade of 4-bit blocks and the G / P inputs follow the published
// adder; the carry-in port used for subtraction is how this design exposes
// the published "carry-in of 1".
module im_cla #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = N / 4;
  logic [NB:0] c;

  assign c[0] = cin;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    im_cla_block u_blk (
      .g   (g[4*b +: 4]),
      .p   (p[4*b +: 4]),
      .cin (c[b]),
      .sum (sum[4*b +: 4]),
      .cout(c[b+1])
    );
  end

  assign cout = c[NB];
endmodule
