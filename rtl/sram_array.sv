// sram_array: M x N array of 6T SRAM cells of a CiM array.
//
// Every row is one N-bit word. Reading raises one or two wordlines at once
// (from row decoders A and B). The precharged bitline BL of a column stays
// high only if every activated cell stores 1, and BLB only if every
// activated cell stores 0, so the array itself presents the bitwise AND
// (on BL) and NOR (on BLB) of the activated words; with a single row they
// are the word and its complement. This is modelled combinationally: bl and
// blb are valid in the same cycle as the wordlines. With no wordline raised
// both bitlines stay at their precharge value 1.
//
// Writing (we = 1) stores wdata, which the copy buffers / bitline drivers
// put on the bitlines, into every row whose wl_a wordline is raised, at the
// rising clock edge. Cells are not reset, like a real SRAM.
//
// Two decoders and AND / NOR sensing on BL / BLB follow the published
// array; the same-cycle combinational read is this design's timing model.
module sram_array #(
  parameter int unsigned M = 64,
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic [M-1:0] wl_a,
  input  logic [M-1:0] wl_b,
  input  logic         we,
  input  logic [N-1:0] wdata,
  output logic [N-1:0] bl,
  output logic [N-1:0] blb
);
  logic [N-1:0] mem [M];

  always_comb begin
    bl  = '1;
    blb = '1;
    for (int unsigned r = 0; r < M; r++) begin
      if (wl_a[r] || wl_b[r]) begin
        bl  = bl & mem[r];
        blb = blb & ~mem[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned r = 0; r < M; r++)
        if (wl_a[r]) mem[r] <= wdata;
    end
  end
endmodule
