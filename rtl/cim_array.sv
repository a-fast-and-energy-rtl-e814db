// cim_array: one CiM-PN computing-in-memory array (M rows x N columns).
//
// Datapath, in the order a read passes through it: two row decoders (A, B)
// raise one or two wordlines of the 6T SRAM array; the customized sense
// amplifiers turn the bitlines into AND, NOR, OR, NAND and XOR of the
// activated words; the in-memory carry-look-ahead adder adds them
// (G = AND, P = XOR, with a carry-in); the operation selectors pick the
// result named by the opcode; the 5-level logarithmic shifter shifts it
// under the 15-bit shift mask; the result is held in the OUT latch. The
// copy buffers write OUT back into a row (in-place copy), and the bitline
// drivers write external data.
//
// Interface: one micro-operation (cim_pkg::cim_uop_t) per clock cycle.
//   rd: rows row_a (and row_b if en_b) are read, the result of op and mask
//       is in out one cycle later (cout holds the adder carry-out).
//   wr: row row_a is written at the clock edge with out (wr_ext = 0, copy
//       buffers) or with data_in (wr_ext = 1, bitline drivers).
// rd and wr in the same cycle is illegal (shared bitlines) and asserted
// against. So an in-memory accumulate is an ADD followed by a write, and a
// subtraction A - B is NOT B, a write, then ADD with carry-in 1. Every
// operation takes one cycle here; the analogue latencies of the circuit are
// not modelled. out and cout are reset to 0 by the synchronous active-low
// reset; the SRAM is not.
//
// The datapath order and the 64 x 64 size follow the published array; the
// micro-operation format, the one-cycle timing, the reset and the extra
// AND / NAND opcodes are this design's own.
module cim_array
  import cim_pkg::*;
#(
  parameter int unsigned M = CIM_M,
  parameter int unsigned N = CIM_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cim_uop_t     uop,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] out,
  output logic         cout
);
  logic [M-1:0] wl_a, wl_b;
  logic [N-1:0] bl, blb;
  logic [N-1:0] sa_and, sa_nor, sa_or, sa_nand, sa_xor;
  logic [N-1:0] sum, oop, shifted, wdata;
  logic         add_cout, we;

  row_decoder #(.M(M), .AW(ROW_AW)) u_dec_a (
    .en  (uop.rd | uop.wr),
    .addr(uop.row_a),
    .wl  (wl_a)
  );

  row_decoder #(.M(M), .AW(ROW_AW)) u_dec_b (
    .en  (uop.rd & uop.en_b),
    .addr(uop.row_b),
    .wl  (wl_b)
  );

  sram_array #(.M(M), .N(N)) u_sram (
    .clk  (clk),
    .wl_a (wl_a),
    .wl_b (wl_b),
    .we   (we),
    .wdata(wdata),
    .bl   (bl),
    .blb  (blb)
  );

  sense_amp #(.N(N)) u_sa (
    .bl    (bl),
    .blb   (blb),
    .and_o (sa_and),
    .nor_o (sa_nor),
    .or_o  (sa_or),
    .nand_o(sa_nand),
    .xor_o (sa_xor)
  );

  im_cla #(.N(N)) u_cla (
    .g   (sa_and),
    .p   (sa_xor),
    .cin (uop.cin),
    .sum (sum),
    .cout(add_cout)
  );

  op_select #(.N(N)) u_sel (
    .op    (uop.op),
    .sum   (sum),
    .xor_i (sa_xor),
    .or_i  (sa_or),
    .nor_i (sa_nor),
    .and_i (sa_and),
    .nand_i(sa_nand),
    .oop   (oop)
  );

  log_shifter #(.N(N)) u_shift (
    .oop (oop),
    .mask(uop.mask),
    .out (shifted)
  );

  copy_buffers #(.N(N)) u_copy (
    .enable_copy(uop.wr & ~uop.wr_ext),
    .result     (out),
    .data_in_en (uop.wr & uop.wr_ext),
    .data_in    (data_in),
    .we         (we),
    .wdata      (wdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out  <= '0;
      cout <= 1'b0;
    end else if (uop.rd) begin
      out  <= shifted;
      cout <= add_cout;
    end
  end

  // Reads and writes share the bitlines.
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(uop.rd && uop.wr));
  // Rows addressed must exist.
  a_row_a_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  (uop.rd || uop.wr) |-> (32'(uop.row_a) < M));
  a_row_b_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  (uop.rd && uop.en_b) |-> (32'(uop.row_b) < M));
  // Each shifter level has exactly one of its three mask bits set.
  for (genvar k = 0; k < 5; k++) begin : g_mask_chk
    a_mask_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                    uop.rd |-> $onehot(uop.mask[3*k +: 3]));
  end
endmodule
