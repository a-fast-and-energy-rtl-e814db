// tb_cim_array: drives one CiM array with micro-operations and checks the
// OUT latch against a model of the memory kept in the testbench.
// Covered: external writes (bitline drivers), READ and NOT of one row,
// AND/NAND/OR/NOR/XOR and ADD of two rows (also the same row twice), a
// subtraction as NOT, write, ADD with carry-in 1, left and right shifts on
// the way out, in-place copy of OUT into a row (copy buffers) and an
// in-memory accumulate (ADD then write back). It also checks that every
// read result appears in OUT exactly one cycle after the operation and
// that OUT holds its value through writes.
// The expected behaviour is the published array's; the one-cycle timing
// checked here is this design's own model.
module tb_cim_array;
  import cim_pkg::*;
  localparam int unsigned M = 64, N = 64;
  logic         clk = 1'b0;
  logic         rst_n;
  cim_uop_t     uop;
  logic [N-1:0] data_in, out;
  logic         cout;
  logic [N-1:0] model [M];
  int checks = 0, failures = 0;

  cim_array #(.M(M), .N(N)) dut (.clk(clk), .rst_n(rst_n), .uop(uop), .data_in(data_in),
                                 .out(out), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  // Issue one micro-operation for one cycle.
  task automatic issue(input cim_uop_t u, input logic [N-1:0] d);
    uop = u;
    data_in = d;
    @(posedge clk);
    #1;
    uop = uop_nop();
  endtask

  task automatic wr_ext(input int r, input logic [N-1:0] d);
    issue(uop_wr(8'(r), 1'b1), d);
    model[r] = d;
  endtask

  // Read-type operation; OUT must show exp_v right after the next edge
  // and not before.
  task automatic rd_check(input cim_uop_t u, input logic [N-1:0] exp_v, input string what);
    logic [N-1:0] prev_out;
    prev_out = out;
    uop = u;
    #1;
    checks++;
    if (out !== prev_out) begin
      failures++;
      $display("FAIL %s: OUT changed before the clock edge", what);
    end
    @(posedge clk);
    #1;
    uop = uop_nop();
    checks++;
    if (out !== exp_v) begin
      failures++;
      $display("FAIL %s: out=%h exp=%h", what, out, exp_v);
    end
  endtask

  initial begin
    logic [N-1:0] a, b;
    rst_n = 1'b0;
    uop = uop_nop();
    data_in = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out !== '0) begin
      failures++;
      $display("FAIL reset out=%h", out);
    end
    rst_n = 1'b1;
    for (int r = 0; r < M; r++) wr_ext(r, rnd());

    for (int i = 0; i < 100; i++) begin
      int ra, rb;
      logic [4:0] s;
      ra = $urandom_range(M-1);
      rb = $urandom_range(M-1);
      a = model[ra];
      b = model[rb];
      s = 5'($urandom_range(31));
      rd_check(uop_rd(OP_OR,   8'(ra), 1'b0, '0, 1'b0, MASK_NONE), a, "READ");
      rd_check(uop_rd(OP_NOR,  8'(ra), 1'b0, '0, 1'b0, MASK_NONE), ~a, "NOT");
      rd_check(uop_rd(OP_AND,  8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), a & b, "AND");
      rd_check(uop_rd(OP_NAND, 8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), ~(a & b), "NAND");
      rd_check(uop_rd(OP_OR,   8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), a | b, "OR");
      rd_check(uop_rd(OP_NOR,  8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), ~(a | b), "NOR");
      rd_check(uop_rd(OP_XOR,  8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), a ^ b, "XOR");
      rd_check(uop_rd(OP_ADD,  8'(ra), 1'b1, 8'(rb), 1'b0, MASK_NONE), a + b, "ADD");
      checks++;
      if (cout !== 1'((({1'b0, a} + {1'b0, b}) >> N))) begin
        failures++;
        $display("FAIL ADD carry-out");
      end
      rd_check(uop_rd(OP_ADD,  8'(ra), 1'b1, 8'(ra), 1'b1, MASK_NONE), a + a + 1, "ADD same row");
      rd_check(uop_rd(OP_OR,   8'(ra), 1'b0, '0, 1'b0, shift_mask(1'b1, s)), a << s, "SHL");
      rd_check(uop_rd(OP_OR,   8'(ra), 1'b0, '0, 1'b0, shift_mask(1'b0, s)), a >> s, "SHR");
      rd_check(uop_rd(OP_ADD,  8'(ra), 1'b1, 8'(rb), 1'b0, shift_mask(1'b0, 5'd1)), (a + b) >> 1,
               "ADD then SHR");
    end

    // Subtraction a - b: NOT b -> row 60, then ADD a, row 60, carry-in 1.
    for (int i = 0; i < 50; i++) begin
      wr_ext(1, rnd());
      wr_ext(2, rnd());
      rd_check(uop_rd(OP_NOR, 8'd2, 1'b0, '0, 1'b0, MASK_NONE), ~model[2], "SUB: NOT");
      issue(uop_wr(8'd60, 1'b0), '0);            // copy buffers
      model[60] = ~model[2];
      checks++;
      if (out !== ~model[2]) begin
        failures++;
        $display("FAIL OUT not held across a write");
      end
      rd_check(uop_rd(OP_ADD, 8'd1, 1'b1, 8'd60, 1'b1, MASK_NONE), model[1] - model[2], "SUB");
    end

    // Accumulate: row 10 += rows 20..27 (add, then write in place).
    wr_ext(10, '0);
    for (int r = 20; r < 28; r++) wr_ext(r, {32'd0, $urandom()});
    a = '0;
    for (int r = 20; r < 28; r++) begin
      a = a + model[r];
      rd_check(uop_rd(OP_ADD, 8'd10, 1'b1, 8'(r), 1'b0, MASK_NONE), a, "ACC add");
      issue(uop_wr(8'd10, 1'b0), '0);
      model[10] = a;
    end
    // Mean of the 8 values by a right shift of 3 on the read.
    rd_check(uop_rd(OP_OR, 8'd10, 1'b0, '0, 1'b0, shift_mask(1'b0, 5'd3)), a >> 3, "ACC mean");

    // Whole memory still matches the model.
    for (int r = 0; r < M; r++)
      rd_check(uop_rd(OP_OR, 8'(r), 1'b0, '0, 1'b0, MASK_NONE), model[r], "final READ");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
