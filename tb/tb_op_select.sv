// tb_op_select: gives each input of the operation selectors a different
// random word and checks that every opcode forwards its own input.
// The opcode encoding checked is this design's own.
module tb_op_select;
  import cim_pkg::*;
  localparam int unsigned N = 64;
  logic         clk = 1'b0;
  cim_op_e      op;
  logic [N-1:0] sum, x, o, no, a, na, oop;
  int checks = 0, failures = 0;

  op_select #(.N(N)) dut (.op(op), .sum(sum), .xor_i(x), .or_i(o), .nor_i(no),
                          .and_i(a), .nand_i(na), .oop(oop));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      sum = {$urandom(), $urandom()};
      x   = {$urandom(), $urandom()};
      o   = {$urandom(), $urandom()};
      no  = {$urandom(), $urandom()};
      a   = {$urandom(), $urandom()};
      na  = {$urandom(), $urandom()};
      for (int k = 0; k < 6; k++) begin
        logic [N-1:0] exp_v;
        op = cim_op_e'(k);
        case (k)
          0: exp_v = sum;
          1: exp_v = x;
          2: exp_v = o;
          3: exp_v = no;
          4: exp_v = a;
          default: exp_v = na;
        endcase
        @(posedge clk);
        checks++;
        if (oop !== exp_v) begin
          failures++;
          $display("FAIL op=%0d oop=%h exp=%h", k, oop, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
