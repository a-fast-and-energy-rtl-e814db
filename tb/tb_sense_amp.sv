// tb_sense_amp: drives the bitlines as two activated words A and B would
// (BL = A AND B, BLB = A NOR B) and checks the five sense-amplifier outputs
// against A and B directly; also checks single-word READ/NOT (A = B).
// The five outputs and their derivation are the published ones.
module tb_sense_amp;
  localparam int unsigned N = 64;
  logic         clk = 1'b0;
  logic [N-1:0] bl, blb, and_o, nor_o, or_o, nand_o, xor_o;
  int checks = 0, failures = 0;

  sense_amp #(.N(N)) dut (.bl(bl), .blb(blb), .and_o(and_o), .nor_o(nor_o),
                          .or_o(or_o), .nand_o(nand_o), .xor_o(xor_o));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [N-1:0] a, b;
      a = {$urandom(), $urandom()};
      b = (i % 5 == 0) ? a : {$urandom(), $urandom()};
      bl = a & b;
      blb = ~(a | b);
      @(posedge clk);
      checks++;
      if (and_o !== (a & b) || or_o !== (a | b) || nor_o !== ~(a | b) ||
          nand_o !== ~(a & b) || xor_o !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%h b=%h", a, b);
      end
      if (a == b) begin
        checks++;
        if (or_o !== a || nor_o !== ~a) begin
          failures++;
          $display("FAIL read/not a=%h", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
