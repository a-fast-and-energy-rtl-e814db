// tb_im_cla: feeds the adder G = A AND B and P = A XOR B for random and
// corner-case words (long propagate runs that take the carry-skip paths,
// all ones, zero) and compares sum and carry-out with A + B + cin.
// The reference is plain binary addition, which the published adder
// computes.
module tb_im_cla;
  localparam int unsigned N = 64;
  logic         clk = 1'b0;
  logic [N-1:0] g, p, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  im_cla #(.N(N)) dut (.g(g), .p(p), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [N-1:0] a, input logic [N-1:0] b, input logic ci);
    logic [N:0] ref_sum;
    g = a & b;
    p = a ^ b;
    cin = ci;
    ref_sum = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, ci};
    @(posedge clk);
    checks++;
    if (sum !== ref_sum[N-1:0] || cout !== ref_sum[N]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d sum=%h cout=%0d exp %h", a, b, ci, sum, cout, ref_sum);
    end
  endtask

  initial begin
    try('0, '0, 1'b0);
    try('1, '0, 1'b1);              // carry through every block by skip
    try('1, 64'd1, 1'b0);
    try(64'h0000_0000_FFFF_FFFF, 64'd1, 1'b0);
    try(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    try(64'h0F0F_0F0F_0F0F_0F0F, 64'hF0F0_F0F0_F0F0_F0F0, 1'b1);
    for (int i = 0; i < 2000; i++)
      try({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    // subtraction form: A + NOT B + 1
    for (int i = 0; i < 200; i++) begin
      logic [N-1:0] a, b;
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      try(a, ~b, 1'b1);
      checks++;
      if (sum !== a - b) begin
        failures++;
        $display("FAIL sub a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
