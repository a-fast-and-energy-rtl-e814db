// tb_log_shifter: checks the shifter with the two masks printed as
// examples (pass-through 010010010010010 and 2-bit right shift
// 010010010100010) and with every left and right shift 0..31 of random
// words, against the << and >> operators.
// The two example masks are the published ones; the other masks come from
// this design's reading of the mask layout.
module tb_log_shifter;
  import cim_pkg::*;
  localparam int unsigned N = 64;
  logic         clk = 1'b0;
  logic [N-1:0] oop, out;
  logic [14:0]  mask;
  int checks = 0, failures = 0;

  log_shifter #(.N(N)) dut (.oop(oop), .mask(mask), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [N-1:0] v, input logic [14:0] m, input logic [N-1:0] exp_v);
    oop = v;
    mask = m;
    @(posedge clk);
    checks++;
    if (out !== exp_v) begin
      failures++;
      $display("FAIL in=%h mask=%b out=%h exp=%h", v, m, out, exp_v);
    end
  endtask

  initial begin
    logic [N-1:0] v;
    v = 64'hDEAD_BEEF_0123_4567;
    try(v, 15'b010010010010010, v);
    try(v, 15'b010010010100010, v >> 2);
    try(64'd400, 15'b010010010100010, 64'd100);
    for (int i = 0; i < 20; i++) begin
      v = {$urandom(), $urandom()};
      for (int s = 0; s < 32; s++) begin
        try(v, shift_mask(1'b1, 5'(s)), v << s);
        try(v, shift_mask(1'b0, 5'(s)), v >> s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
