// tb_sram_array: writes random words into the SRAM array, then checks that
// one activated row shows the word on BL and its complement on BLB, two
// activated rows show their AND on BL and NOR on BLB, no activated row
// leaves both bitlines high, and a write goes only to the addressed row.
// Two-row AND / NOR sensing is the published behaviour; the same-cycle
// read is this design's timing model.
module tb_sram_array;
  localparam int unsigned M = 64, N = 64;
  logic         clk = 1'b0;
  logic [M-1:0] wl_a, wl_b;
  logic         we;
  logic [N-1:0] wdata, bl, blb;
  logic [N-1:0] model [M];
  int checks = 0, failures = 0;

  sram_array #(.M(M), .N(N)) dut (.clk(clk), .wl_a(wl_a), .wl_b(wl_b), .we(we),
                                  .wdata(wdata), .bl(bl), .blb(blb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check(input logic [N-1:0] e_bl, input logic [N-1:0] e_blb, input string what);
    #1;
    checks++;
    if (bl !== e_bl || blb !== e_blb) begin
      failures++;
      $display("FAIL %s bl=%h exp %h blb=%h exp %h", what, bl, e_bl, blb, e_blb);
    end
  endtask

  initial begin
    wl_a = '0; wl_b = '0; we = 1'b0; wdata = '0;
    // fill every row
    for (int r = 0; r < M; r++) begin
      @(negedge clk);
      wl_a = '0; wl_a[r] = 1'b1; we = 1'b1; wdata = rnd(); model[r] = wdata;
    end
    @(negedge clk);
    we = 1'b0; wl_a = '0;
    check('1, '1, "idle");
    // single rows
    for (int r = 0; r < M; r++) begin
      @(negedge clk);
      wl_a = '0; wl_a[r] = 1'b1; wl_b = '0;
      check(model[r], ~model[r], "single A");
      wl_a = '0; wl_b = '0; wl_b[r] = 1'b1;
      check(model[r], ~model[r], "single B");
    end
    // pairs
    for (int i = 0; i < 200; i++) begin
      int ra, rb;
      ra = $urandom_range(M-1); rb = $urandom_range(M-1);
      @(negedge clk);
      wl_a = '0; wl_a[ra] = 1'b1; wl_b = '0; wl_b[rb] = 1'b1;
      check(model[ra] & model[rb], ~(model[ra] | model[rb]), "pair");
    end
    // overwrite one row, neighbours unchanged
    @(negedge clk);
    wl_b = '0; wl_a = '0; wl_a[7] = 1'b1; we = 1'b1; wdata = rnd(); model[7] = wdata;
    @(negedge clk);
    we = 1'b0;
    for (int r = 6; r <= 8; r++) begin
      wl_a = '0; wl_a[r] = 1'b1;
      check(model[r], ~model[r], "after overwrite");
    end
    // a write with no wordline raised changes nothing
    @(negedge clk);
    wl_a = '0; we = 1'b1; wdata = ~model[9];
    @(negedge clk);
    we = 1'b0; wl_a[9] = 1'b1;
    check(model[9], ~model[9], "write without wordline");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
