// tb_row_decoder: exhaustive check of the row decoder. Every address with
// enable high must raise exactly its own wordline; enable low or an
// address beyond the last row must raise none.
// Decoding follows the published array; the behaviour beyond the last row
// is this design's own choice.
module tb_row_decoder;
  localparam int unsigned M = 64;
  logic         clk = 1'b0;
  logic         en;
  logic [7:0]   addr;
  logic [M-1:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.M(M), .AW(8)) dut (.en(en), .addr(addr), .wl(wl));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int e = 0; e < 2; e++) begin
        logic [M-1:0] exp_wl;
        en = 1'(e);
        addr = 8'(a);
        exp_wl = '0;
        if (e == 1 && a < M) exp_wl[a] = 1'b1;
        @(posedge clk);
        checks++;
        if (wl !== exp_wl) begin
          failures++;
          $display("FAIL en=%0d addr=%0d wl=%h exp=%h", e, a, wl, exp_wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
