// tb_copy_buffers: checks the write-enable and the word put on the
// bitlines for idle, copy (result) and external data writes.
// The copy and external-write paths are the published ones; the priority
// checked for simultaneous requests is this design's own.
module tb_copy_buffers;
  localparam int unsigned N = 64;
  logic         clk = 1'b0;
  logic         enable_copy, data_in_en, we;
  logic [N-1:0] result, data_in, wdata;
  int checks = 0, failures = 0;

  copy_buffers #(.N(N)) dut (.enable_copy(enable_copy), .result(result),
                             .data_in_en(data_in_en), .data_in(data_in),
                             .we(we), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      int mode;
      mode = i % 3;
      result  = {$urandom(), $urandom()};
      data_in = {$urandom(), $urandom()};
      enable_copy = (mode == 1);
      data_in_en  = (mode == 2);
      @(posedge clk);
      checks++;
      if (we !== (mode != 0)) begin
        failures++;
        $display("FAIL we mode=%0d", mode);
      end
      if (mode != 0) begin
        checks++;
        if (wdata !== (mode == 1 ? result : data_in)) begin
          failures++;
          $display("FAIL wdata mode=%0d", mode);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
