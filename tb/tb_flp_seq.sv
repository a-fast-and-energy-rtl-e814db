// tb_flp_seq: runs the floating-point sequencer on a CiM array. Operands
// (two's-complement mantissa row, exponent row) are written into the array,
// one add, subtract or add-absolute-value is run, and the result rows are
// read back. The result must be normalised (leading magnitude bit at
// MANT_W-2, or a zero mantissa) and its value must match the exact result,
// computed here with integer shifts to the smaller exponent and converted
// to real, within the truncation the normalisation and large-gap alignment
// allow (2**-(MANT_W-4) of the operand magnitudes). Operands that stay
// small make the result exact, and that is checked exactly. Cases include
// equal exponents, either operand larger, gaps above 31 (shifts in several
// passes) and above the headroom (right shift of the smaller operand),
// negative operands, cancellation to zero, and D written over A.
// The alignment direction checked is the published one; the number format,
// the normalisation target and the tolerance are this design's own.
module tb_flp_seq;
  import cim_pkg::*;
  localparam int unsigned M = 64, N = 64;
  localparam logic [1:0] MODE_ADD = 2'd0, MODE_SUB = 2'd1, MODE_ABSADD = 2'd2;
  logic         clk = 1'b0;
  logic         rst_n;
  cim_uop_t     uop, f_uop, h_uop;
  logic [N-1:0] data_in, h_din, f_din, out;
  logic         cout;
  logic         start, busy, done, host;
  logic [1:0]   mode;
  logic [7:0]   a_m, a_e, b_m, b_e, d_m, d_e;
  int checks = 0, failures = 0;
  localparam int unsigned MANT_W = 32;
  int multi_step = 0, shift_a = 0, shift_b = 0, neg_abs = 0;
  int gap_right = 0, norm_left = 0, norm_right = 0;
  bit in_norm = 0;

  cim_array #(.M(M), .N(N)) u_arr (.clk(clk), .rst_n(rst_n), .uop(uop), .data_in(data_in),
                                   .out(out), .cout(cout));
  flp_seq #(.M(M), .N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .mode(mode),
                               .a_m(a_m), .a_e(a_e), .b_m(b_m), .b_e(b_e), .d_m(d_m), .d_e(d_e),
                               .uop(f_uop), .data_in(f_din), .arr_out(out), .busy(busy),
                               .done(done));

  assign uop = host ? h_uop : f_uop;
  assign data_in = host ? h_din : f_din;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count shift steps by direction of the operand being shifted
  always @(posedge clk) begin
    if (start) in_norm <= 0;
    if (busy && f_uop.wr && !f_uop.wr_ext && f_uop.row_a == d_m) in_norm <= 1;
    if (busy && f_uop.rd && f_uop.mask != MASK_NONE) begin
      if (in_norm) begin
        if (f_uop.mask[0]) norm_left++;
        else norm_right++;
      end else begin
        if (f_uop.row_a == a_m) shift_a++;
        if (f_uop.row_a == b_m) shift_b++;
        if (f_uop.mask[0] && (f_uop.row_a == 8'(M-2) || f_uop.row_a == 8'(M-3))) multi_step++;
        if (!f_uop.mask[0] && f_uop.mask != shift_mask(1'b1, 5'd0)) gap_right++;
      end
    end
  end

  task automatic host_wr(input int r, input logic [N-1:0] d);
    host = 1'b1;
    h_uop = uop_wr(8'(r), 1'b1);
    h_din = d;
    @(posedge clk);
    #1;
    host = 1'b0;
  endtask

  task automatic host_rd(input int r, output logic [N-1:0] d);
    host = 1'b1;
    h_uop = uop_rd(OP_OR, 8'(r), 1'b0, '0, 1'b0, MASK_NONE);
    @(posedge clk);
    #1;
    host = 1'b0;
    d = out;
  endtask

  task automatic run(input logic signed [N-1:0] ma, input int ea, input logic signed [N-1:0] mb,
                     input int eb, input logic [1:0] md, input bit alias_a);
    logic signed [N-1:0] xa, xb, exp_m, got_m, got_e;
    int er, cycles;
    real va, vb, ref_v;
    host_wr(0, ma); host_wr(1, N'(ea)); host_wr(2, mb); host_wr(3, N'(eb));
    a_m = 0; a_e = 1; b_m = 2; b_e = 3;
    d_m = alias_a ? 8'd0 : 8'd4;
    d_e = alias_a ? 8'd1 : 8'd5;
    mode = md;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      cycles++;
      if (cycles > 500) break;
    end
    checks++;
    if (busy || cycles > 500) begin
      failures++;
      $display("FAIL sequencer did not finish");
    end
    er = (ea < eb) ? ea : eb;
    va = $itor(ma) * (2.0 ** $itor(ea));
    vb = $itor(mb) * (2.0 ** $itor(eb));
    // integer reference, valid while the aligned mantissas fit in 64 bits
    xa = ((ea - er) < 30) ? ma <<< (ea - er) : '0;
    xb = ((eb - er) < 30) ? mb <<< (eb - er) : '0;
    case (md)
      MODE_ADD: begin
        exp_m = xa + xb;
        ref_v = va + vb;
      end
      MODE_SUB: begin
        exp_m = xa - xb;
        ref_v = va - vb;
      end
      default: begin
        exp_m = xa + ((xb < 0) ? -xb : xb);
        ref_v = va + ((vb < 0.0) ? -vb : vb);
        if (vb < 0.0) neg_abs++;
      end
    endcase
    host_rd(int'(d_m), got_m);
    host_rd(int'(d_e), got_e);
    begin
      real got_v, tol;
      logic signed [N-1:0] lim;
      got_v = $itor(got_m) * (2.0 ** $itor(got_e));
      tol = ((va < 0.0 ? -va : va) + (vb < 0.0 ? -vb : vb)) * (2.0 ** -$itor(MANT_W - 4));
      // exact whenever the operands keep the result within MANT_W-1 bits
      if (exp_m < (64'sd1 <<< (MANT_W - 2)) && exp_m >= -(64'sd1 <<< (MANT_W - 2)) &&
          (ea - er) < 30 && (eb - er) < 30) tol = 0.0;
      checks++;
      if ((got_v - ref_v > tol) || (ref_v - got_v > tol)) begin
        failures++;
        $display("FAIL mode=%0d a=%0d*2^%0d b=%0d*2^%0d got %0d*2^%0d = %g, exp %g",
                 md, ma, ea, mb, eb, got_m, got_e, got_v, ref_v);
      end
      lim = 64'sd1 <<< (MANT_W - 2);
      checks++;
      if (!(got_m == 0 || (got_m >= lim && got_m < 2 * lim) || (got_m < -lim && got_m >= -2 * lim))) begin
        failures++;
        $display("FAIL result mantissa %0d not normalised", got_m);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    host = 1'b0;
    start = 1'b0;
    mode = MODE_ADD;
    h_uop = uop_nop();
    h_din = '0;
    {a_m, a_e, b_m, b_e, d_m, d_e} = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after reset");
    end
    run(64'sd12, 3, 64'sd5, 3, MODE_ADD, 0);
    run(64'sd12, 5, 64'sd5, 2, MODE_ADD, 0);
    run(64'sd12, -2, 64'sd5, 4, MODE_SUB, 0);
    run(-64'sd7, 0, 64'sd9, 1, MODE_ABSADD, 0);
    run(64'sd7, 0, -64'sd9, -1, MODE_ABSADD, 0);
    run(64'sd3, 45, 64'sd1000, 0, MODE_ADD, 0);     // gap of 45: two shift steps
    run(-64'sd3, -20, 64'sd77, 20, MODE_SUB, 0);    // gap of 40 the other way
    run(64'sd1 <<< 40, 0, 64'sd5, 3, MODE_ADD, 0);  // large mantissa: normalise right
    run(-(64'sd1 <<< 40) + 64'sd12345, 0, 64'sd1 <<< 29, 50, MODE_ADD, 0);  // gap above headroom
    run(64'sd1 <<< 29, 50, -(64'sd1 <<< 40) - 64'sd777, 0, MODE_SUB, 0);
    run(64'sd100, 2, 64'sd400, 0, MODE_SUB, 1);     // cancels to zero
    for (int i = 0; i < 300; i++) begin
      logic signed [N-1:0] ma, mb;
      ma = N'($signed(32'($urandom_range(2**21)) - 32'(2**20)));
      mb = N'($signed(32'($urandom_range(2**21)) - 32'(2**20)));
      run(ma, $urandom_range(16) - 8, mb, $urandom_range(16) - 8, 2'($urandom_range(2)),
          1'($urandom_range(1)));
      // normalised operands far apart in exponent
      ma = (64'sd1 <<< 30) + N'($urandom_range(2**20));
      mb = -(64'sd1 <<< 30) - N'($urandom_range(2**20));
      run(ma, $urandom_range(80) - 40, mb, $urandom_range(80) - 40, 2'($urandom_range(2)), 1'b0);
    end
    checks++;
    if (multi_step == 0 || shift_a == 0 || shift_b == 0 || neg_abs == 0 || gap_right == 0 ||
        norm_left == 0 || norm_right == 0) begin
      failures++;
      $display("FAIL coverage multi_step=%0d shift_a=%0d shift_b=%0d neg_abs=%0d",
               multi_step, shift_a, shift_b, neg_abs);
    end
    $display("coverage: multi-step shifts=%0d, A shifted=%0d, B shifted=%0d, negative |B|=%0d",
             multi_step, shift_a, shift_b, neg_abs);
    $display("          right-shifted smaller operand=%0d, normalise left=%0d right=%0d",
             gap_right, norm_left, norm_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
