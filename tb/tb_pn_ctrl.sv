// tb_pn_ctrl: runs the prototypical-network sequencer on a CiM array.
// iM-Mean: K = 1, 2, 4 and 8 random floating-point support vectors are
// written into the array, MEAN is run and each prototype element read back
// must equal the mean of the supports (compared as real values).
// iM-NearestNeighbor: a random query and C random prototypes are written,
// NN is run, and class_idx must name the prototype with the smallest
// Manhattan distance worked out here in real arithmetic; the BEST slot must
// hold that distance. The same two commands are then run on fixed-point
// data (one two's-complement row per element): the mean must equal the
// floor of the sum divided by K, and the nearest class and its distance
// must be exact, with a tie going to the lower class. An unknown command
// must end at once with err set.
// The arithmetic checked follows the published method; data layout,
// command encoding, tie rule and err flag are this design's own.
module tb_pn_ctrl;
  import cim_pkg::*;
  localparam int unsigned M = 64, N = 64;
  localparam logic [1:0] CMD_MEAN = 2'd1, CMD_NN = 2'd2;
  logic         clk = 1'b0;
  logic         rst_n;
  cim_uop_t     uop, c_uop, h_uop;
  logic [N-1:0] data_in, c_din, h_din, out;
  logic         cout, host;
  logic         start, busy, done, err, fix_pt;
  logic [1:0]   cmd;
  logic [7:0]   src_slot, dst_slot, dim, count, class_idx;
  logic [4:0]   k_log2;
  int checks = 0, failures = 0;
  int best_updates = 0, best_kept = 0;
  int fx_neg_mean = 0, fx_pos_mean = 0, fx_neg_diff = 0, fx_pos_diff = 0, fx_ties = 0;

  cim_array #(.M(M), .N(N)) u_arr (.clk(clk), .rst_n(rst_n), .uop(uop), .data_in(data_in),
                                   .out(out), .cout(cout));
  pn_ctrl #(.M(M), .N(N), .CW(8)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cmd(cmd), .fix_pt(fix_pt),
    .src_slot(src_slot),
    .dst_slot(dst_slot), .dim(dim), .count(count), .k_log2(k_log2), .uop(c_uop),
    .data_in(c_din), .arr_out(out), .busy(busy), .done(done), .err(err), .class_idx(class_idx));

  assign uop = host ? h_uop : c_uop;
  assign data_in = host ? h_din : c_din;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  function automatic real flp(input logic signed [N-1:0] m, input logic signed [N-1:0] e);
    return $itor(m) * (2.0 ** $itor(e));
  endfunction

  task automatic put(input int slot, input logic signed [N-1:0] m, input int e);
    host_wr(2 * slot, m);
    host_wr(2 * slot + 1, N'(e));
  endtask

  task automatic get(input int slot, output real v);
    logic [N-1:0] m, e;
    host_rd(2 * slot, m);
    host_rd(2 * slot + 1, e);
    v = flp(m, e);
  endtask

  task automatic go(input logic [1:0] c, input int src, input int dst, input int d, input int cnt,
                    input int kl);
    int cycles;
    cmd = c;
    src_slot = 8'(src);
    dst_slot = 8'(dst);
    dim = 8'(d);
    count = 8'(cnt);
    k_log2 = 5'(kl);
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 100000) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL command %0d never finished", c);
    end
  endtask

  function automatic logic signed [N-1:0] rnd_m();
    return N'($signed(32'($urandom_range(8192)) - 32'd4096));
  endfunction

  // iM-Mean with K = 2**kl supports of dimension d
  task automatic mean_test(input int kl, input int d);
    int k;
    real sum [8];
    real got;
    k = 1 << kl;
    for (int j = 0; j < d; j++) sum[j] = 0.0;
    for (int s = 0; s < k; s++)
      for (int j = 0; j < d; j++) begin
        logic signed [N-1:0] m;
        int e;
        m = rnd_m();
        e = $urandom_range(8) - 4;
        put(s * d + j, m, e);
        sum[j] += flp(m, N'(e));
      end
    go(CMD_MEAN, 0, k * d, d, 0, kl);
    checks++;
    if (err) begin
      failures++;
      $display("FAIL MEAN err");
    end
    for (int j = 0; j < d; j++) begin
      get(k * d + j, got);
      checks++;
      if (got != sum[j] / $itor(k)) begin
        failures++;
        $display("FAIL MEAN K=%0d elem %0d got %f exp %f", k, j, got, sum[j] / $itor(k));
      end
    end
  endtask

  // iM-NearestNeighbor with c prototypes of dimension d
  task automatic nn_test(input int c, input int d);
    real q [8];
    real mdist [8];
    real got;
    int best;
    for (int j = 0; j < d; j++) begin
      logic signed [N-1:0] m;
      int e;
      m = rnd_m();
      e = $urandom_range(6) - 3;
      put(j, m, e);
      q[j] = flp(m, N'(e));
    end
    for (int p = 0; p < c; p++) begin
      mdist[p] = 0.0;
      for (int j = 0; j < d; j++) begin
        logic signed [N-1:0] m;
        int e;
        real v;
        m = rnd_m();
        e = $urandom_range(6) - 3;
        put(d + p * d + j, m, e);
        v = flp(m, N'(e));
        mdist[p] += (q[j] > v) ? q[j] - v : v - q[j];
      end
    end
    best = 0;
    for (int p = 1; p < c; p++) begin
      if (mdist[p] < mdist[best]) begin
        best = p;
        best_updates++;
      end else best_kept++;
    end
    go(CMD_NN, d, 0, d, c, 0);
    checks++;
    if (err || int'(class_idx) != best) begin
      failures++;
      $display("FAIL NN class %0d exp %0d (err=%0d)", class_idx, best, err);
    end
    get((M - 12) / 2, got);
    checks++;
    if (got != mdist[best]) begin
      failures++;
      $display("FAIL NN best distance %f exp %f", got, mdist[best]);
    end
  endtask

  // fixed-point iM-Mean: rows 0 .. K*d-1 hold the supports, the mean goes
  // to rows K*d .. K*d+d-1
  task automatic fx_mean_test(input int kl, input int d);
    int k;
    longint sum [8];
    logic [N-1:0] got;
    k = 1 << kl;
    for (int j = 0; j < d; j++) sum[j] = 0;
    for (int s = 0; s < k; s++)
      for (int j = 0; j < d; j++) begin
        longint v;
        v = longint'($urandom_range(2000000)) - 1000000;
        host_wr(s * d + j, N'(v));
        sum[j] += v;
      end
    fix_pt = 1'b1;
    go(CMD_MEAN, 0, k * d, d, 0, kl);
    fix_pt = 1'b0;
    checks++;
    if (err) begin
      failures++;
      $display("FAIL fixed MEAN err");
    end
    for (int j = 0; j < d; j++) begin
      longint expv;
      expv = sum[j] >>> kl;                  // floor(sum / K)
      if (sum[j] < 0) fx_neg_mean++;
      else fx_pos_mean++;
      host_rd(k * d + j, got);
      checks++;
      if ($signed(got) != expv) begin
        failures++;
        $display("FAIL fixed MEAN K=%0d elem %0d got %0d exp %0d", k, j, $signed(got), expv);
      end
    end
  endtask

  // fixed-point iM-NearestNeighbor: query in rows 0 .. d-1, prototype p in
  // rows d + p*d ..; with tie set, the last prototype repeats an earlier one
  task automatic fx_nn_test(input int c, input int d, input bit tie);
    longint q [8];
    longint pv [8][8];
    longint mdist [8];
    logic [N-1:0] got;
    int best, twin;
    for (int j = 0; j < d; j++) begin
      q[j] = longint'($urandom_range(200000)) - 100000;
      host_wr(j, N'(q[j]));
    end
    twin = tie ? int'($urandom_range(c - 2)) : 0;
    for (int p = 0; p < c; p++) begin
      mdist[p] = 0;
      for (int j = 0; j < d; j++) begin
        pv[p][j] = (tie && p == c - 1) ? pv[twin][j] : longint'($urandom_range(200000)) - 100000;
        host_wr(d + p * d + j, N'(pv[p][j]));
        if (q[j] < pv[p][j]) fx_neg_diff++;
        else fx_pos_diff++;
        mdist[p] += (q[j] > pv[p][j]) ? q[j] - pv[p][j] : pv[p][j] - q[j];
      end
    end
    best = 0;
    for (int p = 1; p < c; p++) if (mdist[p] < mdist[best]) best = p;
    if (tie && best == twin) fx_ties++;
    fix_pt = 1'b1;
    go(CMD_NN, d, 0, d, c, 0);
    fix_pt = 1'b0;
    checks++;
    if (err || int'(class_idx) != best) begin
      failures++;
      $display("FAIL fixed NN class %0d exp %0d (err=%0d)", class_idx, best, err);
    end
    host_rd(M - 12, got);
    checks++;
    if ($signed(got) != mdist[best]) begin
      failures++;
      $display("FAIL fixed NN best distance %0d exp %0d", $signed(got), mdist[best]);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    fix_pt = 1'b0;
    host = 1'b0;
    start = 1'b0;
    h_uop = uop_nop();
    h_din = '0;
    cmd = '0;
    {src_slot, dst_slot, dim, count} = '0;
    k_log2 = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    mean_test(0, 3);
    mean_test(1, 4);
    mean_test(2, 4);
    mean_test(3, 2);
    for (int i = 0; i < 6; i++) mean_test(2, 3);
    for (int i = 0; i < 8; i++) nn_test(5, 4);
    nn_test(1, 3);
    nn_test(3, 6);
    fx_mean_test(0, 3);
    for (int kl = 1; kl <= 3; kl++) fx_mean_test(kl, 4);
    for (int i = 0; i < 4; i++) fx_mean_test(2, 4);
    for (int i = 0; i < 6; i++) fx_nn_test(5, 4, 1'b0);
    for (int i = 0; i < 6; i++) fx_nn_test(4, 3, 1'b1);
    fx_nn_test(1, 2, 1'b0);
    checks++;
    if (fx_neg_mean == 0 || fx_pos_mean == 0 || fx_neg_diff == 0 || fx_pos_diff == 0 ||
        fx_ties == 0) begin
      failures++;
      $display("FAIL fixed-point coverage: mean -%0d +%0d, diff -%0d +%0d, ties %0d",
               fx_neg_mean, fx_pos_mean, fx_neg_diff, fx_pos_diff, fx_ties);
    end
    fix_pt = 1'b1;
    go(CMD_MEAN, 0, 0, 0, 1, 0);
    fix_pt = 1'b0;
    checks++;
    if (!err) begin
      failures++;
      $display("FAIL fixed MEAN with dim 0 without err");
    end
    go(2'd0, 0, 0, 1, 1, 0);
    checks++;
    if (!err) begin
      failures++;
      $display("FAIL unknown command without err");
    end
    checks++;
    if (best_updates == 0 || best_kept == 0) begin
      failures++;
      $display("FAIL coverage: best updated %0d kept %0d", best_updates, best_kept);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
