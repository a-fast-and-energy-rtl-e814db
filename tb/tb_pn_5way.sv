// tb_pn_5way: 5-way K-shot classification on CiM-PN with five arrays, one
// per class, for K = 1, 2, 4 and 8. These are the shot counts used to
// benchmark prototypical networks on Omniglot and miniImageNet. Each class
// has five labelled samples. K = 4 uses the first four. K = 8 uses all
// five, with the first three taken twice, so a power-of-two mean can stand
// in for a 5-shot one.
//
// The embeddings are shortened so that a query and five prototypes fit in
// one 64-row array: 5 elements in fixed point (one row each) and 2
// elements in floating point (one two-row slot each). Real embeddings are
// 64 or 3200 elements long and do not fit at this array size.
//
// For each K and number format: the supports are written, MEAN is
// broadcast to all five arrays, each prototype is read back and checked
// against the mean worked out here, the prototypes and a query are copied
// into array 0, and NN must return the reference nearest class. Queries
// are either random or a slightly moved sample of a chosen class.
// The samples of a class scatter closely around a random class centre. A
// query taken near a sample should therefore land in that class, and most
// of them must. Floating-point samples of one class are stored with
// different exponents, so that the means need exponent alignment.
// Ways, shot counts and the 8-from-5 reuse follow the published
// evaluation; embedding lengths and data are this testbench's own.
module tb_pn_5way;
  import cim_pkg::*;
  localparam int unsigned NA = 5, M = 64, N = 64, S = 5;
  localparam int unsigned D_FX = 5, D_FP = 2;
  localparam logic [1:0] CMD_MEAN = 2'd1, CMD_NN = 2'd2;
  logic          clk = 1'b0;
  logic          rst_n;
  logic [2:0]    host_sel;
  logic          host_wr, host_rd, cmd_start, cmd_bcast, cmd_fix_pt;
  logic [7:0]    host_row, src_slot, dst_slot, dim, count;
  logic [N-1:0]  host_wdata, host_rdata;
  logic [1:0]    cmd;
  logic [4:0]    k_log2;
  logic [NA-1:0] busy, done, err;
  logic [7:0]    class_idx [NA];
  int checks = 0, failures = 0, hits = 0, near_queries = 0;

  cim_pn_top #(.NUM_ARRAYS(NA), .M(M), .N(N), .CW(8)) dut (
    .clk(clk), .rst_n(rst_n), .host_sel(host_sel), .host_wr(host_wr), .host_rd(host_rd),
    .host_row(host_row), .host_wdata(host_wdata), .host_rdata(host_rdata),
    .cmd_start(cmd_start), .cmd_bcast(cmd_bcast), .cmd(cmd), .cmd_fix_pt(cmd_fix_pt),
    .src_slot(src_slot), .dst_slot(dst_slot), .dim(dim), .count(count), .k_log2(k_log2),
    .busy(busy), .done(done), .err(err), .class_idx(class_idx));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic wr_row(input int a, input int r, input logic [N-1:0] d);
    host_sel = 3'(a);
    host_row = 8'(r);
    host_wdata = d;
    host_wr = 1'b1;
    tick();
    host_wr = 1'b0;
  endtask

  task automatic rd_row(input int a, input int r, output logic [N-1:0] d);
    host_sel = 3'(a);
    host_row = 8'(r);
    host_rd = 1'b1;
    tick();
    host_rd = 1'b0;
    d = host_rdata;
  endtask

  task automatic run_cmd(input bit bcast, input logic [1:0] c, input int src, input int dst,
                         input int d, input int cnt, input int kl);
    int cycles;
    host_sel = '0;
    cmd_bcast = bcast;
    cmd = c;
    src_slot = 8'(src);
    dst_slot = 8'(dst);
    dim = 8'(d);
    count = 8'(cnt);
    k_log2 = 5'(kl);
    cmd_start = 1'b1;
    tick();
    cmd_start = 1'b0;
    cycles = 0;
    while (busy != '0 && cycles < 200000) begin
      tick();
      cycles++;
    end
    checks++;
    if (busy != '0 || err != '0) begin
      failures++;
      $display("FAIL command %0d did not finish cleanly (err=%b)", c, err);
    end
  endtask

  // which of the S samples is shot s of a K-shot task
  function automatic int shot(input int s);
    return s % S;
  endfunction

  function automatic real flp(input logic signed [N-1:0] m, input logic signed [N-1:0] e);
    return $itor(m) * (2.0 ** $itor(e));
  endfunction

  // the nearest prototype, lowest class on a tie
  function automatic int argmin(input real mdist [NA]);
    int b = 0;
    for (int a = 1; a < NA; a++) if (mdist[a] < mdist[b]) b = a;
    return b;
  endfunction

  task automatic check_class(input string tag, input int kl, input int target, input int best);
    checks++;
    if (int'(class_idx[0]) != best) begin
      failures++;
      $display("FAIL %s %0d-shot: class %0d, expected %0d", tag, 1 << kl, class_idx[0], best);
    end
    if (target >= 0) begin
      near_queries++;
      if (int'(class_idx[0]) == target) hits++;
    end
  endtask

  // fixed-point task: rows s*D + j hold shot s, rows K*D + j the prototype
  task automatic fx_task(input int kl, input int target);
    localparam int D = D_FX;
    int k;
    longint smp [NA][S][D];
    longint proto [NA][D];
    longint q [D];
    real mdist [NA];
    logic [N-1:0] got;
    k = 1 << kl;
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        longint centre = longint'($urandom_range(200000)) - 100000;
        for (int i = 0; i < S; i++) smp[a][i][j] = centre + longint'($urandom_range(10000)) - 5000;
      end
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < k; s++)
        for (int j = 0; j < D; j++) wr_row(a, s * D + j, N'(smp[a][shot(s)][j]));
    cmd_fix_pt = 1'b1;
    run_cmd(1'b1, CMD_MEAN, 0, k * D, D, 0, kl);
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        longint sum = 0;
        for (int s = 0; s < k; s++) sum += smp[a][shot(s)][j];
        proto[a][j] = sum >>> kl;
        rd_row(a, k * D + j, got);
        checks++;
        if ($signed(got) != proto[a][j]) begin
          failures++;
          $display("FAIL fixed %0d-shot prototype %0d elem %0d: %0d exp %0d", k, a, j,
                   $signed(got), proto[a][j]);
        end
        wr_row(0, D + a * D + j, got);
      end
    for (int j = 0; j < D; j++) begin
      q[j] = (target >= 0) ? smp[target][S - 1][j] + longint'($urandom_range(2000)) - 1000
                           : longint'($urandom_range(200000)) - 100000;
      wr_row(0, j, N'(q[j]));
    end
    run_cmd(1'b0, CMD_NN, D, 0, D, NA, 0);
    cmd_fix_pt = 1'b0;
    for (int a = 0; a < NA; a++) begin
      mdist[a] = 0.0;
      for (int j = 0; j < D; j++)
        mdist[a] += $itor((q[j] > proto[a][j]) ? q[j] - proto[a][j] : proto[a][j] - q[j]);
    end
    check_class("fixed", kl, target, argmin(mdist));
  endtask

  // floating-point task: slots s*D + j hold shot s, slots K*D + j the prototype
  task automatic fp_task(input int kl, input int target);
    localparam int D = D_FP;
    int k;
    logic signed [N-1:0] sm [NA][S][D];
    int se [NA][S][D];
    real proto [NA][D];
    real q [D];
    real mdist [NA];
    logic [N-1:0] pm, pe;
    k = 1 << kl;
    // sample value close to centre / 4, stored as m * 2^e with e in -2 .. 2
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        int centre = int'($urandom_range(16000)) - 8000;
        for (int i = 0; i < S; i++) begin
          int v = centre + int'($urandom_range(400)) - 200;
          se[a][i][j] = int'($urandom_range(4)) - 2;
          sm[a][i][j] = N'(v >>> (se[a][i][j] + 2));
        end
      end
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < k; s++)
        for (int j = 0; j < D; j++) begin
          wr_row(a, 2 * (s * D + j), sm[a][shot(s)][j]);
          wr_row(a, 2 * (s * D + j) + 1, N'(se[a][shot(s)][j]));
        end
    run_cmd(1'b1, CMD_MEAN, 0, k * D, D, 0, kl);
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        real sum = 0.0;
        for (int s = 0; s < k; s++) sum += flp(sm[a][shot(s)][j], N'(se[a][shot(s)][j]));
        proto[a][j] = sum / $itor(k);
        rd_row(a, 2 * (k * D + j), pm);
        rd_row(a, 2 * (k * D + j) + 1, pe);
        checks++;
        if (flp(pm, pe) != proto[a][j]) begin
          failures++;
          $display("FAIL float %0d-shot prototype %0d elem %0d: %f exp %f", k, a, j,
                   flp(pm, pe), proto[a][j]);
        end
        wr_row(0, 2 * (D + a * D + j), pm);
        wr_row(0, 2 * (D + a * D + j) + 1, pe);
      end
    for (int j = 0; j < D; j++) begin
      logic signed [N-1:0] m;
      int e;
      if (target >= 0) begin
        m = sm[target][S - 1][j] + N'($signed(32'($urandom_range(16)) - 32'd8));
        e = se[target][S - 1][j];
      end else begin
        m = N'($signed(32'($urandom_range(4096)) - 32'd2048));
        e = $urandom_range(4) - 2;
      end
      q[j] = flp(m, N'(e));
      wr_row(0, 2 * j, m);
      wr_row(0, 2 * j + 1, N'(e));
    end
    run_cmd(1'b0, CMD_NN, D, 0, D, NA, 0);
    for (int a = 0; a < NA; a++) begin
      mdist[a] = 0.0;
      for (int j = 0; j < D; j++)
        mdist[a] += (q[j] > proto[a][j]) ? q[j] - proto[a][j] : proto[a][j] - q[j];
    end
    check_class("float", kl, target, argmin(mdist));
  endtask

  initial begin
    rst_n = 1'b0;
    host_sel = '0; host_wr = 1'b0; host_rd = 1'b0; host_row = '0; host_wdata = '0;
    cmd_start = 1'b0; cmd_bcast = 1'b0; cmd = '0; cmd_fix_pt = 1'b0;
    {src_slot, dst_slot, dim, count} = '0;
    k_log2 = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    for (int kl = 0; kl <= 3; kl++) begin
      fx_task(kl, -1);
      fx_task(kl, kl % NA);
      fx_task(kl, (kl + 2) % NA);
      fp_task(kl, -1);
      fp_task(kl, (kl + 1) % NA);
      fp_task(kl, (kl + 3) % NA);
    end
    $display("queries near a sample of a known class: %0d, classified as that class: %0d",
             near_queries, hits);
    checks++;
    if (2 * hits < near_queries) begin
      failures++;
      $display("FAIL fewer than half of the near queries found their class");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
