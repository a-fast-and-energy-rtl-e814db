// tb_cim_pn_top: end-to-end few-shot episodes on the full CiM-PN at its
// default size (4 arrays of 64 x 64). Each episode is a 4-way 4-shot task
// on 4-element embeddings:
//   1. the 4 support vectors of class a are written into array a;
//   2. MEAN is broadcast, so all four arrays compute their class
//      prototype at the same time;
//   3. the host reads the prototypes back and writes them, with the query,
//      into array 0;
//   4. NN in array 0 returns the nearest class.
// The prototypes are compared with the real-valued means, the class with
// the real-valued Manhattan argmin, and in the last episodes the query is a
// support of a chosen class, slightly moved, so the answer is known.
// The stimulus is also scanned for how often it forces each mechanism:
// exponent alignment shifts, the absolute value of a negative difference, a
// new best distance and a kept one; with the cycles where all four arrays
// were busy at once, a rejected command and normalised prototype
// mantissas, each must occur at least once.
// Fixed-point episodes then repeat the four steps on integer embeddings
// (one row per element). There the prototypes must equal the floor of the
// mean exactly, and a negative sum must have been divided by the
// sign-keeping right shift at least once.
// The episode steps follow prototypical-network inference; the episode
// sizes and the way prototypes are gathered into one array are this
// testbench's own.
module tb_cim_pn_top;
  import cim_pkg::*;
  localparam int unsigned NA = 4, M = 64, N = 64, D = 4, K = 4;
  localparam logic [1:0] CMD_MEAN = 2'd1, CMD_NN = 2'd2;
  logic          clk = 1'b0;
  logic          rst_n;
  logic [1:0]    host_sel;
  logic          host_wr, host_rd, cmd_start, cmd_bcast;
  logic [7:0]    host_row, src_slot, dst_slot, dim, count;
  logic [N-1:0]  host_wdata, host_rdata;
  logic [1:0]    cmd;
  logic          cmd_fix_pt;
  logic [4:0]    k_log2;
  logic [NA-1:0] busy, done, err;
  logic [7:0]    class_idx [NA];
  int checks = 0, failures = 0;
  // how often the stimulus forced each mechanism
  int n_align = 0;     // exponent alignment (left shift of one mantissa)
  int n_absneg = 0;    // absolute value of a negative difference
  int n_best = 0;      // a later class beat the best distance so far
  int n_kept = 0;      // a later class did not
  int n_parallel = 0;  // cycles with every array busy (broadcast MEAN)
  int n_err = 0;       // rejected command
  int n_norm = 0;      // prototype mantissas found normalised (leading bit at 30)
  int n_fx_negmean = 0; // fixed point: negative sum divided by the right shift
  int n_fx_absneg = 0;  // fixed point: negative difference inverted

  cim_pn_top dut (
    .clk(clk), .rst_n(rst_n), .host_sel(host_sel), .host_wr(host_wr), .host_rd(host_rd),
    .host_row(host_row), .host_wdata(host_wdata), .host_rdata(host_rdata),
    .cmd_start(cmd_start), .cmd_bcast(cmd_bcast), .cmd(cmd), .cmd_fix_pt(cmd_fix_pt),
    .src_slot(src_slot),
    .dst_slot(dst_slot), .dim(dim), .count(count), .k_log2(k_log2),
    .busy(busy), .done(done), .err(err), .class_idx(class_idx));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && busy == '1) n_parallel++;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic wr_row(input int a, input int r, input logic [N-1:0] d);
    host_sel = 2'(a);
    host_row = 8'(r);
    host_wdata = d;
    host_wr = 1'b1;
    tick();
    host_wr = 1'b0;
  endtask

  task automatic rd_row(input int a, input int r, output logic [N-1:0] d);
    host_sel = 2'(a);
    host_row = 8'(r);
    host_rd = 1'b1;
    tick();
    host_rd = 1'b0;
    d = host_rdata;
  endtask

  function automatic real flp(input logic signed [N-1:0] m, input logic signed [N-1:0] e);
    return $itor(m) * (2.0 ** $itor(e));
  endfunction

  task automatic run_cmd(input int a, input bit bcast, input logic [1:0] c, input int src,
                         input int dst, input int cnt, input int kl);
    int cycles;
    host_sel = 2'(a);
    cmd_bcast = bcast;
    cmd = c;
    src_slot = 8'(src);
    dst_slot = 8'(dst);
    dim = 8'(D);
    count = 8'(cnt);
    k_log2 = 5'(kl);
    cmd_start = 1'b1;
    tick();
    cmd_start = 1'b0;
    cycles = 0;
    while (busy != '0 && cycles < 100000) begin
      tick();
      cycles++;
    end
    checks++;
    if (busy != '0) begin
      failures++;
      $display("FAIL command did not finish");
    end
  endtask

  task automatic episode(input int target);
    logic signed [N-1:0] sm [NA][K][D];
    int se [NA][K][D];
    real proto [NA][D];
    real q [D];
    logic [N-1:0] pm [NA][D];
    logic [N-1:0] pe [NA][D];
    real mdist [NA];
    int best;
    // 1. supports
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < K; s++)
        for (int j = 0; j < D; j++) begin
          sm[a][s][j] = N'($signed(32'($urandom_range(4096)) - 32'd2048));
          se[a][s][j] = $urandom_range(6) - 3;
          wr_row(a, 2 * (s * D + j), sm[a][s][j]);
          wr_row(a, 2 * (s * D + j) + 1, N'(se[a][s][j]));
        end
    // 2. broadcast iM-Mean: prototype in slots K*D .. K*D+D-1 of each array
    run_cmd(0, 1'b1, CMD_MEAN, 0, K * D, 0, 2);
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        real sum, got;
        sum = 0.0;
        for (int s = 0; s < K; s++) begin
          sum += flp(sm[a][s][j], N'(se[a][s][j]));
          if (s > 0 && se[a][s][j] != se[a][0][j]) n_align++;
        end
        proto[a][j] = sum / $itor(K);
        rd_row(a, 2 * (K * D + j), pm[a][j]);
        rd_row(a, 2 * (K * D + j) + 1, pe[a][j]);
        got = flp(pm[a][j], pe[a][j]);
        checks++;
        if ((signed'(pm[a][j]) >= 64'sd1 <<< 30 && signed'(pm[a][j]) < 64'sd1 <<< 31) ||
            (signed'(pm[a][j]) < -(64'sd1 <<< 30) && signed'(pm[a][j]) >= -(64'sd1 <<< 31)))
          n_norm++;
        else begin
          failures++;
          $display("FAIL prototype mantissa %0d not normalised", signed'(pm[a][j]));
        end
        checks++;
        if (got != proto[a][j]) begin
          failures++;
          $display("FAIL prototype class %0d elem %0d: %f exp %f", a, j, got, proto[a][j]);
        end
      end
    // 3. query (slots 0..D-1) and prototypes (slots D..) into array 0
    for (int j = 0; j < D; j++) begin
      logic signed [N-1:0] m;
      int e;
      if (target >= 0) begin
        m = sm[target][0][j] + N'($signed(32'($urandom_range(8)) - 32'd4));
        e = se[target][0][j];
      end else begin
        m = N'($signed(32'($urandom_range(4096)) - 32'd2048));
        e = $urandom_range(6) - 3;
      end
      q[j] = flp(m, N'(e));
      wr_row(0, 2 * j, m);
      wr_row(0, 2 * j + 1, N'(e));
    end
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        wr_row(0, 2 * (D + a * D + j), pm[a][j]);
        wr_row(0, 2 * (D + a * D + j) + 1, pe[a][j]);
      end
    // 4. iM-NearestNeighbor in array 0
    run_cmd(0, 1'b0, CMD_NN, D, 0, NA, 0);
    best = 0;
    for (int a = 0; a < NA; a++) begin
      mdist[a] = 0.0;
      for (int j = 0; j < D; j++) begin
        mdist[a] += (q[j] > proto[a][j]) ? q[j] - proto[a][j] : proto[a][j] - q[j];
        if (q[j] < proto[a][j]) n_absneg++;
      end
      if (mdist[a] < mdist[best]) begin
        best = a;
        n_best++;
      end else if (a > 0) n_kept++;
    end
    checks++;
    if (err[0] || int'(class_idx[0]) != best) begin
      failures++;
      $display("FAIL episode: class %0d, expected %0d", class_idx[0], best);
    end
    if (target >= 0) $display("episode: query near a support of class %0d, nearest %0d (reference %0d)",
                              target, class_idx[0], best);
    else $display("episode: random query, nearest %0d (reference %0d)", class_idx[0], best);
  endtask

  // fixed-point episode: rows instead of slots, integer embeddings
  task automatic fx_episode(input int target);
    longint sv [NA][K][D];
    longint proto [NA][D];
    longint q [D];
    longint mdist [NA];
    logic [N-1:0] got;
    int best;
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < K; s++)
        for (int j = 0; j < D; j++) begin
          sv[a][s][j] = longint'($urandom_range(2000000)) - 1000000;
          wr_row(a, s * D + j, N'(sv[a][s][j]));
        end
    cmd_fix_pt = 1'b1;
    run_cmd(0, 1'b1, CMD_MEAN, 0, K * D, 0, 2);
    for (int a = 0; a < NA; a++)
      for (int j = 0; j < D; j++) begin
        longint sum;
        sum = 0;
        for (int s = 0; s < K; s++) sum += sv[a][s][j];
        proto[a][j] = sum >>> 2;
        if (sum < 0) n_fx_negmean++;
        rd_row(a, K * D + j, got);
        checks++;
        if ($signed(got) != proto[a][j]) begin
          failures++;
          $display("FAIL fixed prototype class %0d elem %0d: %0d exp %0d", a, j, $signed(got),
                   proto[a][j]);
        end
        wr_row(0, D + a * D + j, got);
      end
    for (int j = 0; j < D; j++) begin
      q[j] = (target >= 0) ? sv[target][0][j] + longint'($urandom_range(8)) - 4
                           : longint'($urandom_range(2000000)) - 1000000;
      wr_row(0, j, N'(q[j]));
    end
    run_cmd(0, 1'b0, CMD_NN, D, 0, NA, 0);
    cmd_fix_pt = 1'b0;
    best = 0;
    for (int a = 0; a < NA; a++) begin
      mdist[a] = 0;
      for (int j = 0; j < D; j++) begin
        mdist[a] += (q[j] > proto[a][j]) ? q[j] - proto[a][j] : proto[a][j] - q[j];
        if (q[j] < proto[a][j]) n_fx_absneg++;
      end
      if (mdist[a] < mdist[best]) best = a;
    end
    checks++;
    if (err[0] || int'(class_idx[0]) != best) begin
      failures++;
      $display("FAIL fixed-point episode: class %0d, expected %0d", class_idx[0], best);
    end
    $display("fixed-point episode: nearest %0d (reference %0d)", class_idx[0], best);
  endtask

  initial begin
    rst_n = 1'b0;
    cmd_fix_pt = 1'b0;
    host_sel = '0; host_wr = 1'b0; host_rd = 1'b0; host_row = '0; host_wdata = '0;
    cmd_start = 1'b0; cmd_bcast = 1'b0; cmd = '0;
    {src_slot, dst_slot, dim, count} = '0;
    k_log2 = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) episode(-1);
    for (int t = 0; t < NA; t++) episode(t);
    fx_episode(-1);
    fx_episode(1);
    fx_episode(3);
    // a command the sequencers do not know is rejected with err
    run_cmd(2, 1'b0, 2'd3, 0, 0, 1, 0);
    checks++;
    if (err[2]) n_err++;
    else begin
      failures++;
      $display("FAIL unknown command not flagged");
    end
    $display("mechanisms: alignments=%0d |negative difference|=%0d best updated=%0d kept=%0d",
             n_align, n_absneg, n_best, n_kept);
    $display("            all-arrays-busy cycles=%0d rejected commands=%0d normalised=%0d",
             n_parallel, n_err, n_norm);
    $display("            fixed point: negative means=%0d |negative difference|=%0d",
             n_fx_negmean, n_fx_absneg);
    checks++;
    if (n_align == 0 || n_absneg == 0 || n_best == 0 || n_kept == 0 || n_parallel == 0 ||
        n_err == 0 || n_norm == 0 || n_fx_negmean == 0 || n_fx_absneg == 0) begin
      failures++;
      $display("FAIL a mechanism never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
