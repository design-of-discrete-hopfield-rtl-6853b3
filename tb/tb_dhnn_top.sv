// tb_dhnn_top -- end-to-end test of the DHNN, both architectures side by side
// (PARALLEL = 0, the default, and PARALLEL = 1), 8 neurons and 2 patterns.
// Each round loads random storage patterns and a random retrieve pattern into both,
// then runs single updates of random neurons and whole recalls until stable, and
// compares the pattern, the convergence flag, the number of updates and the latency
// with the weight-matrix reference model. Latency: 3 + M*N cycles per update for the
// sequential architecture and 4 + N for the parallel one. It also replays the recall
// of a pattern that differs from a stored one in its first element. Every mechanism is
// counted (single update, run to stable, y_i raised, y_i left at its reset value,
// y_i changed, unchanged, h_i = 0 tie, recovery of a stored pattern) and a mechanism
// that never occurred counts as a failure.
module tb_dhnn_top;
  import dhnn_ref_pkg::*;
  localparam int N = 8, M = 2;
  logic clk = 0, rst_n = 0;
  logic x_we = 0, y_we = 0, start = 0, run_mode = 0;
  logic [0:0] x_pat = '0;
  logic [N-1:0] x_data = '0, y_data = '0;
  logic [2:0] start_idx = '0;
  logic busy [2], done [2], converged [2], last_changed [2];
  logic [15:0] update_count [2];
  logic [N-1:0] y_out [2];
  int checks = 0, failures = 0;
  int n_single = 0, n_run = 0, n_raise = 0, n_keep0 = 0, n_change = 0, n_same = 0,
      n_tie = 0, n_recall = 0;

  dhnn_top dut_seq (
    .clk, .rst_n, .x_we, .x_pat, .x_data, .y_we, .y_data, .start, .run_mode, .start_idx,
    .busy(busy[0]), .done(done[0]), .converged(converged[0]), .last_changed(last_changed[0]),
    .update_count(update_count[0]), .y_out(y_out[0]));

  dhnn_top #(.PARALLEL(1'b1)) dut_par (
    .clk, .rst_n, .x_we, .x_pat, .x_data, .y_we, .y_data, .start, .run_mode, .start_idx,
    .busy(busy[1]), .done(done[1]), .converged(converged[1]), .last_changed(last_changed[1]),
    .update_count(update_count[1]), .y_out(y_out[1]));

  always #5 clk = ~clk;

  logic [N-1:0] xs [M];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load_patterns(input logic [N-1:0] x0, x1, y);
    xs[0] = x0; xs[1] = x1;
    @(negedge clk); x_we = 1; x_pat = 0; x_data = x0;
    @(negedge clk); x_pat = 1; x_data = x1;
    @(negedge clk); x_we = 0; y_we = 1; y_data = y;
    @(negedge clk); y_we = 0;
  endtask

  // Start both and wait for both to finish; returns cycles from start to done.
  task automatic run(input logic mode, input int idx, output int cyc [2]);
    bit fin [2];
    @(negedge clk); start = 1; run_mode = mode; start_idx = 3'(idx);
    cyc[0] = 0; cyc[1] = 0; fin[0] = 0; fin[1] = 0;
    @(negedge clk); start = 0;
    for (int c = 1; !(fin[0] && fin[1]) && c < 2000; c++) begin
      for (int p = 0; p < 2; p++) if (!fin[p] && done[p]) begin fin[p] = 1; cyc[p] = c; end
      @(negedge clk);
    end
  endtask

  initial begin
    int cyc [2];
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Recall of stored pattern 2 from a copy with its first element flipped.
    load_patterns(8'b0011_0011, 8'b1010_0101, 8'b1010_0100);
    run(1'b0, 0, cyc);
    for (int p = 0; p < 2; p++) check(y_out[p] == 8'b1010_0101, "first-element recall");
    if (y_out[0] == 8'b1010_0101) n_recall++;

    for (int round = 0; round < 60; round++) begin
      logic [N-1:0] y;
      load_patterns(N'($urandom), N'($urandom), N'($urandom));
      y = y_data;
      // single updates
      for (int t = 0; t < 4; t++) begin
        int i, h;
        logic [N-1:0] ny;
        i = $urandom_range(0, N - 1);
        h = h_of(xs, y, i);
        ny = update(xs, y, i);
        run(1'b0, i, cyc);
        n_single++;
        if (h == 0) n_tie++;
        if (ny[i]) n_raise++; else n_keep0++;
        if (ny[i] != y[i]) n_change++; else n_same++;
        for (int p = 0; p < 2; p++) begin
          check(y_out[p] == ny, "single update result");
          check(last_changed[p] == (ny[i] != y[i]), "changed flag");
          check(update_count[p] == 1 && !converged[p], "single update status");
        end
        check(cyc[0] == 3 + M * N, "sequential update latency");
        check(cyc[1] == 4 + N, "parallel update latency");
        y = ny;
      end
      // run until stable
      begin
        int i, i0, quiet, k;
        logic [N-1:0] ny;
        i0 = $urandom_range(0, N - 1);
        i = i0;
        quiet = 0; k = 0;
        ny = y;
        while (quiet < N && k < 500) begin
          logic [N-1:0] nxt;
          nxt = update(xs, ny, i);
          quiet = (nxt == ny) ? quiet + 1 : 0;
          ny = nxt; k++;
          i = (i + 1) % N;
        end
        run(1'b1, i0, cyc);
        n_run++;
        for (int p = 0; p < 2; p++) begin
          check(y_out[p] == ny, "stable pattern");
          check(converged[p] && int'(update_count[p]) == k, "convergence status");
        end
        check(cyc[0] == k * (3 + M * N), "sequential recall time");
        check(cyc[1] == k * (4 + N), "parallel recall time");
        if (ny == xs[0] || ny == xs[1]) n_recall++;
      end
    end

    $display("mechanisms: single=%0d run=%0d raise=%0d keep0=%0d change=%0d same=%0d tie=%0d recall=%0d",
             n_single, n_run, n_raise, n_keep0, n_change, n_same, n_tie, n_recall);
    checks++; if (n_single == 0) failures++;
    checks++; if (n_run == 0) failures++;
    checks++; if (n_raise == 0) failures++;
    checks++; if (n_keep0 == 0) failures++;
    checks++; if (n_change == 0) failures++;
    checks++; if (n_same == 0) failures++;
    checks++; if (n_tie == 0) failures++;
    checks++; if (n_recall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
