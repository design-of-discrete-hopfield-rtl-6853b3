// tb_dhnn_controller -- self-checking test of the update sequencer, both architectures.
// The datapath is replaced by the testbench, which drives sign and differs and checks
// every strobe cycle by cycle: decoder load with the right neuron, read-and-reset,
// M*N (sequential) or N (parallel) stream cycles with the right PE and index, the pass
// cycle, write-back with y_set = sign, the update latency, and in run mode the neuron
// order and the stop after N updates in a row without a change.
module tb_dhnn_controller;
  import dhnn_pkg::*;
  localparam int N = 8, M = 2;
  logic clk = 0, rst_n = 0, start = 0, run_mode = 0, sign = 0, differs = 0;
  logic [2:0] start_idx = '0;
  int checks = 0, failures = 0;

  ctrl_t      ctrl   [2];
  logic [2:0] addr   [2], j [2];
  logic [M-1:0] pe_valid [2];
  logic busy [2], done [2], converged [2], last_changed [2];
  logic [15:0] update_count [2];

  for (genvar p = 0; p < 2; p++) begin : g_dut
    dhnn_controller #(.N(N), .M(M), .PARALLEL(p == 1)) dut (
      .clk, .rst_n, .start, .run_mode, .start_idx, .sign, .differs,
      .ctrl(ctrl[p]), .addr(addr[p]), .j(j[p]), .pe_valid(pe_valid[p]), .busy(busy[p]),
      .done(done[p]), .converged(converged[p]), .last_changed(last_changed[p]),
      .update_count(update_count[p]));
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Follow one update of neuron i on instance p, from the ADDR cycle on. Called at a
  // negedge with the controller in ADDR. Returns at the negedge after WRITE.
  task automatic follow(input int p, input int i, input logic s, input logic d,
                        input logic last);
    ctrl_t c;
    check(ctrl[p].dec_load && !ctrl[p].dec_read && int'(addr[p]) == i, "ADDR");
    @(negedge clk);
    c = ctrl[p];
    check(c.dec_read && c.y_clear && c.pe_set && c.cnt_clear && !c.y_set && !c.dec_load,
          "READ strobes");
    check(pe_valid[p] == '0, "no term in READ");
    for (int u = 0; u < (p ? 1 : M); u++)
      for (int jj = 0; jj < N; jj++) begin
        @(negedge clk);
        check(int'(j[p]) == jj, "stream index");
        check(pe_valid[p] == (p ? {M{1'b1}} : M'(1 << u)), "active PE");
        check(!ctrl[p].dec_read && !ctrl[p].cnt_pass, "quiet while streaming");
      end
    if (p) begin
      @(negedge clk);
      check(ctrl[p].cnt_pass && pe_valid[p] == '0, "PASS");
    end
    @(negedge clk);
    sign = s; differs = d; #1;
    check(ctrl[p].dec_read && ctrl[p].y_set == s && !ctrl[p].y_clear, "WRITE strobes");
    check(done[p] == last, "done");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      // single updates
      for (int t = 0; t < 6; t++) begin
        int i;
        logic s;
        i = $urandom_range(0, N - 1); s = 1'($urandom);
        @(negedge clk); start = 1; run_mode = 0; start_idx = 3'(i);
        @(negedge clk); start = 0;
        follow(p, i, s, 1'b1, 1'b1);
        check(!busy[p] && !converged[p] && update_count[p] == 1 && last_changed[p], "single end");
      end
      // run mode: changes at updates 0, 2, 5, then none; stops after N quiet updates
      begin
        int i, k, quiet;
        i = $urandom_range(0, N - 1);
        @(negedge clk); start = 1; run_mode = 1; start_idx = 3'(i);
        @(negedge clk); start = 0;
        k = 0; quiet = 0;
        while (1) begin
          logic d;
          d = (k == 0 || k == 2 || k == 5);
          quiet = d ? 0 : quiet + 1;
          follow(p, i, 1'($urandom), d, quiet == N);
          k++;
          i = (i + 1) % N;
          if (quiet == N || k > 40) break;
        end
        check(k == 6 + N && !busy[p] && converged[p] && update_count[p] == 16'(k),
              "run-mode stop");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
