// tb_dhnn_top_full -- the DHNN at its default size (8 neurons as a 4x2 image, 2 stored
// patterns, sequential architecture), recalling stored patterns from damaged copies.
// Two orthogonal patterns are stored. First, a copy of pattern 2 with its first element
// flipped is repaired by one update of that element. Then, for each stored pattern and
// each of the 8 positions, a copy with that element flipped is run until stable
// (starting at the damaged element) and must come back to the stored pattern, matching
// the weight-matrix reference model, with the latency 19 cycles per update.
module tb_dhnn_top_full;
  import dhnn_ref_pkg::*;
  localparam int N = 8, M = 2, T_UPD = 3 + M * N;
  logic clk = 0, rst_n = 0;
  logic x_we = 0, y_we = 0, start = 0, run_mode = 0;
  logic [0:0] x_pat = '0;
  logic [N-1:0] x_data = '0, y_data = '0, y_out;
  logic [2:0] start_idx = '0;
  logic busy, done, converged, last_changed;
  logic [15:0] update_count;
  int checks = 0, failures = 0;

  dhnn_top dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] xs [M];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input logic mode, input int idx, output int cyc);
    @(negedge clk); start = 1; run_mode = mode; start_idx = 3'(idx);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    @(negedge clk);
  endtask

  task automatic load_y(input logic [N-1:0] y);
    @(negedge clk); y_we = 1; y_data = y;
    @(negedge clk); y_we = 0;
  endtask

  initial begin
    int cyc;
    xs[0] = 8'b0011_0011;
    xs[1] = 8'b1010_0101;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < M; u++) begin
      @(negedge clk); x_we = 1; x_pat = 1'(u); x_data = xs[u];
    end
    @(negedge clk); x_we = 0;

    load_y(xs[1] ^ 8'b0000_0001);
    run(1'b0, 0, cyc);
    check(y_out == xs[1] && last_changed, "one update repairs the first element");
    check(cyc == T_UPD, "update latency");

    for (int u = 0; u < M; u++)
      for (int k = 0; k < N; k++) begin
        logic [N-1:0] y, ny;
        int i, quiet, n;
        y = xs[u] ^ N'(1 << k);
        ny = y; i = k; quiet = 0; n = 0;
        while (quiet < N && n < 500) begin
          logic [N-1:0] nxt;
          nxt = update(xs, ny, i);
          quiet = (nxt == ny) ? quiet + 1 : 0;
          ny = nxt; n++; i = (i + 1) % N;
        end
        load_y(y);
        run(1'b1, k, cyc);
        check(ny == xs[u], "reference recalls the stored pattern");
        check(y_out == ny && converged && int'(update_count) == n, "recall");
        check(cyc == n * T_UPD, "recall time");
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
