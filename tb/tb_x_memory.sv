// tb_x_memory -- self-checking test of the storage-pattern memory (N = 8, M = 2): writes
// random patterns and checks both read ports (selected neuron, stream index) against a
// software copy.
module tb_x_memory;
  localparam int N = 8, M = 2;
  logic clk = 0, rst_n = 0, we = 0;
  logic [0:0] wpat = '0;
  logic [N-1:0] wdata = '0, sel = '0;
  logic [M-1:0] x_sel, x_j;
  logic [2:0] j = '0;
  logic [N-1:0] model [M];
  int checks = 0, failures = 0;

  x_memory #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model[0] = '0; model[1] = '0;
    for (int k = 0; k < 200; k++) begin
      int i;
      @(negedge clk);
      we = 1'($urandom);
      wpat = 1'($urandom);
      wdata = N'($urandom);
      i = $urandom_range(0, N - 1);
      sel = N'(1 << i);
      j = 3'($urandom);
      #1;
      for (int u = 0; u < M; u++) begin
        checks++;
        if (x_sel[u] !== model[u][i] || x_j[u] !== model[u][j]) begin
          failures++;
          $display("FAIL pattern %0d: x_sel=%b x_j=%b expected %b %b", u, x_sel[u], x_j[u],
                   model[u][i], model[u][j]);
        end
      end
      @(posedge clk);
      if (we) model[wpat] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
