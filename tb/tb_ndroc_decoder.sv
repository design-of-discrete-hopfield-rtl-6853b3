// tb_ndroc_decoder -- self-checking test of the NDROC-tree decoder (N = 8): each address
// must send the read pulse to exactly that output, no output without a read, repeated
// reads of one loaded address, and a non-power-of-two size (N = 6).
module tb_ndroc_decoder;
  logic clk = 0, rst_n = 0, load = 0, read = 0;
  logic [2:0] addr = '0;
  logic [7:0] sel;
  logic [5:0] sel6;
  int checks = 0, failures = 0;

  ndroc_decoder #(.N(8)) dut  (.clk, .rst_n, .load, .addr, .read, .sel);
  ndroc_decoder #(.N(6)) dut6 (.clk, .rst_n, .load, .addr, .read, .sel(sel6));

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input logic [5:0] exp6, input string what);
    checks++;
    if (sel !== exp || sel6 !== exp6) begin
      failures++;
      $display("FAIL %s: sel=%b sel6=%b expected %b %b", what, sel, sel6, exp, exp6);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); load = 1; addr = 3'(a);
      @(negedge clk); load = 0; addr = 3'($urandom);
      #1 check('0, '0, "no read");
      read = 1; #1 check(8'(1 << a), 6'(1 << a), "read");
      @(negedge clk); #1 check(8'(1 << a), 6'(1 << a), "second read");
      read = 0; #1 check('0, '0, "read off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
