// tb_ndroc -- self-checking test of the NDROC cell: set, reset, non-destructive reads
// on both outputs, set priority, and read timing (a read sees the state before a set
// in the same cycle).
module tb_ndroc;
  logic clk = 0, rst_n = 0, set = 0, rst = 0, clk_in = 0;
  logic out, outb, state;
  int checks = 0, failures = 0;

  ndroc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic exp_out, exp_outb, input string what);
    checks++;
    if (out !== exp_out || outb !== exp_outb) begin
      failures++;
      $display("FAIL %s: out=%b outb=%b expected %b %b", what, out, outb, exp_out, exp_outb);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clk_in = 1; #1 check(0, 1, "read after reset");
    clk_in = 0; #1 check(0, 0, "no read, no pulse");
    set = 1; clk_in = 1; #1 check(0, 1, "read in set cycle sees old state");
    @(negedge clk); set = 0; #1 check(1, 0, "read after set");
    // several reads do not destroy the state
    repeat (3) begin @(negedge clk); #1 check(1, 0, "repeated read"); end
    clk_in = 0; rst = 1; @(negedge clk); rst = 0; clk_in = 1; #1 check(0, 1, "read after reset pulse");
    set = 1; rst = 1; @(negedge clk); set = 0; rst = 0; #1 check(1, 0, "set wins over rst");
    clk_in = 0;
    for (int k = 0; k < 40; k++) begin
      logic s, r, exp;
      s = 1'($urandom); r = 1'($urandom);
      exp = s ? 1'b1 : (r ? 1'b0 : state);
      set = s; rst = r; @(negedge clk); set = 0; rst = 0; clk_in = 1; #1
      check(exp, ~exp, "random");
      clk_in = 0;
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
