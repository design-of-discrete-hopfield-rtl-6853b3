// tb_bit_counter -- self-checking test of the T flip-flop chain counter: counts random
// pulse trains against a software count, checks clear and load, and wrap-around.
module tb_bit_counter;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, clear = 0, pulse = 0, load = 0;
  logic [W-1:0] load_val = '0, count;
  int checks = 0, failures = 0;
  int model;

  bit_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(count) != exp) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(0, "after reset");
    model = 0;
    for (int k = 0; k < 100; k++) begin
      pulse = 1'($urandom);
      if (pulse) model = (model + 1) % (1 << W);
      @(negedge clk); check(model, "counting");
    end
    pulse = 0; clear = 1; @(negedge clk); clear = 0; check(0, "clear");
    load = 1; load_val = 5'd13; pulse = 1; @(negedge clk); load = 0; pulse = 0; check(13, "load beats pulse");
    model = 13;
    repeat (40) begin pulse = 1; model = (model + 1) % 32; @(negedge clk); check(model, "wrap"); end
    pulse = 0;
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
