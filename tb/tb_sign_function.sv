// tb_sign_function -- self-checking test of the sign function for the default 16 terms:
// for every number of +1 pulses 0..16 the sign must be 1 exactly when
// h = c - (16 - c) >= 0; also checks the load path used by the parallel architecture.
module tb_sign_function;
  localparam int TERMS = 16;
  localparam int W = $clog2(TERMS + 1);
  logic clk = 0, rst_n = 0, clear = 0, pulse = 0, load = 0, sign;
  logic [W-1:0] load_val = '0, count;
  int checks = 0, failures = 0;

  sign_function #(.TERMS(TERMS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int c);
    int h;
    h = c - (TERMS - c);
    checks++;
    if (int'(count) != c || sign !== (h >= 0)) begin
      failures++;
      $display("FAIL c=%0d: count=%0d sign=%b expected h=%0d", c, count, sign, h);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c <= TERMS; c++) begin
      int sent;
      clear = 1; @(negedge clk); clear = 0;
      sent = 0;
      // pulses mixed with idle cycles
      while (sent < c) begin
        pulse = 1'($urandom);
        if (pulse) sent++;
        @(negedge clk);
      end
      pulse = 0; @(negedge clk);
      check(c);
    end
    for (int c = 0; c <= TERMS; c++) begin
      load = 1; load_val = W'(c); @(negedge clk); load = 0;
      check(c);
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
