// tb_loop_filter: checks the PI loop filter against a software model: preset,
// integrator updates with KI_SHIFT, proportional path with KP_SHIFT, and the
// error sign inversion, for random errors.
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, err_valid = 0;
  logic signed [23:0] load_val = 0;
  logic signed [15:0] err = 0;
  logic signed [23:0] ctrl_a, ctrl_b;
  loop_filter #(.KI_SHIFT(4)) dut_a (.clk, .rst_n, .load, .load_val, .err_valid, .err, .ctrl(ctrl_a));
  loop_filter #(.KI_SHIFT(6), .KP_SHIFT(2), .NEGATE(1'b1)) dut_b (.clk, .rst_n, .load, .load_val,
    .err_valid, .err, .ctrl(ctrl_b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ia, ib, ea, eb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; load_val = 24'sd100000;
    @(negedge clk); load = 0;
    ia = 100000; ib = 100000;
    check(ctrl_a == 100000 && ctrl_b == 100000, "preset");
    for (int i = 0; i < 200; i++) begin
      int e;
      e = $urandom_range(20000) - 10000;
      @(negedge clk); err_valid = 1; err = 16'(e);
      ia += e >>> 4;
      ib += (-e) >>> 6;
      ea = ia; eb = ib + ((-e) >>> 2);
      @(negedge clk); err_valid = 0;
      check(ctrl_a == 24'(ea), $sformatf("first order: %0d expected %0d", ctrl_a, ea));
      check(ctrl_b == 24'(eb), $sformatf("PI negated: %0d expected %0d", ctrl_b, eb));
      @(negedge clk);
      check(ctrl_a == 24'(ea), "holds without err_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
