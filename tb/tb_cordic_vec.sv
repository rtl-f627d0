// tb_cordic_vec: checks the pipelined vectoring CORDIC.
//
// Sends random vectors in all four quadrants (one per clock) with a tag and
// compares magnitude (times the CORDIC gain 1.6468) and angle (2^16 = one
// turn) with floating-point values, within 0.2 percent + 2 LSB and 16 angle
// units; also checks the ITER+1 = 12 clock latency and the tag.
module tb_cordic_vec;
  localparam real PI = 3.14159265358979, K = 1.646760258;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [15:0] in_x = 0, in_y = 0, out_ang;
  logic [7:0] in_tag = 0, out_tag;
  logic [17:0] out_mag;
  cordic_vec dut (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_tag, .out_valid, .out_mag,
    .out_ang, .out_tag);

  int checks = 0, failures = 0, nerr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (nerr++ < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs [256], ys [256], cyc_in [256], cyc = 0, nout = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    real m, a, da;
    int t;
    t = int'(out_tag);
    m = K * $sqrt(real'(xs[t]) * xs[t] + real'(ys[t]) * ys[t]);
    a = $atan2(real'(ys[t]), real'(xs[t])) / (2 * PI) * 65536.0;
    da = real'(out_ang) - a;
    if (da > 32768) da -= 65536;
    if (da < -32768) da += 65536;
    check(t == nout, $sformatf("tag %0d, expected %0d", t, nout));
    check(real'(out_mag) > m * 0.998 - 2 && real'(out_mag) < m * 1.002 + 2,
          $sformatf("(%0d,%0d): magnitude %0d expected %f", xs[t], ys[t], out_mag, m));
    check(da < 16 && da > -16, $sformatf("(%0d,%0d): angle %0d expected %f", xs[t], ys[t], out_ang, a));
    check(cyc - cyc_in[t] == 13, $sformatf("latency %0d", cyc - cyc_in[t]));
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      xs[i] = $urandom_range(40000) - 20000;
      ys[i] = $urandom_range(40000) - 20000;
      if (i == 0) begin xs[i] = -20000; ys[i] = 0; end
      if (i == 1) begin xs[i] = 0; ys[i] = -7000; end
      in_valid = 1; in_x = 16'(xs[i]); in_y = 16'(ys[i]); in_tag = 8'(i);
      cyc_in[i] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    check(nout == 200, $sformatf("%0d results", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
