// tb_interpolator: checks the resampler and its copy/discard controller.
//
// Feeds a sampled sine (one input every 4 clocks) with two step settings:
// rho = 1 - 8357/2^20 (the 9.07 -> 9.14 Msample/s ratio, so samples are
// copied) and rho = 1 + 6000/2^20 (samples are discarded). Output m is
// compared with the linear interpolation of the inputs at time -1 + m*rho,
// computed here in floating point (input -1 is the reset value 0). Also
// checks that outputs = inputs + copies - discards and the copy spacing.
module tb_interpolator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [15:0] step_adj = 0;
  logic in_valid = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic out_valid, copy_evt, discard_evt;
  logic signed [11:0] out_re, out_im;
  logic [11:0] mu;
  interpolator dut (.clk, .rst_n, .step_adj, .in_valid, .in_re, .in_im,
    .out_valid, .out_re, .out_im, .mu, .copy_evt, .discard_evt);

  int checks = 0, failures = 0, nerr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (nerr++ < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NIN = 3000;
  real xr [NIN], xi [NIN];
  real rho;
  int nout, ncopy, ndisc, last_copy_in, nin_sent;
  int copy_gap_min, copy_gap_max;

  function automatic real sample_at(input real t, input bit im);
    int i;
    real f, a, b;
    i = $rtoi($floor(t));
    f = t - i;
    a = (i < 0) ? 0.0 : (im ? xi[i] : xr[i]);
    b = im ? xi[i+1] : xr[i+1];
    return a + f * (b - a);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      real tm, er, ei;
      tm = -1.0 + nout * rho;
      if (nout > 0 && tm + 1.0 < nin_sent) begin
        er = sample_at(tm, 0); ei = sample_at(tm, 1);
        check((real'(out_re) - er) <= 2.0 && (er - real'(out_re)) <= 2.0 &&
              (real'(out_im) - ei) <= 2.0 && (ei - real'(out_im)) <= 2.0,
              $sformatf("output %0d = (%0d,%0d), expected (%f,%f)", nout, out_re, out_im, er, ei));
      end
      nout++;
    end
    if (copy_evt) begin
      if (ncopy > 0) begin
        if (nin_sent - last_copy_in < copy_gap_min) copy_gap_min = nin_sent - last_copy_in;
        if (nin_sent - last_copy_in > copy_gap_max) copy_gap_max = nin_sent - last_copy_in;
      end
      last_copy_in = nin_sent;
      ncopy++;
    end
    if (discard_evt) ndisc++;
  end

  task automatic run(input int step);
    rst_n = 0;
    step_adj = 16'(step);
    rho = 1.0 + real'(step) / 1048576.0;
    nout = 0; ncopy = 0; ndisc = 0; nin_sent = 0; copy_gap_min = 1 << 30; copy_gap_max = 0;
    for (int i = 0; i < NIN; i++) begin
      xr[i] = $rtoi(1500.0 * $sin(2.0 * 3.14159265 * i / 37.0));
      xi[i] = $rtoi(1500.0 * $cos(2.0 * 3.14159265 * i / 53.0));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1; in_re = 12'($rtoi(xr[i])); in_im = 12'($rtoi(xi[i]));
      nin_sent = i + 1;
      @(negedge clk); in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(nout == NIN + ncopy - ndisc, $sformatf("outputs %0d, inputs %0d, copies %0d, discards %0d",
          nout, NIN, ncopy, ndisc));
  endtask

  initial begin
    run(-8357);
    check(ncopy >= 22 && ncopy <= 25 && ndisc == 0, $sformatf("copies %0d (expected about 24), discards %0d", ncopy, ndisc));
    check(copy_gap_min >= 124 && copy_gap_max <= 127, $sformatf("copy spacing %0d..%0d inputs", copy_gap_min, copy_gap_max));
    run(6000);
    check(ndisc >= 15 && ndisc <= 18 && ncopy == 0, $sformatf("discards %0d (expected about 17), copies %0d", ndisc, ncopy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
