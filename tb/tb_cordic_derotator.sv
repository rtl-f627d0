// tb_cordic_derotator: checks the CORDIC derotator and its NCO.
//
// Sends a complex tone of amplitude 1500 turning by F/2^24 turns per sample
// and sets the derotator's frequency word to F: the output must stand still
// at the tone's starting point (within 6 LSB), 13 clocks (ITER+2) after the
// input. A second run with freq = 0 must pass the samples unchanged.
module tb_cordic_derotator;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [23:0] freq = 0;
  logic phase_clr = 0, in_valid = 0, out_valid;
  logic signed [11:0] in_re = 0, in_im = 0, out_re, out_im;
  cordic_derotator dut (.clk, .rst_n, .freq, .phase_clr, .in_valid, .in_re, .in_im,
    .out_valid, .out_re, .out_im);

  int checks = 0, failures = 0, nerr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (nerr++ < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, nin = 0, nout = 0;
  int in_cyc [4096];
  real er [4096], ei [4096];
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    check((real'(out_re) - er[nout]) <= 6 && (er[nout] - real'(out_re)) <= 6 &&
          (real'(out_im) - ei[nout]) <= 6 && (ei[nout] - real'(out_im)) <= 6,
          $sformatf("sample %0d: (%0d,%0d) expected (%f,%f)", nout, out_re, out_im, er[nout], ei[nout]));
    check(cyc - in_cyc[nout] == 14, $sformatf("latency %0d", cyc - in_cyc[nout]));
    nout++;
  end

  task automatic run(input int f, input real ph0);
    freq = 24'(f);
    phase_clr = 1; @(negedge clk); phase_clr = 0;
    for (int n = 0; n < 1000; n++) begin
      real ph;
      ph = ph0 + 2 * PI * real'(f) * n / 16777216.0;
      @(negedge clk);
      in_valid = 1;
      in_re = 12'($rtoi($floor(1500 * $cos(ph) + 0.5)));
      in_im = 12'($rtoi($floor(1500 * $sin(ph) + 0.5)));
      er[nin] = f == 0 ? real'(in_re) : 1500 * $cos(ph0);
      ei[nin] = f == 0 ? real'(in_im) : 1500 * $sin(ph0);
      in_cyc[nin] = cyc;
      nin++;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(123457, 0.7);       // about 0.0074 turn per sample
    run(-400000, -2.0);
    run(0, 1.0);
    check(nout == 3000, $sformatf("%0d outputs", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
