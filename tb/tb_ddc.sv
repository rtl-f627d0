// tb_ddc: checks the digital down converter.
//
// Drives a real tone at IF + FB (4.57 MHz + 0.1 MHz at 36.28 Msample/s, 10-bit
// amplitude A = 400) and expects a complex baseband tone at FB: magnitude
// 4*A (the ADC sample is left-aligned to 12 bits) within 4 percent, phase
// advancing by 2*pi*FB*4/fs per output within 0.03 rad, one output per four
// ADC samples.
module tb_ddc;
  localparam real FS = 36.28, FIF = 4.57, FB = 0.1, A = 400.0, PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adc_valid = 0;
  logic signed [9:0] adc = 0;
  logic out_valid;
  logic signed [11:0] out_re, out_im;
  ddc dut (.clk, .rst_n, .adc_valid, .adc, .out_valid, .out_re, .out_im);

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

  int nout = 0, nadc = 0;
  real last_ph, dph_exp;
  always @(posedge clk) if (rst_n && out_valid) begin
    real mag, ph, d;
    mag = $sqrt(real'(out_re) * out_re + real'(out_im) * out_im);
    ph = $atan2(real'(out_im), real'(out_re));
    if (nout > 4) begin
      check(mag > 4.0 * A * 0.96 && mag < 4.0 * A * 1.04, $sformatf("magnitude %f", mag));
      d = ph - last_ph;
      if (d > PI) d -= 2 * PI;
      if (d < -PI) d += 2 * PI;
      check(d > dph_exp - 0.03 && d < dph_exp + 0.03, $sformatf("phase step %f expected %f", d, dph_exp));
    end
    last_ph = ph;
    nout++;
  end

  initial begin
    dph_exp = 2 * PI * FB * 4 / FS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      adc_valid = 1;
      adc = 10'($rtoi($floor(A * $cos(2 * PI * (FIF + FB) * n / FS) + 0.5)));
      nadc++;
    end
    @(negedge clk); adc_valid = 0;
    repeat (20) @(negedge clk);
    check(nout == 1000, $sformatf("%0d outputs for 4000 ADC samples", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
