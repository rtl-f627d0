// tb_symbol_boundary: checks the cyclic-prefix boundary detector.
//
// Sends OFDM-like symbols (random complex samples, guard interval copied from
// the symbol tail) starting at an offset OFF, rotated by a fractional CFO of
// EPS carrier spacings. Expects one peak per period at the last sample of a
// symbol, a peak phase of 2*pi*EPS, and FFT windows of N samples that start on
// the first useful sample of each symbol.
module tb_symbol_boundary;
  localparam int N = 2048, NG = 512, P = N + NG, OFF = 777;
  localparam real EPS = 0.2;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic peak_valid, out_valid, out_sym_start, out_win;
  logic [11:0] peak_idx;
  logic signed [24:0] peak_re, peak_im;
  logic signed [11:0] out_re, out_im;

  symbol_boundary dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .peak_valid, .peak_idx,
    .peak_re, .peak_im, .out_valid, .out_sym_start, .out_win, .out_re, .out_im);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ur [N], ui [N];
  int sample_no = 0;       // global sample index of the sample being sent
  int n_peaks = 0, n_starts = 0, win_len = 0;
  int last_cyc = 0, cyc = 0;
  always @(posedge clk) cyc++;

  // expected: symbols start (CP first) at OFF + m*P; last sample at OFF+m*P+P-1
  // counter position of a global sample g (sent after reset) is g mod P
  always @(posedge clk) if (rst_n) begin
    if (peak_valid) begin
      n_peaks++;
      if (n_peaks >= 2) begin
        int exp_idx;
        real ang;
        exp_idx = (OFF + P - 1) % P;
        check(peak_idx == 12'(exp_idx) || peak_idx == 12'(exp_idx + 1) || peak_idx == 12'(exp_idx - 1),
              $sformatf("peak at %0d, expected %0d", peak_idx, exp_idx));
        ang = $atan2(real'(peak_im), real'(peak_re));
        check(ang > 2 * PI * EPS - 0.02 && ang < 2 * PI * EPS + 0.02,
              $sformatf("peak phase %f, expected %f", ang, 2 * PI * EPS));
        if (n_peaks >= 3) check(cyc - last_cyc == P, "one peak per period");
      end
      last_cyc = cyc;
    end
    if (out_sym_start) begin
      // out_sym_start seen here belongs to the sample sent two half-periods ago
      int g;
      g = sample_no - 2;
      if (n_peaks >= 3) check(((g - OFF) % P) >= NG - 1 && ((g - OFF) % P) <= NG + 1, $sformatf("window starts at symbol offset %0d (peak %0d, n %0d)", (g - OFF) % P, peak_idx, n_peaks));
      if (n_starts > 1) check(win_len == N, $sformatf("window length %0d", win_len));
      n_starts++;
      win_len = 0;
    end
    if (out_win) win_len++;
  end

  initial begin
    int g;
    real ph;
    g = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // leading part: tail of a symbol
    for (int i = 0; i < OFF; i++) begin
      @(negedge clk);
      in_valid = 1; in_re = 12'($urandom_range(1200) - 600); in_im = 12'($urandom_range(1200) - 600);
      sample_no++;
    end
    for (int s = 0; s < 7; s++) begin
      for (int i = 0; i < N; i++) begin
        ur[i] = real'($urandom_range(1200)) - 600.0;
        ui[i] = real'($urandom_range(1200)) - 600.0;
      end
      for (int i = 0; i < P; i++) begin
        int j;
        j = (i < NG) ? (N - NG + i) : (i - NG);
        ph = 2 * PI * EPS * real'(sample_no) / N;
        @(negedge clk);
        in_re = 12'($rtoi(ur[j] * $cos(ph) - ui[j] * $sin(ph)));
        in_im = 12'($rtoi(ur[j] * $sin(ph) + ui[j] * $cos(ph)));
        sample_no++;
      end
    end
    @(negedge clk); in_valid = 0;
    check(n_peaks >= 7, $sformatf("peaks seen %0d", n_peaks));
    check(n_starts >= 5, $sformatf("windows seen %0d", n_starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
