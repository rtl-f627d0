// tb_channel_est: checks channel estimation, equalization and the common
// phase error output.
//
// Builds FFT-output symbols Y(k) = H(k) X(k) e^(j theta_l) * 512 for a
// channel that is linear in k (so frequency interpolation is exact up to
// rounding). X is QPSK on data carriers and +-4/3 on scattered pilots
// (k mod 12 = 3*(l mod 4)) and on the 45 continual pilots, with the sign from
// the reference sequence computed here from its recurrence
// b(n) = b(n-9) xor b(n-11), b(0..10) = 1. The first six symbols have
// theta = 0; the last two are turned by 0.25 and -0.4 rad, like a phase the
// synchronisation has not yet removed. A model of the pilot table (each
// entry holds the pilot estimate of the symbol that last refreshed it,
// phase included) gives the expected H, Y*conj(H) and |H|^2 of every carrier
// from the fourth symbol on; the three-carrier output delay is checked too.
// The phase error sum must equal the sum of the checked equalizer outputs at
// the continual pilots it covers, and its angle must match the model (about
// 0 for the unrotated symbols, close to theta for the rotated ones).
module tb_channel_est;
  import dvbt_pkg::*;
  localparam int N = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_sym_start = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic [1:0] sp_mode = 0;
  logic out_valid, out_pilot, est_ready;
  logic [10:0] out_k;
  logic signed [11:0] out_h_re, out_h_im;
  logic signed [13:0] out_eq_re, out_eq_im;
  logic [13:0] out_csi;
  logic cpe_valid;
  logic signed [19:0] cpe_re, cpe_im;

  channel_est dut (.clk, .rst_n, .in_valid, .in_sym_start, .in_re, .in_im, .sp_mode,
    .out_valid, .out_k, .out_pilot, .out_h_re, .out_h_im, .out_eq_re, .out_eq_im, .out_csi,
    .est_ready, .cpe_valid, .cpe_re, .cpe_im);

  int checks = 0, failures = 0, nerr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (nerr++ < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  wseq [K_MAX + 1];
  bit  is_cp [K_MAX + 1];
  real hr [K_MAX + 1], hi [K_MAX + 1], yr_s [K_MAX + 1], yi_s [K_MAX + 1];
  real tr [K_MAX / 3 + 1], ti [K_MAX / 3 + 1];    // model of the pilot table
  real theta [8] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.25, -0.4};
  int  sum_re = 0, sum_im = 0, n_cpe = 0;
  real m_re = 0, m_im = 0;
  int  cur_sym = 0, nout = 0, cyc = 0, in_cyc [K_MAX + 1];
  always @(posedge clk) cyc++;

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  // expected channel estimate at carrier k from the model table
  task automatic h_exp(input int k, output real er, output real ei);
    int j = k / 3;
    case (k % 3)
      0: begin er = tr[j]; ei = ti[j]; end
      1: begin er = (2 * tr[j] + tr[j+1]) / 3; ei = (2 * ti[j] + ti[j+1]) / 3; end
      default: begin er = (tr[j] + 2 * tr[j+1]) / 3; ei = (ti[j] + 2 * ti[j+1]) / 3; end
    endcase
  endtask

  // phase error of a symbol, checked after the output of its last carrier
  task automatic check_cpe();
    real a, am;
    n_cpe++;
    check(int'(cpe_re) == sum_re && int'(cpe_im) == sum_im,
          $sformatf("symbol %0d: phase error sum (%0d,%0d), outputs add to (%0d,%0d)",
                    cur_sym, cpe_re, cpe_im, sum_re, sum_im));
    a  = $atan2(real'(cpe_im), real'(cpe_re));
    am = $atan2(m_im, m_re);
    check(near(a, am, 0.01), $sformatf("symbol %0d: phase error %f rad, model %f", cur_sym, a, am));
    if (cur_sym < 6) check(near(a, 0.0, 0.01), $sformatf("symbol %0d: phase error %f, expected 0", cur_sym, a));
    else check(near(a, theta[cur_sym], 0.5 * (theta[cur_sym] < 0 ? -theta[cur_sym] : theta[cur_sym])) && a * theta[cur_sym] > 0,
               $sformatf("symbol %0d: phase error %f, rotation %f", cur_sym, a, theta[cur_sym]));
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int kk;
    kk = int'(out_k);
    nout++;
    if (kk == 0) begin sum_re = 0; sum_im = 0; m_re = 0; m_im = 0; end
    if (cur_sym >= 3) begin
      real er, ei, mag2, qr, qi;
      bit pil;
      h_exp(kk, er, ei);
      mag2 = er * er + ei * ei;
      qr = yr_s[kk] * er + yi_s[kk] * ei;
      qi = yi_s[kk] * er - yr_s[kk] * ei;
      pil = (kk % 12) == 3 * (cur_sym % 4);
      check(est_ready, "estimate ready");
      check(near(real'(out_h_re), 512.0 * er, 4.0) && near(real'(out_h_im), 512.0 * ei, 4.0),
            $sformatf("k=%0d H=(%0d,%0d) expected (%f,%f)", kk, out_h_re, out_h_im, 512*er, 512*ei));
      check(near(real'(out_eq_re), qr, 8.0) && near(real'(out_eq_im), qi, 8.0),
            $sformatf("k=%0d eq=(%0d,%0d) expected (%f,%f)", kk, out_eq_re, out_eq_im, qr, qi));
      check(near(real'(out_csi), 512.0 * mag2, 6.0), $sformatf("k=%0d csi %0d", kk, out_csi));
      check(out_pilot == pil, $sformatf("k=%0d pilot flag", kk));
      check(cyc - in_cyc[kk] == 5, $sformatf("k=%0d delay %0d", kk, cyc - in_cyc[kk]));
      if (is_cp[kk] && !pil) begin
        sum_re += wseq[kk] ? -int'(out_eq_re) : int'(out_eq_re);
        sum_im += wseq[kk] ? -int'(out_eq_im) : int'(out_eq_im);
        m_re += wseq[kk] ? -qr : qr;
        m_im += wseq[kk] ? -qi : qi;
      end
      if (cpe_valid) check_cpe();
    end
  end

  initial begin
    for (int n = 0; n <= K_MAX; n++) wseq[n] = (n < 11) ? 1'b1 : (wseq[n-9] ^ wseq[n-11]);
    for (int i = 0; i < N_CPIL; i++) is_cp[CPIL_POS[i]] = 1;
    for (int j = 0; j <= K_MAX / 3; j++) begin tr[j] = 0; ti[j] = 0; end
    for (int k = 0; k <= K_MAX; k++) begin
      hr[k] = 0.8 - 0.0002 * k;
      hi[k] = 0.3 + 0.0003 * k;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 8; l++) begin
      nout = 0;
      cur_sym = l;
      for (int p = 0; p < N; p++) begin
        int k;
        real yr, yi, xr, xi, gr, gi;
        k = p - K_OFFSET;
        yr = 0; yi = 0;
        if (k >= 0 && k <= K_MAX) begin
          // channel including the symbol's phase
          gr = hr[k] * $cos(theta[l]) - hi[k] * $sin(theta[l]);
          gi = hr[k] * $sin(theta[l]) + hi[k] * $cos(theta[l]);
          if (k % 12 == 3 * (l % 4) || is_cp[k]) begin
            xr = wseq[k] ? -4.0 / 3.0 : 4.0 / 3.0; xi = 0;
          end else begin
            xr = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
            xi = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
          end
          yr = 512.0 * (gr * xr - gi * xi);
          yi = 512.0 * (gr * xi + gi * xr);
          yr_s[k] = $floor(yr + 0.5); yi_s[k] = $floor(yi + 0.5);
          if (k % 12 == 3 * (l % 4)) begin tr[k / 3] = gr; ti[k / 3] = gi; end
        end
        @(negedge clk);
        in_valid = 1; in_sym_start = (p == 0); sp_mode = 2'(l % 4);
        in_re = 12'($rtoi($floor(yr + 0.5))); in_im = 12'($rtoi($floor(yi + 0.5)));
        if (k >= 0 && k <= K_MAX) in_cyc[k] = cyc;
      end
      check(nout == K_MAX + 1, $sformatf("symbol %0d: %0d carriers out", l, nout));
    end
    repeat (3) @(negedge clk);
    check(n_cpe == 5, $sformatf("phase error given for symbols 3-7 (%0d)", n_cpe));
    @(negedge clk); in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
