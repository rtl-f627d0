// tb_dvbt_sync_top: end-to-end test of the synchronisation back end at its
// default (2k mode, guard 1/4) parameters.
//
// Time domain: an OFDM-like baseband signal (random complex samples, each
// symbol preceded by a copy of its last NG samples) at 64/7 Msample/s with a
// fractional carrier offset EPS_F is put on the 4.57 MHz IF and sampled as a
// real 10-bit ADC stream at 36.28 MHz, one sample per clock.
// Frequency domain: the FFT is outside the design. A stand-in answers every
// FFT window with one synthetic 2k symbol, streamed one carrier per clock:
// continual and scattered pilots (+-4/3, sign from the reference sequence),
// QPSK data, a flat channel HC, an integer CFO of ICFO_TRUE carriers minus the
// one the design has locked on, a common phase that advances by the residual
// remainder CFO (EPS_R minus the correction the design applies) and a phase
// slope that advances by the residual sampling offset (DELTA_TRUE minus the
// interpolator step correction). So the loops close through this model.
// The offsets follow the document's simulation case: a carrier offset of
// 23.15 carrier spacings (23 integer + 0.15 fractional) and 100 ppm sampling
// offset, with 40 symbols to converge (the convergence time it reports).
//
// Checks: stable symbol timing, N-sample windows, interpolator copies about
// every 125 inputs, fractional CFO acquisition, both integer CFO estimates and
// the voted lock, the four estimator states in order, RCFO and SCO loops
// settling on the modelled offsets, scattered pilot modes, channel estimates,
// and the common phase error: large while the carrier loop pulls in, below
// 0.05 rad in the last symbols.
// Each mechanism is counted and must occur. Sample discarding cannot occur at
// the nominal 36.28 MHz ADC rate (the stream must always be stretched); it
// is exercised in tb_interpolator.
module tb_dvbt_sync_top;
  import dvbt_pkg::*;
  localparam int  N = 2048, NG = 512, P = N + NG;
  localparam real PI = 3.14159265358979;
  localparam real FS = 36.28, FIF = 4.57, FOFDM = 64.0 / 7.0;
  localparam real EPS_F = 0.15;          // fractional CFO, time domain
  localparam int  ICFO_TRUE = 23;        // integer CFO, frequency domain
  localparam real EPS_R = 0.05;          // remainder CFO seen after the FFT
  localparam real DELTA_TRUE = 100e-6;   // sampling clock offset
  localparam int  NOM = -8356;
  localparam int  NPER = 40;             // symbol periods simulated

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid = 0;
  logic signed [9:0] adc = 0;
  logic fft_in_valid, fft_in_sym_start;
  logic signed [11:0] fft_in_re, fft_in_im;
  logic fft_out_valid = 0, fft_out_sym_start = 0;
  logic signed [11:0] fft_out_re = 0, fft_out_im = 0;
  logic eq_valid, eq_pilot, eq_ready, cpe_valid;
  logic signed [19:0] cpe_re, cpe_im;
  logic [10:0] eq_k;
  logic signed [11:0] eq_h_re, eq_h_im;
  logic signed [13:0] eq_re, eq_im;
  logic [13:0] eq_csi;
  logic peak_valid, frac_valid, icfo_raw_valid, icfo_lock, track_valid, sp_mode_valid;
  logic [11:0] peak_idx;
  logic signed [15:0] frac_ang, rcfo_ang, sco_ang, sco_step;
  je_state_e est_state;
  logic signed [7:0] icfo_raw, icfo;
  logic [1:0] sp_mode;
  logic signed [23:0] cfo_freq;
  logic [11:0] interp_mu;
  logic interp_copy, interp_discard;

  dvbt_sync_top dut (
    .clk, .rst_n, .restart(1'b0), .adc_valid, .adc,
    .fft_in_valid, .fft_in_sym_start, .fft_in_re, .fft_in_im,
    .fft_out_valid, .fft_out_sym_start, .fft_out_re, .fft_out_im,
    .eq_valid, .eq_k, .eq_pilot, .eq_h_re, .eq_h_im, .eq_re, .eq_im, .eq_csi, .eq_ready,
    .cpe_valid, .cpe_re, .cpe_im,
    .peak_valid, .peak_idx, .frac_valid, .frac_ang, .est_state, .icfo_raw_valid, .icfo_raw,
    .icfo_lock, .icfo, .track_valid, .rcfo_ang, .sco_ang, .sp_mode_valid, .sp_mode,
    .cfo_freq, .sco_step, .interp_mu, .interp_copy, .interp_discard);

  int checks = 0, failures = 0, nerr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (nerr++ < 30) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #40000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- ADC stimulus
  real sr [P], si [P], nr [P], ni [P];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  task automatic new_symbol(output real r[P], output real i_[P]);
    real ur [N], ui [N];
    for (int j = 0; j < N; j++) begin
      ur[j] = real'($urandom_range(300)) - 150.0;
      ui[j] = real'($urandom_range(300)) - 150.0;
    end
    for (int j = 0; j < P; j++) begin
      r[j]  = (j < NG) ? ur[N - NG + j] : ur[j - NG];
      i_[j] = (j < NG) ? ui[N - NG + j] : ui[j - NG];
    end
  endtask

  initial begin
    longint m;
    int sym, idx, cur;
    real t, ph, br, bi;
    repeat (3) @(negedge clk);
    rst_n = 1;
    new_symbol(sr, si);
    new_symbol(nr, ni);
    cur = 0;
    m = 0;
    while (1) begin
      t = real'(m) * FOFDM / FS;              // time in OFDM samples
      idx = $rtoi($floor(t));
      sym = idx / P;
      if (sym != cur) begin sr = nr; si = ni; new_symbol(nr, ni); cur = sym; end
      ph = 2 * PI * EPS_F * real'(idx) / N;
      br = sr[idx % P] * $cos(ph) - si[idx % P] * $sin(ph);
      bi = sr[idx % P] * $sin(ph) + si[idx % P] * $cos(ph);
      ph = 2 * PI * FIF * real'(m) / FS;
      @(negedge clk);
      adc_valid = 1;
      adc = 10'($rtoi($floor(br * $cos(ph) - bi * $sin(ph) + 0.5)));
      m++;
    end
  end

  // ---------------------------------------------------------------- FFT stand-in
  bit  wseq [K_MAX + 1], is_cp [K_MAX + 1];
  real HCR = 0.9, HCI = 0.2;
  real phi_c = 0, psi_s = 0;                 // common phase, SCO slope
  int  fsym = 0, win_cnt = 0, n_windows = 0, bad_windows = 0;
  int  rcfo_base = 0, lock_seen = 0;
  bit  go = 0;
  bit  gen_locked [0:1023];   // ICFO lock state when each stand-in symbol was built

  always @(posedge clk) if (rst_n) begin
    if (fft_in_valid) begin
      if (fft_in_sym_start) begin
        if (win_cnt != 0 && win_cnt != N) bad_windows++;
        win_cnt = 0;
      end
      win_cnt++;
      if (win_cnt == N) begin n_windows++; go = 1; end
    end
  end

  initial begin
    for (int n = 0; n <= K_MAX; n++) wseq[n] = (n < 11) ? 1'b1 : (wseq[n-9] ^ wseq[n-11]);
    for (int i = 0; i < N_CPIL; i++) is_cp[CPIL_POS[i]] = 1;
    forever begin
      int shift;
      real eps_r, d_r;
      @(posedge clk);
      if (go) begin
        go = 0;
        shift = ICFO_TRUE - (icfo_lock ? int'(icfo) : 0);
        gen_locked[fsym % 1024] = icfo_lock;
        if (est_state == JE_PIL_WR || est_state == JE_TRACK) begin
          eps_r = EPS_R - real'(int'(cfo_freq) - rcfo_base) / 8192.0;
          d_r   = DELTA_TRUE + real'(int'(sco_step) - NOM) / 1048576.0;
          phi_c += 2 * PI * 1.25 * eps_r;
          psi_s += 2 * PI * 1.25 * d_r;
        end
        for (int p = 0; p < N; p++) begin
          int k;
          real xr, xi, yr, yi, a;
          k = p - K_OFFSET - shift;
          yr = 0; yi = 0;
          if (k >= 0 && k <= K_MAX) begin
            if (is_cp[k] || (k % 12) == 3 * (fsym % 4)) begin
              xr = wseq[k] ? -4.0 / 3.0 : 4.0 / 3.0; xi = 0;
            end else begin
              xr = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
              xi = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
            end
            a = phi_c + psi_s * (k - K_CENTER);
            yr = 512.0 * ((HCR * xr - HCI * xi) * $cos(a) - (HCR * xi + HCI * xr) * $sin(a));
            yi = 512.0 * ((HCR * xr - HCI * xi) * $sin(a) + (HCR * xi + HCI * xr) * $cos(a));
          end
          @(negedge clk);
          fft_out_valid = 1; fft_out_sym_start = (p == 0);
          fft_out_re = 12'($rtoi($floor(yr + 0.5)));
          fft_out_im = 12'($rtoi($floor(yi + 0.5)));
        end
        @(negedge clk);
        fft_out_valid = 0; fft_out_sym_start = 0;
        fsym++;
      end
    end
  end

  // ---------------------------------------------------------------- monitors
  int n_peaks = 0, n_stable = 0, last_peak = -1;
  int n_copy = 0, n_discard = 0, last_copy = 0, copy_gap_bad = 0, n_ddc_in = 0;
  int n_frac = 0, n_raw = 0, n_track = 0, n_sp = 0, n_sp_ok = 0, n_eq_chk = 0, n_cpe = 0;
  real cpe_max = 0;
  int seen_state [5];
  int order_ok = 1;
  je_state_e prev_state = JE_IDLE;
  int cfo_at_lock = 0;
  int sp_expect = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.ddc_v) n_ddc_in++;
    if (peak_valid) begin
      n_peaks++;
      if (n_peaks > 3) begin
        int d;
        d = (int'(peak_idx) - last_peak + P) % P;
        if (d <= 32 || d >= P - 32) n_stable++;
        else check(0, $sformatf("peak moved from %0d to %0d", last_peak, peak_idx));
      end
      last_peak = int'(peak_idx);
    end
    if (interp_copy) begin
      if (n_copy > 0 && (n_ddc_in - last_copy < 120 || n_ddc_in - last_copy > 130)) copy_gap_bad++;
      last_copy = n_ddc_in;
      n_copy++;
    end
    if (interp_discard) n_discard++;
    if (frac_valid) n_frac++;
    if (icfo_raw_valid) begin
      n_raw++;
      check(icfo_raw == 8'(ICFO_TRUE), $sformatf("ICFO estimate %0d, expected %0d", icfo_raw, ICFO_TRUE));
    end
    if (icfo_lock && !lock_seen) begin
      lock_seen = 1;
      // frequency word before the integer part is added: fractional acquisition
      // within 0.05 carrier spacings; the remainder is left to the RCFO loop
      check(int'(cfo_freq) - ICFO_TRUE * 8192 > (EPS_F - 0.05) * 8192 &&
            int'(cfo_freq) - ICFO_TRUE * 8192 < (EPS_F + 0.05) * 8192,
            $sformatf("fractional CFO word %0d, expected about %0d", int'(cfo_freq) - ICFO_TRUE * 8192,
                      $rtoi(EPS_F * 8192)));
      rcfo_base = int'(cfo_freq);
    end
    if (est_state != prev_state) begin
      if (!(int'(est_state) == int'(prev_state) + 1)) order_ok = 0;
      prev_state = est_state;
    end
    seen_state[int'(est_state)]++;
    if (track_valid) n_track++;
    // symbols built before the ICFO lock carry shifted carriers, so only
    // symbols built after it are required to show the right pilot phase
    if (sp_mode_valid && gen_locked[(fsym - 1) % 1024]) begin
      n_sp++;
      if (sp_mode == 2'((fsym - 1) % 4)) n_sp_ok++;
    end
    // common phase error: large while the carrier loop pulls in, small once
    // it has settled
    if (cpe_valid && eq_ready) begin
      real a;
      a = $atan2(real'(cpe_im), real'(cpe_re));
      n_cpe++;
      if (a > cpe_max) cpe_max = a;
      if (-a > cpe_max) cpe_max = -a;
      if (fsym > NPER - 6) check(a < 0.05 && a > -0.05, $sformatf("phase error %f rad after settling", a));
    end
    if (eq_valid && eq_ready && fsym > NPER - 6 && eq_k % 97 == 0) begin
      real mh, me;
      mh = $sqrt(real'(eq_h_re) * eq_h_re + real'(eq_h_im) * eq_h_im);
      me = $sqrt(real'(eq_re) * eq_re + real'(eq_im) * eq_im);
      check(mh > 0.9 * 512 * $sqrt(HCR * HCR + HCI * HCI) && mh < 1.1 * 512 * $sqrt(HCR * HCR + HCI * HCI),
            $sformatf("k=%0d |H| %f", eq_k, mh));
      check(me > 0.8 * 512 * (HCR * HCR + HCI * HCI) * ((eq_pilot || is_cp[eq_k]) ? 1.333 : 1.0) &&
            me < 1.2 * 512 * (HCR * HCR + HCI * HCI) * ((eq_pilot || is_cp[eq_k]) ? 1.333 : 1.0),
            $sformatf("k=%0d |eq| %f", eq_k, me));
      n_eq_chk++;
    end
  end

  initial begin
    wait (rst_n);
    wait (fsym == NPER);
    repeat (10) @(posedge clk);
    check(n_stable >= NPER - 6, $sformatf("stable symbol timing in %0d periods", n_stable));
    check(n_windows >= NPER && bad_windows == 0, $sformatf("%0d FFT windows, %0d bad", n_windows, bad_windows));
    check(n_copy > 0 && copy_gap_bad <= 2, $sformatf("%0d interpolator copies, %0d off-spacing", n_copy, copy_gap_bad));
    check(n_frac >= NPER, $sformatf("%0d fractional CFO estimates", n_frac));
    check(n_raw == 2, $sformatf("%0d integer CFO estimates", n_raw));
    check(icfo_lock && icfo == 8'(ICFO_TRUE), $sformatf("integer CFO locked on %0d", icfo));
    check(order_ok == 1, "estimator states in order");
    for (int s = 1; s < 5; s++) check(seen_state[s] > 0, $sformatf("state %0d visited", s));
    check(n_track >= NPER - 8, $sformatf("%0d RCFO/SCO estimates", n_track));
    begin
      int rw;
      rw = int'(cfo_freq) - rcfo_base;
      check(rw > 0.9 * EPS_R * 8192 && rw < 1.1 * EPS_R * 8192,
            $sformatf("RCFO correction %0d, expected about %0d", rw, $rtoi(EPS_R * 8192)));
      check(int'(sco_step) - NOM < -90 && int'(sco_step) - NOM > -120,
            $sformatf("SCO step correction %0d, expected about %0d", int'(sco_step) - NOM,
                      -$rtoi(DELTA_TRUE * 1048576)));
    end
    check(n_sp >= NPER - 6 && n_sp_ok == n_sp, $sformatf("scattered pilot modes %0d of %0d", n_sp_ok, n_sp));
    check(n_eq_chk > 50, $sformatf("%0d equalized carriers checked", n_eq_chk));
    check(n_cpe >= NPER - 10 && cpe_max > 0.1,
          $sformatf("%0d phase error estimates, largest %f rad", n_cpe, cpe_max));
    check(n_discard == 0, "no discards at the nominal ADC rate");
    $display("mechanisms: peaks=%0d windows=%0d copies=%0d discards=%0d frac=%0d icfo_est=%0d track=%0d sp_modes=%0d eq_checked=%0d cpe=%0d",
             n_peaks, n_windows, n_copy, n_discard, n_frac, n_raw, n_track, n_sp, n_eq_chk, n_cpe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
