// tb_joint_est: self-checking test of the joint ICFO / RCFO / SCO estimator.
//
// Builds 2k-mode FFT output symbols in the centred order (carrier k at
// position k+172): 45 continual pilots of amplitude 683 with a fixed random
// sign per carrier, low-amplitude random QPSK on the other active carriers,
// shifted by an integer CFO. Symbols 0-1 carry shift A, symbols 2.. shift B,
// so the estimates run A, (garbage), B, B and the 2-of-3 vote must lock on B
// at the fourth estimate. After the lock the pilots come unshifted with a
// common phase step ALPHA per symbol and a phase slope BETA per carrier per
// symbol, both scaled by a factor that changes from symbol to symbol (1, -0.5,
// 1, ...) so that an accumulator that is not cleared between symbols shows
// up; the expected C1/C2 phases are computed here with real arithmetic.
// Also checks that each ICFO estimate is out before the next symbol starts.
module tb_joint_est;
  import dvbt_pkg::*;

  localparam int N = 2048;
  localparam int SHIFT_A = 17;
  localparam int SHIFT_B = -23;
  localparam real ALPHA = 0.30;      // rad per symbol
  localparam real BETA  = 0.0004;    // rad per carrier per symbol
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sym_start = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  je_state_e state;
  logic icfo_raw_valid, icfo_lock, track_valid;
  logic signed [7:0] icfo_raw, icfo;
  logic signed [15:0] phi1, phi2, rcfo_ang, sco_ang;

  joint_est dut (.clk, .rst_n, .restart(1'b0), .in_valid, .in_sym_start, .in_re, .in_im,
    .state, .icfo_raw_valid, .icfo_raw, .icfo_lock, .icfo, .track_valid,
    .phi1, .phi2, .rcfo_ang, .sco_ang);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cp_sgn [N_CPIL];
  logic signed [11:0] sre [N];
  logic signed [11:0] sim [N];

  function automatic bit is_cpil(input int k);
    for (int i = 0; i < N_CPIL; i++) if (CPIL_POS[i] == k) return 1;
    return 0;
  endfunction

  // per-symbol scale of the phase step, and the accumulated scale up to l
  function automatic real sc(input int l);
    return (l % 2 == 0) ? 1.0 : -0.5;
  endfunction
  function automatic real cum(input int l);
    real c = 0.0;
    for (int m = 1; m <= l; m++) c += sc(m);
    return c;
  endfunction

  // build one symbol: integer shift, pilot phase rotation for symbol index l
  task automatic build(input int shift, input int l, input bit rot);
    int k;
    real ph;
    for (int p = 0; p < N; p++) begin sre[p] = 0; sim[p] = 0; end
    for (k = 0; k <= K_MAX; k++) begin
      int p = k + K_OFFSET + shift;
      if (!is_cpil(k)) begin
        sre[p] = ($urandom_range(1) == 1) ? 12'sd90 : -12'sd90;
        sim[p] = ($urandom_range(1) == 1) ? 12'sd90 : -12'sd90;
      end
    end
    for (int i = 0; i < N_CPIL; i++) begin
      int p = CPIL_POS[i] + K_OFFSET + shift;
      ph = rot ? cum(l) * (ALPHA + BETA * (CPIL_POS[i] - K_CENTER)) : 0.0;
      sre[p] = 12'($rtoi($floor(683.0 * cp_sgn[i] * $cos(ph) + 0.5)));
      sim[p] = 12'($rtoi($floor(683.0 * cp_sgn[i] * $sin(ph) + 0.5)));
    end
  endtask

  int n_raw = 0, sym_no = 0, raw_sym [8], lock_at = -1, n_track = 0;
  logic signed [7:0] raw [8];
  int pos = 0;

  task automatic send_symbol();
    for (int p = 0; p < N; p++) begin
      @(negedge clk);
      in_valid = 1; in_sym_start = (p == 0);
      in_re = sre[p]; in_im = sim[p];
      pos = p;
    end
    sym_no++;
  endtask

  always @(posedge clk) begin
    if (rst_n && icfo_raw_valid && n_raw < 8) begin
      raw[n_raw] <= icfo_raw;
      raw_sym[n_raw] <= sym_no;
      n_raw <= n_raw + 1;
    end
    if (rst_n && icfo_lock && lock_at < 0) lock_at <= n_raw;
  end

  real e1, e2;
  real s1r, s1i, s2r, s2i;
  always @(posedge clk) begin
    if (rst_n && track_valid) begin
      // expected phases of the current symbol relative to the one before
      s1r = 0; s1i = 0; s2r = 0; s2i = 0;
      for (int i = 0; i < N_CPIL; i++) begin
        real d;
        d = sc(sym_no - 5) * (ALPHA + BETA * (CPIL_POS[i] - K_CENTER));
        if (CPIL_POS[i] < K_CENTER) begin s1r += $cos(d); s1i += $sin(d); end
        else begin s2r += $cos(d); s2i += $sin(d); end
      end
      e1 = $atan2(s1i, s1r) / (2.0 * PI) * 65536.0;
      e2 = $atan2(s2i, s2r) / (2.0 * PI) * 65536.0;
      check((phi1 - e1) < 60 && (e1 - phi1) < 60, $sformatf("phi1 %0d expected %0f", phi1, e1));
      check((phi2 - e2) < 60 && (e2 - phi2) < 60, $sformatf("phi2 %0d expected %0f", phi2, e2));
      check((rcfo_ang - (e1 + e2) / 2) < 60 && ((e1 + e2) / 2 - rcfo_ang) < 60,
            $sformatf("rcfo %0d expected %0f", rcfo_ang, (e1 + e2) / 2));
      check((sco_ang - (e2 - e1)) < 60 && ((e2 - e1) - sco_ang) < 60,
            $sformatf("sco %0d expected %0f", sco_ang, e2 - e1));
      n_track++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_CPIL; i++) cp_sgn[i] = ($urandom_range(1) == 1) ? 1 : -1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // symbols 0,1 with shift A, 2..4 with shift B
    for (int s = 0; s < 5; s++) begin
      build((s < 2) ? SHIFT_A : SHIFT_B, 0, 0);
      send_symbol();
      if (s == 0) check(state == JE_SIGN_WR, "state SIGN_WR during first symbol");
      if (s == 1) check(state == JE_ICFO, "state ICFO during second symbol");
    end
    // estimates: symbol1 -> A, symbol3 -> B, symbol4 -> B (locks)
    check(n_raw >= 4, $sformatf("four ICFO estimates (got %0d)", n_raw));
    check(raw[0] == SHIFT_A, $sformatf("estimate 1 = %0d", raw[0]));
    check(raw[2] == SHIFT_B, $sformatf("estimate 3 = %0d", raw[2]));
    check(raw[3] == SHIFT_B, $sformatf("estimate 4 = %0d", raw[3]));
    for (int i = 0; i < 4; i++)
      check(raw_sym[i] == i + 1, $sformatf("estimate %0d inside its own symbol", i + 1));
    check(icfo_lock && icfo == SHIFT_B, $sformatf("vote locked on %0d", icfo));
    check(lock_at == 3, $sformatf("lock comes with the 4th estimate (%0d before)", lock_at));
    // tracking: pilots unshifted, rotating
    for (int s = 0; s < 5; s++) begin
      build(0, s, 1);
      send_symbol();
      if (s == 0) check(state == JE_PIL_WR, "state PIL_WR after lock");
      else check(state == JE_TRACK, "state TRACK");
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    check(n_track == 4, $sformatf("four RCFO/SCO estimates (got %0d)", n_track));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
