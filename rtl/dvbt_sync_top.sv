// dvbt_sync_top: digital demodulation and synchronisation back end of a 2k-mode
// DVB-T receiver, around an external FFT.
//
// Time-domain path (one ADC sample per clock, 36.28 MHz):
//   ddc              second IF (4.57 MHz) -> complex baseband, decimate by 4
//   interpolator     resamples to the OFDM sample rate; its step is the
//                    nominal rate ratio NOM_STEP plus the sampling loop output
//   cordic_derotator removes the carrier offset; its frequency word is the sum
//                    of the fractional, integer and remainder CFO corrections
//   symbol_boundary  guard-interval correlation: symbol timing, FFT window and
//                    the fractional CFO (phase of the peak, via cordic_vec)
// The FFT window leaves on fft_in_*; the FFT result returns on fft_out_*.
// Frequency-domain path:
//   joint_est        integer CFO (memory-less, voted), then RCFO and SCO from
//                    the continual pilots
//   sp_mode_det      scattered pilot mode, predicted for the next symbol
//   channel_est      pilot-aided channel estimate, equalizer and common
//                    phase error of each symbol against the channel table
// Loops (loop_filter): until the integer CFO is locked, the fractional CFO
// estimate of every symbol period steers the derotator; at the lock the
// integer CFO (icfo carrier spacings = icfo*2^24/N per sample) is added, and
// from then on the RCFO estimate steers it. The SCO estimate steers the
// interpolator step. Loop gains, the acquisition order and the word formats
// are choices of this design; the blocks and their order follow the receiver
// architecture of the document. The FFT and the ADC are outside this module.
module dvbt_sync_top #(
  parameter int N        = dvbt_pkg::N_FFT,
  parameter int NG       = dvbt_pkg::N_GUARD,
  parameter int NOM_STEP = -8356,      // (36.28/4)/(64/7) - 1 in units of 2^-20
  parameter int FIF      = 2113337     // 4.57/36.28 * 2^24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  // ADC
  input  logic                 adc_valid,
  input  logic signed [9:0]    adc,
  // to the FFT
  output logic                 fft_in_valid,
  output logic                 fft_in_sym_start,
  output logic signed [11:0]   fft_in_re,
  output logic signed [11:0]   fft_in_im,
  // from the FFT (centred order, carrier k at position k+172)
  input  logic                 fft_out_valid,
  input  logic                 fft_out_sym_start,
  input  logic signed [11:0]   fft_out_re,
  input  logic signed [11:0]   fft_out_im,
  // equalized carriers
  output logic                 eq_valid,
  output logic [10:0]          eq_k,
  output logic                 eq_pilot,
  output logic signed [11:0]   eq_h_re,
  output logic signed [11:0]   eq_h_im,
  output logic signed [13:0]   eq_re,
  output logic signed [13:0]   eq_im,
  output logic [13:0]          eq_csi,
  output logic                 eq_ready,
  output logic                 cpe_valid,
  output logic signed [19:0]   cpe_re,
  output logic signed [19:0]   cpe_im,
  // synchronisation status
  output logic                 peak_valid,
  output logic [$clog2(N+NG)-1:0] peak_idx,
  output logic                 frac_valid,
  output logic signed [15:0]   frac_ang,
  output dvbt_pkg::je_state_e  est_state,
  output logic                 icfo_raw_valid,
  output logic signed [7:0]    icfo_raw,
  output logic                 icfo_lock,
  output logic signed [7:0]    icfo,
  output logic                 track_valid,
  output logic signed [15:0]   rcfo_ang,
  output logic signed [15:0]   sco_ang,
  output logic                 sp_mode_valid,
  output logic [1:0]           sp_mode,
  output logic signed [23:0]   cfo_freq,
  output logic signed [15:0]   sco_step,
  output logic [11:0]          interp_mu,
  output logic                 interp_copy,
  output logic                 interp_discard
);
  import dvbt_pkg::*;

  // ---------------------------------------------------------------- time domain
  logic                ddc_v;
  logic signed [11:0]  ddc_re, ddc_im;
  ddc #(.FIF(FIF)) u_ddc (
    .clk, .rst_n, .adc_valid, .adc, .out_valid(ddc_v), .out_re(ddc_re), .out_im(ddc_im));

  logic                ip_v;
  logic signed [11:0]  ip_re, ip_im;
  logic signed [15:0]  sco_ctrl;
  interpolator u_interp (
    .clk, .rst_n, .step_adj(sco_step), .in_valid(ddc_v), .in_re(ddc_re), .in_im(ddc_im),
    .out_valid(ip_v), .out_re(ip_re), .out_im(ip_im), .mu(interp_mu),
    .copy_evt(interp_copy), .discard_evt(interp_discard));
  assign sco_step = 16'(NOM_STEP) + sco_ctrl;

  logic                dr_v;
  logic signed [11:0]  dr_re, dr_im;
  cordic_derotator u_derot (
    .clk, .rst_n, .freq(cfo_freq), .phase_clr(restart), .in_valid(ip_v), .in_re(ip_re), .in_im(ip_im),
    .out_valid(dr_v), .out_re(dr_re), .out_im(dr_im));

  localparam int SBW = 2 * 12 + 1 - 10 + $clog2(NG) + 1;
  logic signed [SBW-1:0] pk_re, pk_im;
  logic                  sb_v, sb_start, sb_win;
  logic signed [11:0]    sb_re, sb_im;
  symbol_boundary #(.N(N), .NG(NG)) u_sbd (
    .clk, .rst_n, .in_valid(dr_v), .in_re(dr_re), .in_im(dr_im),
    .peak_valid, .peak_idx, .peak_re(pk_re), .peak_im(pk_im),
    .out_valid(sb_v), .out_sym_start(sb_start), .out_win(sb_win), .out_re(sb_re), .out_im(sb_im));
  assign fft_in_valid     = sb_v && sb_win;
  assign fft_in_sym_start = sb_v && sb_start;
  assign fft_in_re        = sb_re;
  assign fft_in_im        = sb_im;

  // arctangent of the correlation peak: fractional CFO (2^16 = one carrier spacing)
  logic [17:0] fr_mag;
  logic [7:0]  fr_tag;
  cordic_vec #(.IN_W(16)) u_frac_atan (
    .clk, .rst_n, .in_valid(peak_valid),
    .in_x(16'(pk_re >>> (SBW - 16))), .in_y(16'(pk_im >>> (SBW - 16))), .in_tag(8'd0),
    .out_valid(frac_valid), .out_mag(fr_mag), .out_ang(frac_ang), .out_tag(fr_tag));

  // ---------------------------------------------------------------- frequency domain
  joint_est #(.N(N)) u_joint (
    .clk, .rst_n, .restart, .in_valid(fft_out_valid), .in_sym_start(fft_out_sym_start),
    .in_re(fft_out_re), .in_im(fft_out_im), .state(est_state),
    .icfo_raw_valid, .icfo_raw, .icfo_lock, .icfo, .track_valid,
    .phi1(), .phi2(), .rcfo_ang, .sco_ang);

  logic [1:0] sp_next;
  sp_mode_det #(.N(N)) u_spm (
    .clk, .rst_n, .in_valid(fft_out_valid), .in_sym_start(fft_out_sym_start),
    .in_re(fft_out_re), .in_im(fft_out_im), .mode_valid(sp_mode_valid), .mode(sp_mode),
    .mode_next(sp_next));

  channel_est #(.N(N)) u_chest (
    .clk, .rst_n, .in_valid(fft_out_valid), .in_sym_start(fft_out_sym_start),
    .in_re(fft_out_re), .in_im(fft_out_im), .sp_mode(sp_next),
    .out_valid(eq_valid), .out_k(eq_k), .out_pilot(eq_pilot), .out_h_re(eq_h_re), .out_h_im(eq_h_im),
    .out_eq_re(eq_re), .out_eq_im(eq_im), .out_csi(eq_csi), .est_ready(eq_ready),
    .cpe_valid, .cpe_re, .cpe_im);

  // ---------------------------------------------------------------- loops
  // fractional CFO: angle a (2^16 = one spacing) needs a/8 per sample; half gain
  logic signed [23:0] frac_word, rcfo_word;
  loop_filter #(.EW(16), .OW(24), .KI_SHIFT(4)) u_frac_loop (
    .clk, .rst_n, .load(restart), .load_val('0),
    .err_valid(frac_valid && !icfo_lock), .err(frac_ang), .ctrl(frac_word));
  // remainder CFO: rcfo angle per symbol, full correction is about 0.1 of it
  loop_filter #(.EW(16), .OW(24), .KI_SHIFT(4)) u_rcfo_loop (
    .clk, .rst_n, .load(restart), .load_val('0),
    .err_valid(track_valid), .err(rcfo_ang), .ctrl(rcfo_word));
  // sampling clock: a positive slope means the ADC is slow, so the step shrinks
  logic signed [23:0] sco_word;
  loop_filter #(.EW(16), .OW(24), .KI_SHIFT(8), .NEGATE(1'b1)) u_sco_loop (
    .clk, .rst_n, .load(restart), .load_val('0),
    .err_valid(track_valid), .err(sco_ang), .ctrl(sco_word));
  assign sco_ctrl = 16'(sco_word);

  wire signed [23:0] icfo_word = icfo_lock ? 24'(icfo) * 24'(16777216 / N) : '0;
  assign cfo_freq = frac_word + icfo_word + rcfo_word;

endmodule
