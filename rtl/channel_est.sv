// channel_est: scattered-pilot-aided channel estimator and one-tap
// frequency-domain equalizer for 2k-mode DVB-T.
//
// Scattered pilots sit on carriers k = 3*mode + 12*p, mode = l mod 4, so every
// carrier that is a multiple of 3 carries a pilot once in four symbols. The
// channel is assumed constant over four symbols: the pilot-based estimate of
// each such carrier is kept in a table of 569 entries and refreshed when the
// carrier is a pilot again, so the table always holds the pilots of the
// current and the three previous symbols. The estimate at a pilot is
// H = Y / (+-4/3), computed as +-(Y/2 + Y/4); the sign comes from the DVB-T
// reference sequence w_k (x^11 + x^2 + 1, all ones at carrier 0, one step per
// carrier: w = 0 gives +4/3, w = 1 gives -4/3). Carriers between two table
// entries are estimated by linear interpolation in frequency,
//     H(3j+1) = (2H(3j) + H(3j+3))/3,   H(3j+2) = (H(3j) + 2H(3j+3))/3,
// which needs the entry three carriers ahead, so the output runs three
// carriers behind the input. The equalizer output is Y*conj(H) >>> HQ and the
// channel state information |H|^2 >>> HQ; a soft demapper divides or weights
// by the latter (no divider here).
// Phase error: stored pilots are up to three symbols old, so a common phase
// that the synchronisation loops have not yet removed turns every output by
// the same angle. Over the continual pilots (known +-4/3 values, found by a
// pointer walking the sorted pilot list) that are not scattered pilots of the
// current symbol, the block sums sign(p_k) * Y * conj(H); the angle of this
// sum, cpe_re/cpe_im, is the common phase error of the symbol against the
// channel table. It is given once per symbol with cpe_valid, right after
// the output of carrier 1704; applying it (one rotation) is left to the
// demapper side.
//
// Follows the document: pilots of the last four symbols, one-dimensional
// linear interpolation, mode input from the scattered pilot mode detector,
// an estimate of the phase error next to the channel response.
// Choices of this design: the centred FFT order (carrier k at position
// k + K_OFFSET), zero-order hold in time, the Y*conj(H) form of the
// equalizer, the widths (H in Q.HQ, unity = 2^HQ when a data amplitude of
// 2^HQ is unity). Interface: sp_mode is sampled with in_sym_start;
// out_valid/out_k/out_* give carrier k three positions after its input;
// est_ready goes high from the fourth symbol on, when every table entry has
// been written. How the phase error is measured (continual pilots against
// the table, no rotation applied) is this design's choice.
module channel_est #(
  parameter int N  = dvbt_pkg::N_FFT,
  parameter int SW = 12,
  parameter int HQ = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sym_start,
  input  logic signed [SW-1:0] in_re,
  input  logic signed [SW-1:0] in_im,
  input  logic [1:0]           sp_mode,
  output logic                 out_valid,
  output logic [10:0]          out_k,
  output logic                 out_pilot,
  output logic signed [SW-1:0] out_h_re,
  output logic signed [SW-1:0] out_h_im,
  output logic signed [SW+1:0] out_eq_re,
  output logic signed [SW+1:0] out_eq_im,
  output logic [SW+1:0]        out_csi,
  output logic                 est_ready,
  output logic                 cpe_valid,
  output logic signed [SW+7:0] cpe_re,
  output logic signed [SW+7:0] cpe_im
);
  import dvbt_pkg::*;

  localparam int PAW  = $clog2(N);
  localparam int NTAB = K_MAX / 3 + 1;              // 569
  localparam int TAW  = $clog2(NTAB);

  logic [PAW-1:0] pcnt;
  wire  [PAW-1:0] p = in_sym_start ? '0 : pcnt;
  wire  signed [PAW+1:0] k = (PAW+2)'(p) - (PAW+2)'(K_OFFSET);
  wire  in_rng = in_valid && (k >= 0) && (32'(k) <= K_MAX + 3);
  wire  active = (k >= 0) && (32'(k) <= K_MAX);

  logic [1:0] mode_r;
  wire  [1:0] mode_now = in_sym_start ? sp_mode : mode_r;
  logic [1:0] k3, k3_n;            // k mod 3
  logic [3:0] k12, k12_n;          // k mod 12
  logic [TAW-1:0] j3, j3_n;        // k / 3
  logic [10:0] wreg, wreg_n;       // reference sequence, bit i = w_(k+i)
  logic [5:0]  cptr, cptr_n;       // next continual pilot
  always_comb begin
    if (k == 0) begin
      k3_n = '0; k12_n = '0; j3_n = '0; wreg_n = '1; cptr_n = '0;
    end else begin
      k3_n = k3; k12_n = k12; j3_n = j3; wreg_n = wreg; cptr_n = cptr;
    end
  end
  wire is_cp = active && (32'(cptr_n) < N_CPIL) && (32'(k) == CPIL_POS[cptr_n]);
  wire is_pilot = active && (k12_n == 4'(3 * mode_now));

  // H at a pilot: +-3/4 * Y
  wire signed [SW-1:0] q_re = (in_re >>> 1) + (in_re >>> 2);
  wire signed [SW-1:0] q_im = (in_im >>> 1) + (in_im >>> 2);
  wire signed [SW-1:0] hp_re = wreg_n[0] ? -q_re : q_re;
  wire signed [SW-1:0] hp_im = wreg_n[0] ? -q_im : q_im;

  logic [2*SW-1:0] htab [NTAB];
  wire  [2*SW-1:0] hrd = htab[j3_n];
  wire  signed [SW-1:0] hk_re = is_pilot ? hp_re : $signed(hrd[2*SW-1:SW]);
  wire  signed [SW-1:0] hk_im = is_pilot ? hp_im : $signed(hrd[SW-1:0]);

  logic signed [SW-1:0] hprev_re, hprev_im, hnext_re, hnext_im;
  logic signed [SW-1:0] d_re [3];
  logic signed [SW-1:0] d_im [3];
  logic                 d_pil [3];
  logic                 d_cp [3];    // continual pilot
  logic                 d_w [3];     // reference bit (1: pilot is -4/3)

  // interpolation between hprev and hnext
  function automatic logic signed [SW-1:0] third(input logic signed [SW+1:0] v);
    logic signed [SW+18:0] m;
    m = (SW+19)'(v) * (SW+19)'(21846);
    return SW'(m >>> 16);
  endfunction
  logic signed [SW-1:0] hi_re, hi_im;
  always_comb begin
    unique case (k3_n)
      2'd1:    begin hi_re = third((SW+2)'(hprev_re) * 2 + (SW+2)'(hnext_re));
                     hi_im = third((SW+2)'(hprev_im) * 2 + (SW+2)'(hnext_im)); end
      2'd2:    begin hi_re = third((SW+2)'(hprev_re) + (SW+2)'(hnext_re) * 2);
                     hi_im = third((SW+2)'(hprev_im) + (SW+2)'(hnext_im) * 2); end
      default: begin hi_re = hnext_re; hi_im = hnext_im; end
    endcase
  end

  // equalizer: y * conj(h) and |h|^2
  wire signed [2*SW+1:0] e_re = (2*SW+2)'(d_re[2]) * (2*SW+2)'(hi_re) + (2*SW+2)'(d_im[2]) * (2*SW+2)'(hi_im);
  wire signed [2*SW+1:0] e_im = (2*SW+2)'(d_im[2]) * (2*SW+2)'(hi_re) - (2*SW+2)'(d_re[2]) * (2*SW+2)'(hi_im);
  wire signed [2*SW+1:0] csi  = (2*SW+2)'(hi_re) * (2*SW+2)'(hi_re) + (2*SW+2)'(hi_im) * (2*SW+2)'(hi_im);

  // common phase error: sum over the continual pilots that are not scattered
  // pilots of this symbol of sign(p_k) * Y * conj(H)
  wire signed [SW+1:0] eq_re_n = (SW+2)'(e_re >>> HQ);
  wire signed [SW+1:0] eq_im_n = (SW+2)'(e_im >>> HQ);
  wire cpe_use = d_cp[2] && !d_pil[2];
  wire signed [SW+7:0] cpe_t_re = !cpe_use ? (SW+8)'(0) : d_w[2] ? -(SW+8)'(eq_re_n) : (SW+8)'(eq_re_n);
  wire signed [SW+7:0] cpe_t_im = !cpe_use ? (SW+8)'(0) : d_w[2] ? -(SW+8)'(eq_im_n) : (SW+8)'(eq_im_n);
  logic signed [SW+7:0] cpe_acc_re, cpe_acc_im;

  logic [2:0] nsym;
  always_ff @(posedge clk) begin
    if (in_valid && active && k3_n == 2'd0 && is_pilot) htab[j3_n] <= {hp_re, hp_im};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; mode_r <= '0; k3 <= '0; k12 <= '0; j3 <= '0; wreg <= '1; nsym <= '0; cptr <= '0;
      for (int i = 0; i < 3; i++) begin d_cp[i] <= 1'b0; d_w[i] <= 1'b0; end
      cpe_acc_re <= '0; cpe_acc_im <= '0; cpe_valid <= 1'b0; cpe_re <= '0; cpe_im <= '0;
      hprev_re <= '0; hprev_im <= '0; hnext_re <= '0; hnext_im <= '0;
      for (int i = 0; i < 3; i++) begin d_re[i] <= '0; d_im[i] <= '0; d_pil[i] <= 1'b0; end
      out_valid <= 1'b0; out_k <= '0; out_pilot <= 1'b0; out_h_re <= '0; out_h_im <= '0;
      out_eq_re <= '0; out_eq_im <= '0; out_csi <= '0; est_ready <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      cpe_valid <= 1'b0;
      if (in_valid) begin
        pcnt   <= p + 1'b1;
        mode_r <= mode_now;
        if (in_sym_start && nsym != 3'd4) nsym <= nsym + 1'b1;
        est_ready <= (nsym >= 3'd4) || (in_sym_start && nsym == 3'd3) ? 1'b1 : est_ready;
      end
      if (in_rng) begin
        k3   <= (k3_n == 2'd2) ? 2'd0 : k3_n + 2'd1;
        k12  <= (k12_n == 4'd11) ? 4'd0 : k12_n + 4'd1;
        j3   <= (k3_n == 2'd2) ? j3_n + 1'b1 : j3_n;
        wreg <= {wreg_n[2] ^ wreg_n[0], wreg_n[10:1]};
        cptr <= is_cp ? cptr_n + 1'b1 : cptr_n;
        d_cp[0] <= is_cp;    d_cp[1] <= d_cp[0]; d_cp[2] <= d_cp[1];
        d_w[0]  <= wreg_n[0]; d_w[1] <= d_w[0];  d_w[2]  <= d_w[1];
        d_re[0] <= in_re; d_re[1] <= d_re[0]; d_re[2] <= d_re[1];
        d_im[0] <= in_im; d_im[1] <= d_im[0]; d_im[2] <= d_im[1];
        d_pil[0] <= is_pilot; d_pil[1] <= d_pil[0]; d_pil[2] <= d_pil[1];
        if (k3_n == 2'd0) begin
          hprev_re <= hnext_re; hprev_im <= hnext_im;
          hnext_re <= hk_re;    hnext_im <= hk_im;
        end
        if (k >= 3) begin
          out_valid <= 1'b1;
          out_k     <= 11'(k - 3);
          out_pilot <= d_pil[2];
          out_h_re  <= hi_re;
          out_h_im  <= hi_im;
          out_eq_re <= eq_re_n;
          out_eq_im <= eq_im_n;
          out_csi   <= (SW+2)'(csi >>> HQ);
          cpe_acc_re <= ((k == 3) ? (SW+8)'(0) : cpe_acc_re) + cpe_t_re;
          cpe_acc_im <= ((k == 3) ? (SW+8)'(0) : cpe_acc_im) + cpe_t_im;
          if (32'(k) == K_MAX + 3) begin
            cpe_valid <= 1'b1;
            cpe_re    <= cpe_acc_re + cpe_t_re;
            cpe_im    <= cpe_acc_im + cpe_t_im;
          end
        end
      end
    end
  end

endmodule
