// symbol_boundary: cyclic-prefix maximum-correlation symbol boundary detector
// with FFT window generation.
//
// Each incoming sample r(i) is multiplied by the conjugate of r(i-N), taken
// from an N-deep delay line, and the products are summed over the last NG
// samples with a moving sum (add the newest product, subtract the one NG
// samples old, kept in an NG-deep FIFO). The sum is largest when its window
// lines up with the guard interval and its copy, i.e. on the last sample of a
// symbol. Over each period of N+NG samples the position of the largest
// |S| (approximated as |Re|+|Im|) is kept; at the end of the period it is
// reported with the complex sum at that point, whose phase 2*pi*eps gives the
// fractional CFO eps in carrier spacings. The FFT window of a symbol starts
// NG+1 samples after a peak; out_sym_start and out_win mark N samples of the
// (one-cycle delayed) input stream for the FFT.
//
// Interface: in_valid qualifies in_re/in_im. peak_valid pulses once per
// period with peak_idx (position inside the free-running period counter) and
// peak_re/peak_im. out_* is the input delayed by one clock with the window
// marks. The moving-sum structure follows the document; the magnitude
// approximation, the product scaling (>>> PSH) and the use of the latest
// peak without smoothing are choices of this design.
module symbol_boundary #(
  parameter int N   = dvbt_pkg::N_FFT,
  parameter int NG  = dvbt_pkg::N_GUARD,
  parameter int SW  = 12,
  parameter int PSH = 10,
  localparam int PW = 2 * SW + 1 - PSH,          // product width
  localparam int S_W = PW + $clog2(NG) + 1,      // moving-sum width
  localparam int P  = N + NG,
  localparam int CW = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_re,
  input  logic signed [SW-1:0] in_im,
  output logic                 peak_valid,
  output logic [CW-1:0]        peak_idx,
  output logic signed [S_W-1:0] peak_re,
  output logic signed [S_W-1:0] peak_im,
  output logic                 out_valid,
  output logic                 out_sym_start,
  output logic                 out_win,
  output logic signed [SW-1:0] out_re,
  output logic signed [SW-1:0] out_im
);

  // N-sample delay line and NG-product FIFO (read before write)
  logic [2*SW-1:0] dly [N];
  logic [2*PW-1:0] pfifo [NG];
  logic [$clog2(N)-1:0]  dptr;
  logic [$clog2(NG)-1:0] pptr;

  wire signed [SW-1:0] old_re = dly[dptr][2*SW-1:SW];
  wire signed [SW-1:0] old_im = dly[dptr][SW-1:0];
  // warm-up: products count once the delay line is full, and the FIFO is
  // read once it has been filled with such products (memories are not reset)
  logic [$clog2(N+NG+1)-1:0] fill;
  wire dly_full  = (32'(fill) >= N);
  wire fifo_full = (32'(fill) >= N + NG);
  wire signed [PW-1:0] drop_re = fifo_full ? pfifo[pptr][2*PW-1:PW] : '0;
  wire signed [PW-1:0] drop_im = fifo_full ? pfifo[pptr][PW-1:0]    : '0;

  // conj(r(i-N)) * r(i)
  logic signed [2*SW:0] m_re, m_im;
  logic signed [PW-1:0] prod_re, prod_im;
  always_comb begin
    m_re = (2*SW+1)'(in_re) * (2*SW+1)'(old_re) + (2*SW+1)'(in_im) * (2*SW+1)'(old_im);
    m_im = (2*SW+1)'(in_im) * (2*SW+1)'(old_re) - (2*SW+1)'(in_re) * (2*SW+1)'(old_im);
    prod_re = dly_full ? PW'(m_re >>> PSH) : '0;
    prod_im = dly_full ? PW'(m_im >>> PSH) : '0;
  end

  logic signed [S_W-1:0] s_re, s_im, s_re_n, s_im_n;
  assign s_re_n = s_re + S_W'(prod_re) - S_W'(drop_re);
  assign s_im_n = s_im + S_W'(prod_im) - S_W'(drop_im);

  function automatic logic [S_W:0] mag(input logic signed [S_W-1:0] a, input logic signed [S_W-1:0] b);
    return (S_W+1)'(a < 0 ? -a : a) + (S_W+1)'(b < 0 ? -b : b);
  endfunction

  logic [CW-1:0]  cnt, best_idx, win_pos;
  logic [S_W:0]   best_mag;
  logic signed [S_W-1:0] best_re, best_im;
  logic           have_timing;
  logic [$clog2(N+1)-1:0] win_left;
  wire  [S_W:0]   cur_mag = mag(s_re_n, s_im_n);
  wire            first   = (cnt == '0);
  wire            take    = first || (cur_mag > best_mag);
  wire            eop     = (32'(cnt) == P - 1);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dly[dptr]   <= {in_re, in_im};
      pfifo[pptr] <= {prod_re, prod_im};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr <= '0; pptr <= '0; s_re <= '0; s_im <= '0; fill <= '0;
      cnt <= '0; best_idx <= '0; best_mag <= '0; best_re <= '0; best_im <= '0;
      peak_valid <= 1'b0; peak_idx <= '0; peak_re <= '0; peak_im <= '0;
      have_timing <= 1'b0; win_pos <= '0; win_left <= '0;
      out_valid <= 1'b0; out_sym_start <= 1'b0; out_win <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      peak_valid <= 1'b0;
      out_valid  <= in_valid;
      out_sym_start <= 1'b0;
      out_win    <= 1'b0;
      if (in_valid) begin
        if (!fifo_full) fill <= fill + 1'b1;
        dptr <= (32'(dptr) == N - 1)  ? '0 : dptr + 1'b1;
        pptr <= (32'(pptr) == NG - 1) ? '0 : pptr + 1'b1;
        s_re <= s_re_n;
        s_im <= s_im_n;
        out_re <= in_re;
        out_im <= in_im;
        cnt  <= eop ? '0 : cnt + 1'b1;
        if (take) begin
          best_mag <= cur_mag; best_idx <= cnt; best_re <= s_re_n; best_im <= s_im_n;
        end
        if (eop) begin
          peak_valid  <= 1'b1;
          peak_idx    <= take ? cnt : best_idx;
          peak_re     <= take ? s_re_n : best_re;
          peak_im     <= take ? s_im_n : best_im;
          have_timing <= 1'b1;
          win_pos     <= CW'((32'(take ? cnt : best_idx) + 1 + NG) % P);
        end
        // FFT window
        if (have_timing && cnt == win_pos) begin
          out_sym_start <= 1'b1;
          out_win       <= 1'b1;
          win_left      <= ($clog2(N+1))'(N - 1);
        end else if (win_left != 0) begin
          out_win  <= 1'b1;
          win_left <= win_left - 1'b1;
        end
      end
    end
  end

endmodule
