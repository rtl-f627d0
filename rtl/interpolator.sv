// interpolator: resampler with its interpolator controller, correcting the
// sampling clock offset of a free-running ADC.
//
// The ADC clock is never adjusted; instead the stream is resampled. Output
// instants are spaced rho = 1 + step_adj * 2^-FB input periods apart. The
// controller keeps t, the time of the next output measured from the older of
// the two newest input samples x0, x1. Each new input shifts the pair and
// lowers t by one; while t < 1 an output
//     y = x0 + frac(t) * (x1 - x0)        (linear interpolation)
// is produced and t grows by rho. Normally one output follows each input.
// When rho < 1 the controller sometimes emits two (it copies a sample:
// copy_evt), when rho > 1 sometimes none (it discards one: discard_evt). The
// fraction mu = frac(t) is brought out; plotted over time it is a sawtooth
// whose jumps are the copy or discard events.
//
// Interface: in_valid/in_re/in_im; inputs must be at least 4 clocks apart
// (the down converter delivers one every 4). Outputs appear 1-2 clocks after
// an input. The copy/discard control follows the document; linear
// interpolation (rather than a higher-order filter), the fixed-point formats
// and step_adj are choices of this design.
module interpolator #(
  parameter int W  = 12,
  parameter int FB = 20,             // fraction bits of t and rho
  parameter int MB = 12              // bits of mu used by the multiplier
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [15:0]    step_adj,    // rho - 1 in units of 2^-FB
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_re,
  input  logic signed [W-1:0]   in_im,
  output logic                  out_valid,
  output logic signed [W-1:0]   out_re,
  output logic signed [W-1:0]   out_im,
  output logic [MB-1:0]         mu,
  output logic                  copy_evt,
  output logic                  discard_evt
);

  localparam logic [FB+1:0] ONE = (FB+2)'(1) << FB;

  logic signed [W-1:0] x0_re, x0_im, x1_re, x1_im;
  logic [FB+1:0]       t;          // 2 integer bits
  logic                pend;
  logic [1:0]          n_em;

  wire [MB-1:0] frac = t[FB-1 -: MB];
  wire signed [W:0]    d_re = (W+1)'(x1_re) - (W+1)'(x0_re);
  wire signed [W:0]    d_im = (W+1)'(x1_im) - (W+1)'(x0_im);
  wire signed [W+MB+1:0] p_re = (W+MB+2)'(d_re) * $signed({2'b00, frac});
  wire signed [W+MB+1:0] p_im = (W+MB+2)'(d_im) * $signed({2'b00, frac});
  wire [FB+1:0] rho = (FB+2)'(ONE + (FB+2)'(signed'(step_adj)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0_re <= '0; x0_im <= '0; x1_re <= '0; x1_im <= '0;
      t <= ONE; pend <= 1'b0; n_em <= '0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0; mu <= '0;
      copy_evt <= 1'b0; discard_evt <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      copy_evt    <= 1'b0;
      discard_evt <= 1'b0;
      if (in_valid) begin
        x0_re <= x1_re; x0_im <= x1_im;
        x1_re <= in_re; x1_im <= in_im;
        t     <= t - ONE;
        pend  <= 1'b1;
        n_em  <= '0;
      end else if (pend) begin
        if (t < ONE) begin
          out_valid <= 1'b1;
          out_re    <= x0_re + W'(p_re >>> MB);
          out_im    <= x0_im + W'(p_im >>> MB);
          mu        <= frac;
          t         <= t + rho;
          n_em      <= n_em + 1'b1;
          if (n_em == 2'd1) copy_evt <= 1'b1;
        end else begin
          pend <= 1'b0;
          if (n_em == 2'd0) discard_evt <= 1'b1;
        end
      end
    end
  end

  a_spacing: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !pend || t >= ONE)
    else $error("interpolator: input arrived before the outputs of the previous one");

endmodule
