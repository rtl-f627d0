// ddc: digital down converter from the second IF to complex baseband.
//
// The free-running ADC delivers real samples of a signal centred on the second
// IF (4.57 MHz) at 36.28 MHz. An NCO advances by FIF = round(4.57/36.28*2^24)
// per ADC sample and a rotation CORDIC multiplies the (left-aligned) ADC
// sample by exp(-j*phase), shifting the wanted band to 0 Hz. The mixer output
// is then low-pass filtered and decimated by DEC = 4 with an
// integrate-and-dump filter: four consecutive products are summed and one
// complex sample leaves (about 9.07 Msample/s). With four taps the filter has
// a null at 36.28/4 = 9.07 MHz, close to the mixing image at -2*4.57 MHz.
// The sum is halved (the mixer halves the amplitude of a real input, the
// filter multiplies by four) and saturated to OW bits.
//
// The IF and sample rate come from the document; the NCO/CORDIC mixer, the
// integrate-and-dump filter and all widths are choices of this design.
// Interface: adc_valid/adc in (normally every clock), out_valid pulses once per
// DEC accepted ADC samples with out_re/out_im; latency ITER+2+DEC clocks.
module ddc #(
  parameter int ADC_W = 10,
  parameter int OW    = 12,
  parameter int PHW   = 24,
  parameter int FIF   = 2113337,
  parameter int DEC   = 4,
  parameter int ITER  = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc,
  output logic                    out_valid,
  output logic signed [OW-1:0]    out_re,
  output logic signed [OW-1:0]    out_im
);

  localparam int SUMW = OW + $clog2(DEC) + 1;

  logic [PHW-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase <= '0;
    else if (adc_valid) phase <= phase + PHW'(FIF);
  end

  logic                 mix_v;
  logic signed [OW-1:0] mix_re, mix_im;
  cordic_rot #(.W(OW), .ITER(ITER)) u_mix (
    .clk, .rst_n, .in_valid(adc_valid),
    .in_x(OW'(adc) <<< (OW - ADC_W)), .in_y('0),
    .in_ang(-$signed(phase[PHW-1 -: 16])),
    .out_valid(mix_v), .out_x(mix_re), .out_y(mix_im));

  logic [$clog2(DEC)-1:0] k;
  logic signed [SUMW-1:0] acc_re, acc_im;
  wire  signed [SUMW-1:0] nxt_re = ((k == 0) ? '0 : acc_re) + SUMW'(mix_re);
  wire  signed [SUMW-1:0] nxt_im = ((k == 0) ? '0 : acc_im) + SUMW'(mix_im);

  function automatic logic signed [OW-1:0] sat(input logic signed [SUMW-1:0] v);
    logic signed [SUMW-1:0] h;
    h = v >>> 1;
    if (h > SUMW'((1 <<< (OW-1)) - 1))  return OW'((1 <<< (OW-1)) - 1);
    if (h < -SUMW'(1 <<< (OW-1)))       return OW'(-(1 <<< (OW-1)));
    return OW'(h);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; acc_re <= '0; acc_im <= '0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      if (mix_v) begin
        acc_re <= nxt_re;
        acc_im <= nxt_im;
        k <= (32'(k) == DEC - 1) ? '0 : k + 1'b1;
        if (32'(k) == DEC - 1) begin
          out_valid <= 1'b1;
          out_re <= sat(nxt_re);
          out_im <= sat(nxt_im);
        end
      end
    end
  end

endmodule
