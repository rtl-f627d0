// cordic_derotator: carrier frequency offset compensation with a CORDIC that
// doubles as the derotator and the NCO's sine/cosine generator.
//
// A phase accumulator (the NCO) adds the signed frequency word freq to a
// PHW-bit phase for every valid sample (2^PHW = one turn per sample). The
// top 16 phase bits, negated, drive a pipelined rotation CORDIC, so
//     out = in * exp(-j*phase),
// which removes a carrier offset of freq/2^PHW cycles per sample. Using the
// CORDIC in place of a sine table and four multipliers follows the document;
// the widths, the pipelined CORDIC and the phase clear input are choices of
// this design.
//
// Interface: in_valid/in_re/in_im in, out_valid/out_re/out_im out ITER+2
// clocks later. freq may change at any time; phase_clr sets the phase to 0.
module cordic_derotator #(
  parameter int W    = 12,
  parameter int PHW  = 24,
  parameter int ITER = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [PHW-1:0] freq,
  input  logic                  phase_clr,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_re,
  input  logic signed [W-1:0]   in_im,
  output logic                  out_valid,
  output logic signed [W-1:0]   out_re,
  output logic signed [W-1:0]   out_im
);

  logic [PHW-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase <= '0;
    else if (phase_clr) phase <= '0;
    else if (in_valid)  phase <= phase + PHW'(freq);
  end

  wire signed [15:0] rot_ang = -$signed(phase[PHW-1 -: 16]);

  cordic_rot #(.W(W), .ITER(ITER)) u_rot (
    .clk, .rst_n, .in_valid, .in_x(in_re), .in_y(in_im), .in_ang(rot_ang),
    .out_valid, .out_x(out_re), .out_y(out_im));

endmodule
