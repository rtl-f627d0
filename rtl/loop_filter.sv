// loop_filter: proportional-integral loop filter of a synchronisation loop.
//
// Turns one error estimate per OFDM symbol (the RCFO angle for the carrier
// loop, the SCO angle for the sampling loop) into the control word of an NCO
// (derotator frequency, interpolator step). On err_valid the integrator adds
// err >>> KI_SHIFT and the output becomes integ + (err >>> KP_SHIFT); with
// the proportional path off (KP_SHIFT >= OW) the loop is first order. load
// presets the integrator (acquisition values from coarse estimators). The
// document names the carrier and sampling recovery loops but not their
// filters: the filter type, gains and widths are choices of this design.
module loop_filter #(
  parameter int EW       = 16,
  parameter int OW       = 24,
  parameter int KI_SHIFT = 4,
  parameter int KP_SHIFT = 31,
  parameter bit NEGATE   = 1'b0      // invert the error sign
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [OW-1:0] load_val,
  input  logic                 err_valid,
  input  logic signed [EW-1:0] err,
  output logic signed [OW-1:0] ctrl
);

  wire signed [OW-1:0] e  = NEGATE ? -OW'(err) : OW'(err);
  wire signed [OW-1:0] ei = e >>> KI_SHIFT;
  logic signed [OW-1:0] ep;
  always_comb begin
    if (KP_SHIFT >= OW) ep = '0;
    else                ep = e >>> KP_SHIFT;
  end
  logic signed [OW-1:0] integ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0; ctrl <= '0;
    end else if (load) begin
      integ <= load_val; ctrl <= load_val;
    end else if (err_valid) begin
      integ <= integ + ei;
      ctrl  <= integ + ei + ep;
    end
  end

endmodule
