// sp_mode_det: scattered pilot mode detection.
//
// DVB-T scattered pilots sit on carriers k = 3*(l mod 4) + 12*p of symbol l,
// so their pattern repeats every four symbols and the receiver must find
// l mod 4 before it can use them. Scattered pilots are sent with a boost
// (amplitude 4/3 against a mean data power of 1), so the carrier class
// k mod 12 = 3*m that holds them carries the most power. For each symbol the
// detector sums |z|^2 (>>> PSH) over the active carriers of each of the four
// classes and reports the class with the largest sum as mode, at the end of
// the symbol. mode_next = mode + 1 (mod 4) is the prediction for the symbol
// that follows. The document only states that the mode must be detected; the
// power-comparison method and widths are choices of this design.
//
// Interface: in_valid/in_sym_start/in_re/in_im in the centred FFT order
// (carrier k at position k + K_OFFSET). mode_valid pulses one clock after the
// last position N-1 of a symbol.
module sp_mode_det #(
  parameter int N   = dvbt_pkg::N_FFT,
  parameter int SW  = 12,
  parameter int PSH = 8,
  parameter int AW  = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sym_start,
  input  logic signed [SW-1:0] in_re,
  input  logic signed [SW-1:0] in_im,
  output logic                 mode_valid,
  output logic [1:0]           mode,
  output logic [1:0]           mode_next
);
  import dvbt_pkg::*;

  localparam int PAW = $clog2(N);
  logic [PAW-1:0] pcnt;
  wire  [PAW-1:0] p = in_sym_start ? '0 : pcnt;
  // carrier index and its position inside the 12-carrier pattern
  wire  signed [PAW+1:0] k = (PAW+2)'(p) - (PAW+2)'(K_OFFSET);
  logic [3:0] k12, k12_n;      // k mod 12, tracked incrementally
  wire  active = (k >= 0) && (32'(k) <= K_MAX);

  wire [2*SW:0] pw = (2*SW+1)'((2*SW)'(in_re) * (2*SW)'(in_re)) +
                     (2*SW+1)'((2*SW)'(in_im) * (2*SW)'(in_im));
  logic [AW-1:0] acc [4];
  logic [AW-1:0] acc_n [4];

  always_comb begin
    k12_n = (p == PAW'(K_OFFSET)) ? 4'd0 : k12;
    for (int m = 0; m < 4; m++) begin
      acc_n[m] = in_sym_start ? '0 : acc[m];
      if (active && k12_n == 4'(3 * m)) acc_n[m] = acc_n[m] + AW'(pw >> PSH);
    end
  end

  // argmax over the four sums including the last sample
  logic [1:0] best;
  always_comb begin
    best = 2'd0;
    for (int m = 1; m < 4; m++) if (acc_n[m] > acc_n[best]) best = 2'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; k12 <= '0; mode_valid <= 1'b0; mode <= '0; mode_next <= '0;
      for (int m = 0; m < 4; m++) acc[m] <= '0;
    end else begin
      mode_valid <= 1'b0;
      if (in_valid) begin
        pcnt <= p + 1'b1;
        k12  <= (k12_n == 4'd11) ? 4'd0 : k12_n + 4'd1;
        for (int m = 0; m < 4; m++) acc[m] <= acc_n[m];
        if (32'(p) == N - 1) begin
          mode_valid <= 1'b1;
          mode       <= best;
          mode_next  <= best + 2'd1;
        end
      end
    end
  end

endmodule
