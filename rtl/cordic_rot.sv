// cordic_rot: pipelined CORDIC in rotation mode with gain correction.
//
// Rotates the complex sample (in_x + j in_y) by the angle in_ang (16 bits,
// 2^16 = one turn). A first stage brings the angle into +-90 degrees by
// negating the vector; ITER micro-rotation stages follow; a last stage
// multiplies by 1/1.6468 with the shift-and-add constant
// 1/2 + 1/8 - 1/64 - 1/512 = 0.6074 and rounds away GB guard bits, so the output has the input's scale.
// It is the rotator of the CORDIC-based derotator and of the down converter's
// mixer. Latency ITER+2 cycles, one sample per clock, in_valid travels with
// the data. ITER defaults to 11 like the estimator's CORDIC; the pipelined
// structure and the gain correction are choices of this design.
module cordic_rot #(
  parameter int W    = 12,
  parameter int ITER = 11,
  localparam int GB  = 4,           // guard bits below the input LSB
  localparam int IW  = W + 3 + GB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  input  logic signed [15:0]  in_ang,
  output logic                out_valid,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y
);
  import dvbt_pkg::*;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [15:0]   zs [ITER+1];
  logic                 vs [ITER+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (in_ang > 16'sd16384 || in_ang < -16'sd16384) begin
        xs[0] <= -(IW'(in_x) <<< GB);
        ys[0] <= -(IW'(in_y) <<< GB);
        zs[0] <= in_ang + 16'sh8000;
      end else begin
        xs[0] <= IW'(in_x) <<< GB;
        ys[0] <= IW'(in_y) <<< GB;
        zs[0] <= in_ang;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [15:0] A = 16'(ATAN_TAB[i]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0; xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - A;
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + A;
        end
      end
    end
  end

  // gain correction and saturation to W bits
  function automatic logic signed [W-1:0] scale_sat(input logic signed [IW-1:0] v);
    logic signed [IW+1:0] s;
    s = ((IW+2)'(v >>> 1) + (IW+2)'(v >>> 3) - (IW+2)'(v >>> 6) - (IW+2)'(v >>> 9)
         + (IW+2)'(1 <<< (GB-1))) >>> GB;
    if (s > (IW+2)'((1 <<< (W-1)) - 1))   return W'((1 <<< (W-1)) - 1);
    else if (s < -(IW+2)'(1 <<< (W-1)))   return W'(-(1 <<< (W-1)));
    else                                   return W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_x <= '0; out_y <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_x     <= scale_sat(xs[ITER]);
      out_y     <= scale_sat(ys[ITER]);
    end
  end

endmodule
