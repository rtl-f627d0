// cordic_vec: pipelined CORDIC in vectoring mode (magnitude and angle).
//
// This is the one CORDIC unit that the joint CFO/SCO estimator shares between
// its Abs block (magnitude of the ICFO correlation results) and its Arctan
// block (phase of the continual pilot correlations). It runs ITER = 11
// micro-rotations, the iteration count of the estimator's hardware budget.
//
// How it works: a first stage folds the vector into the right half plane
// (adding half a turn to the angle when x < 0); each of the ITER following
// stages rotates by +-atan(2^-i) towards the x axis and accumulates the
// angle. GB guard bits below the input LSB keep the truncation of the
// shifts small. The x register then holds the magnitude times the CORDIC gain
// (about 1.647; it is not removed, since argmax and ratios do not need it).
//
// Interface: in_valid/in_x/in_y/in_tag enter every cycle if wanted; the
// result and the unchanged tag appear ITER+1 cycles later with out_valid.
// out_ang uses 2^16 = one turn. Pipelining (one result per clock) is a choice
// of this design.
module cordic_vec #(
  parameter int IN_W  = 16,
  parameter int ITER  = 11,
  parameter int TAG_W = 8,
  localparam int GB   = 4,          // guard bits below the input LSB
  localparam int IW   = IN_W + 2 + GB
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_x,
  input  logic signed [IN_W-1:0]  in_y,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [IN_W+1:0]         out_mag,
  output logic signed [15:0]      out_ang,
  output logic [TAG_W-1:0]        out_tag
);
  import dvbt_pkg::*;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [15:0]   zs [ITER+1];
  logic [TAG_W-1:0]     ts [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: fold into the right half plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (in_x < 0) begin
        xs[0] <= -(IW'(in_x) <<< GB);
        ys[0] <= -(IW'(in_y) <<< GB);
        zs[0] <= 16'sh8000;
      end else begin
        xs[0] <= IW'(in_x) <<< GB;
        ys[0] <= IW'(in_y) <<< GB;
        zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [15:0] A = 16'(ATAN_TAB[i]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + A;
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - A;
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign out_mag   = (IN_W+2)'(xs[ITER] >>> GB);
  assign out_ang   = zs[ITER];
  assign out_tag   = ts[ITER];

endmodule
