// cordic_rot: pipelined CORDIC vector rotator.
//
// Rotates (x, y) by the angle 2*pi*phase/2^PW.  A first stage folds angles
// beyond +-90 degrees by negating the vector and turning the phase by half a
// circle; ITER shift-and-add micro-rotations follow, one per pipeline stage,
// and a last stage multiplies by 1/K to remove the CORDIC gain and saturates
// to W bits.  The IFFT uses it both for the twiddle factors and for the phase
// advance of its input coefficients, so no twiddle table is stored.
// Interface: in_valid/x/y/phase in, out_valid/xo/yo out, ITER+2 clocks later,
// one rotation per clock.  The arctangent table, phase width and iteration
// count are this design's choices; the document only says the rotations are
// done with a fully pipelined CORDIC.
module cordic_rot
  import aural_pkg::*;
#(
  parameter int unsigned W    = 24,
  parameter int unsigned PW   = 24,
  parameter int unsigned ITER = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  input  logic        [PW-1:0] phase,
  output logic                out_valid,
  output logic signed [W-1:0] xo,
  output logic signed [W-1:0] yo
);
  localparam int unsigned IW = W + 2;

  function automatic logic signed [PW-1:0] atan_step(input int unsigned i);
    logic [32:0] r;
    r = ({1'b0, ATAN_TURN32[i]} + (33'd1 << (32 - PW - 1))) >> (32 - PW);
    return PW'(r);
  endfunction

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [PW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // Fold into [-90, +90) degrees.
  always_ff @(posedge clk) begin
    if (rst) vs[0] <= 1'b0;
    else     vs[0] <= in_valid;
    if (phase[PW-1] ^ phase[PW-2]) begin
      xs[0] <= -IW'(x);
      ys[0] <= -IW'(y);
      zs[0] <= $signed(phase + (PW'(1) << (PW - 1)));
    end else begin
      xs[0] <= IW'(x);
      ys[0] <= IW'(y);
      zs[0] <= $signed(phase);
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    always_ff @(posedge clk) begin
      if (rst) vs[i+1] <= 1'b0;
      else     vs[i+1] <= vs[i];
      if (zs[i] >= 0) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - atan_step(i);
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + atan_step(i);
      end
    end
  end

  function automatic logic signed [W-1:0] scale_sat(input logic signed [IW-1:0] v);
    logic signed [IW+17:0] p;
    logic signed [IW+17:0] lim;
    p   = (IW+18)'(v) * (IW+18)'(signed'({1'b0, 17'(CORDIC_INV_GAIN_Q16)}));
    p   = (p + (IW+18)'(32768)) >>> 16;
    lim = (IW+18)'((64'sd1 <<< (W - 1)) - 1);
    if (p > lim)       return W'(lim);
    else if (p < -lim) return W'(-lim);
    else               return W'(p);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= vs[ITER];
    xo <= scale_sat(xs[ITER]);
    yo <= scale_sat(ys[ITER]);
  end
endmodule
