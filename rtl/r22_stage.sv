// r22_stage: one radix-2^2 single-path delay-feedback stage pair of the IFFT.
//
// A stage pair handles sub-transforms of LS = N/4^S points with two
// butterflies in series, each with a feedback delay line:
//   BF2I  (delay LS/2): in the first half of each LS block it parks the input
//         and emits the stored differences; in the second half it emits
//         sums and stores differences.
//   BF2II (delay LS/4): the same on blocks of LS/2, but samples in the last
//         quarter of each LS block are first multiplied by -j (a swap and a
//         negation, no multiplier).
// A CORDIC then applies the twiddle W_LS^(m*g') where m is the position
// inside a quarter block and g' = 0,2,1,3 for quarters 0..3 (the last stage
// pair has no twiddle).  Everything is gated by in_valid, so gaps in the
// stream are allowed; each butterfly derives its control from its own count
// of valid samples, started at the offset its delay position in the chain
// implies.  Delay lines are memories with one pointer (read then write).
module r22_stage #(
  parameter int unsigned LOGN = 6,     // log2 of the full transform size
  parameter int unsigned S    = 0,     // index of this stage pair
  parameter int unsigned DW   = 24,
  parameter int unsigned PW   = 24,
  parameter int unsigned ITER = 18
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] xr,
  input  logic signed [DW-1:0] xi,
  output logic                 out_valid,
  output logic signed [DW-1:0] yr,
  output logic signed [DW-1:0] yi
);
  localparam int unsigned LOGLS = LOGN - 2*S;
  localparam int unsigned LS    = 1 << LOGLS;
  localparam int unsigned L1    = LS / 2;
  localparam int unsigned L2    = LS / 4;
  localparam bit          LAST  = (LOGLS == 2);

  // ---------------- BF2I ----------------
  logic signed [DW-1:0] d1r [L1];
  logic signed [DW-1:0] d1i [L1];
  logic [LOGLS-2:0]     p1;          // delay pointer (wraps at L1)
  logic [LOGLS-1:0]     c1;          // position mod LS
  logic                 v1;
  logic signed [DW-1:0] a1r, a1i;
  logic signed [DW-1:0] f1r, f1i;

  assign f1r = d1r[p1];
  assign f1i = d1i[p1];

  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0; c1 <= '0; v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        p1 <= (p1 == (LOGLS-1)'(L1 - 1)) ? '0 : p1 + 1'b1;
        c1 <= c1 + 1'b1;
      end
    end
    if (in_valid) begin
      if (!c1[LOGLS-1]) begin
        d1r[p1] <= xr;       d1i[p1] <= xi;
        a1r     <= f1r;      a1i     <= f1i;
      end else begin
        d1r[p1] <= f1r - xr; d1i[p1] <= f1i - xi;
        a1r     <= f1r + xr; a1i     <= f1i + xi;
      end
    end
  end

  // ---------------- BF2II ----------------
  localparam int unsigned PL2 = (L2 > 1) ? $clog2(L2) : 1;
  logic signed [DW-1:0] d2r [L2];
  logic signed [DW-1:0] d2i [L2];
  logic [PL2-1:0]       p2;
  logic [LOGLS-1:0]     c2;          // position mod LS, starts at LS/2
  logic                 v2;
  logic signed [DW-1:0] a2r, a2i;
  logic signed [DW-1:0] f2r, f2i, jr, ji;

  assign f2r = d2r[p2];
  assign f2i = d2i[p2];

  // Multiply by -j in the last quarter of the block.
  always_comb begin
    if (c2[LOGLS-1] && c2[LOGLS-2]) begin
      jr = a1i;  ji = -a1r;
    end else begin
      jr = a1r;  ji = a1i;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p2 <= '0; c2 <= LOGLS'(L1); v2 <= 1'b0;
    end else begin
      v2 <= v1;
      if (v1) begin
        p2 <= (L2 <= 1 || p2 == PL2'(L2 - 1)) ? '0 : p2 + 1'b1;
        c2 <= c2 + 1'b1;
      end
    end
    if (v1) begin
      if (!c2[LOGLS-2]) begin
        d2r[p2] <= jr;       d2i[p2] <= ji;
        a2r     <= f2r;      a2i     <= f2i;
      end else begin
        d2r[p2] <= f2r - jr; d2i[p2] <= f2i - ji;
        a2r     <= f2r + jr; a2i     <= f2i + ji;
      end
    end
  end

  // ---------------- twiddle ----------------
  if (LAST) begin : g_last
    assign out_valid = v2;
    assign yr = a2r;
    assign yi = a2i;
  end else begin : g_tw
    logic [LOGLS-1:0] c3;            // position mod LS, starts at LS/4
    logic [PW-1:0]    ph;
    logic [1:0]       g;
    logic [LOGLS-1:0] m, e;
    always_ff @(posedge clk) begin
      if (rst) c3 <= LOGLS'(L2);
      else if (v2) c3 <= c3 + 1'b1;
    end
    always_comb begin
      g = c3[LOGLS-1:LOGLS-2];
      m = c3 & LOGLS'(L2 - 1);
      unique case (g)
        2'd0: e = '0;
        2'd1: e = LOGLS'(m << 1);
        2'd2: e = m;
        default: e = LOGLS'(m * 3);
      endcase
      // FFT twiddle exp(-j*2*pi*e/LS) as a phase of PW bits.
      ph = PW'(-(PW'(e) << (PW - LOGLS)));
    end
    cordic_rot #(.W(DW), .PW(PW), .ITER(ITER)) u_tw (
      .clk, .rst, .in_valid(v2), .x(a2r), .y(a2i), .phase(ph),
      .out_valid, .xo(yr), .yo(yi));
  end
endmodule
