// One lane of the linearization polynomial y = a0 + a1*x + a2*x^2, evaluated
// by Horner's rule as y = a0 + x*(a1 + x*a2).
//
// Each multiplication and each addition has its own pipeline stage, between
// an input and an output register, so a new sample is taken every clock and
// its result appears 6 clocks later (interval 1, latency 6):
//   1 input register        x1 = x
//   2 multiply              p1 = x1 * a2
//   3 add                   t1 = p1 + a1
//   4 multiply              p2 = x3 * t1
//   5 add                   t2 = p2 + a0
//   6 round and saturate    y  = sat12((t2 + 2^19) >>> 20)
// Coefficients are signed with COEF_FRAC fractional bits; the sample is a
// signed integer. The result is rounded half up and saturated to the sample
// width (the number formats, rounding and saturation are this design's
// choices). With bypass set the input sample is carried unchanged through the
// same six registers, so switching the bypass never changes the latency.
// All stages advance together when ce is high; reset clears the registers.
module lin_horner_lane
#(
  parameter int SAMPLE_W = lin_pkg::SAMPLE_W,
  parameter int COEF_W   = lin_pkg::COEF_W,
  parameter int COEF_FRAC = lin_pkg::COEF_FRAC,
  parameter logic signed [COEF_W-1:0] A0 = lin_pkg::A0_DEFAULT,
  parameter logic signed [COEF_W-1:0] A1 = lin_pkg::A1_DEFAULT,
  parameter logic signed [COEF_W-1:0] A2 = lin_pkg::A2_DEFAULT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic                       bypass,
  input  logic signed [SAMPLE_W-1:0] x,
  output logic signed [SAMPLE_W-1:0] y
);
  localparam int P1_W = SAMPLE_W + COEF_W;      // x * a2
  localparam int T1_W = P1_W + 1;               // + a1
  localparam int P2_W = SAMPLE_W + T1_W;        // x * t1
  localparam int T2_W = P2_W + 1;               // + a0
  localparam logic signed [SAMPLE_W-1:0] YMAX = {1'b0, {(SAMPLE_W-1){1'b1}}};
  localparam logic signed [SAMPLE_W-1:0] YMIN = {1'b1, {(SAMPLE_W-1){1'b0}}};

  // The sample and the bypass flag travel alongside the arithmetic.
  logic signed [SAMPLE_W-1:0] xd [1:5];
  logic                       bp [1:5];
  logic signed [P1_W-1:0]     p1;
  logic signed [T1_W-1:0]     t1;
  logic signed [P2_W-1:0]     p2;
  logic signed [T2_W-1:0]     t2;

  logic signed [T2_W-1:0]     rounded;
  logic signed [T2_W-COEF_FRAC-1:0] yint;
  logic signed [SAMPLE_W-1:0] ysat;

  always_comb begin
    rounded = t2 + T2_W'(signed'(1) <<< (COEF_FRAC - 1));
    yint    = rounded[T2_W-1:COEF_FRAC];
    if (yint > (T2_W-COEF_FRAC)'(YMAX))      ysat = YMAX;
    else if (yint < (T2_W-COEF_FRAC)'(YMIN)) ysat = YMIN;
    else                                     ysat = yint[SAMPLE_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= 5; i++) begin
        xd[i] <= '0;
        bp[i] <= 1'b0;
      end
      p1 <= '0;
      t1 <= '0;
      p2 <= '0;
      t2 <= '0;
      y  <= '0;
    end else if (ce) begin
      xd[1] <= x;
      bp[1] <= bypass;
      for (int i = 2; i <= 5; i++) begin
        xd[i] <= xd[i-1];
        bp[i] <= bp[i-1];
      end
      p1 <= xd[1] * A2;
      t1 <= T1_W'(p1) + T1_W'(A1);
      p2 <= xd[3] * t1;
      t2 <= T2_W'(p2) + T2_W'(A0);
      y  <= bp[5] ? xd[5] : ysat;
    end
  end
endmodule
