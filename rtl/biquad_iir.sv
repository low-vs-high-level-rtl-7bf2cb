// Second-order IIR (biquad) filter in transposed direct form I, taking one
// sample per clock.
//
// Transfer function H(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1 z^-1 + a2 z^-2).
// The pole section runs first and the zero section second, both transposed,
// sharing the intermediate value w = x + s1:
//   s1' = -a1*w + s2     s2' = -a2*w
//   s3' =  b1*w + s4     s4' =  b2*w
//   y   =  b0*w + s3
// (primes are the next-sample values). Samples and coefficients are signed
// fixed point of FIX_W bits with FIX_I integer bits (sign included; Q2.16 by
// default, range [-2, 2)). State s1 has S1_W bits with S1_I integer bits, and
// s2..s4 have S_W bits with S_I integer bits. Each value is reduced to its
// format by dropping low fraction bits (rounding towards minus infinity) and
// wrapping on overflow. s1 and the samples must have the same number of
// fraction bits.
//
// Timing: latency 4 clocks, interval 1. Clock 1 registers the input, clock 2
// forms w and updates all four states (the recursive loop add-multiply-add
// closes within this one clock, which is what permits a sample per clock),
// clock 3 forms b0*w + s3, clock 4 registers the output. States change only
// for valid input samples; data_out_vld marks each result. The coefficients
// are expected to stay constant while samples flow. The pipeline split and
// the reset of the states to zero are this design's choices.
module biquad_iir #(
  parameter int FIX_W = 18,
  parameter int FIX_I = 2,
  parameter int S1_W  = 25,
  parameter int S1_I  = 9,
  parameter int S_W   = 48,
  parameter int S_I   = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [FIX_W-1:0] coeff_b0,
  input  logic signed [FIX_W-1:0] coeff_b1,
  input  logic signed [FIX_W-1:0] coeff_b2,
  input  logic signed [FIX_W-1:0] coeff_a1,
  input  logic signed [FIX_W-1:0] coeff_a2,
  input  logic signed [FIX_W-1:0] data_in,
  input  logic                    data_in_vld,
  output logic signed [FIX_W-1:0] data_out,
  output logic                    data_out_vld
);
  localparam int F    = FIX_W - FIX_I;     // fraction bits of samples, coefficients, s1
  localparam int SF   = S_W - S_I;         // fraction bits of s2..s4
  localparam int ALN  = SF - 2*F;          // shift of a product onto the s2..s4 grid
  localparam int WW   = S1_W + 1;          // w = x + s1
  localparam int CW   = FIX_W + 1;         // negated coefficient
  localparam int PW   = WW + CW;           // product
  localparam int AW   = PW + ALN;          // aligned product
  localparam int SUMW = ((AW > S_W) ? AW : S_W) + 1;

  logic signed [FIX_W-1:0] x_r;
  logic                    v1, v2, v3;
  logic signed [S1_W-1:0]  s1;
  logic signed [S_W-1:0]   s2, s3, s4;
  logic signed [WW-1:0]    w, w_r;
  logic signed [S_W-1:0]   s3_r;
  logic signed [FIX_W-1:0] y_r;

  // product of w and a coefficient, on the fraction grid of s2..s4
  function automatic logic signed [SUMW-1:0] mul_al(input logic signed [WW-1:0] a,
                                                   input logic signed [CW-1:0] c);
    logic signed [PW-1:0] p;
    p = PW'(a) * PW'(c);
    return SUMW'(p) <<< ALN;
  endfunction

  logic signed [SUMW-1:0] t1, t2, t3, t4, ty;
  always_comb begin
    w  = WW'(x_r) + WW'(s1);
    t1 = mul_al(w, -CW'(coeff_a1)) + SUMW'(s2);
    t2 = mul_al(w, -CW'(coeff_a2));
    t3 = mul_al(w,  CW'(coeff_b1)) + SUMW'(s4);
    t4 = mul_al(w,  CW'(coeff_b2));
    ty = mul_al(w_r, CW'(coeff_b0)) + SUMW'(s3_r);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_r <= '0;
      v1  <= 1'b0;
      v2  <= 1'b0;
      v3  <= 1'b0;
      s1  <= '0;
      s2  <= '0;
      s3  <= '0;
      s4  <= '0;
      w_r <= '0;
      s3_r <= '0;
      y_r <= '0;
      data_out     <= '0;
      data_out_vld <= 1'b0;
    end else begin
      // clock 1: input register
      x_r <= data_in;
      v1  <= data_in_vld;
      // clock 2: recursive update
      v2 <= v1;
      if (v1) begin
        s1   <= S1_W'(t1 >>> (SF - F));
        s2   <= S_W'(t2);
        s3   <= S_W'(t3);
        s4   <= S_W'(t4);
        w_r  <= w;
        s3_r <= s3;
      end
      // clock 3: output sum
      v3  <= v2;
      y_r <= FIX_W'(ty >>> (SF - F));
      // clock 4: output register
      data_out     <= y_r;
      data_out_vld <= v3;
    end
  end
endmodule
