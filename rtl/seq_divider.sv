// Sequential unsigned divider: quotient = dividend / divisor (truncated).
// Radix-2 restoring division, one quotient bit per clock: a pulse on 'start'
// loads the operands, 'busy' stays high for DIVIDEND_W steps and 'done'
// pulses for one clock, DIVIDEND_W + 1 clocks after start, when 'quotient'
// is valid; the quotient then holds until
// the next start. A zero divisor yields an all-ones quotient. Used once per
// frame, so a compact iterative unit suffices; its structure is this design's
// choice.
module seq_divider #(
  parameter int DIVIDEND_W = stats_pkg::SX2_W,
  parameter int DIVISOR_W  = stats_pkg::SUM_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  busy,
  output logic                  done,
  output logic [DIVIDEND_W-1:0] quotient
);
  localparam int CNT_W = $clog2(DIVIDEND_W + 1);

  logic [DIVISOR_W-1:0] d;
  logic [DIVISOR_W:0]   rem;
  logic [CNT_W-1:0]     cnt;
  logic [DIVISOR_W+1:0] shifted, trial;

  always_comb begin
    shifted = {rem, quotient[DIVIDEND_W-1]};
    trial   = shifted - {2'b00, d};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d        <= '0;
      rem      <= '0;
      cnt      <= '0;
      quotient <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        d        <= divisor;
        rem      <= '0;
        quotient <= dividend;
        cnt      <= CNT_W'(DIVIDEND_W);
        busy     <= 1'b1;
      end else if (busy) begin
        if (!trial[DIVISOR_W+1]) begin
          rem      <= trial[DIVISOR_W:0];
          quotient <= {quotient[DIVIDEND_W-2:0], 1'b1};
        end else begin
          rem      <= shifted[DIVISOR_W:0];
          quotient <= {quotient[DIVIDEND_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
