// Sequential integer square root: root = floor(sqrt(value)).
// Digit-by-digit (restoring) method: each clock brings down the next two bits
// of the radicand and decides one bit of the root, so a result takes IN_W/2
// steps. A pulse on 'start' loads the radicand, 'busy' is high while it
// works and 'done' pulses for one clock, IN_W/2 + 1 clocks after start, when
// 'root' is valid; the root holds
// until the next start. IN_W must be even. The method is this design's
// choice.
module int_sqrt #(
  parameter int IN_W = stats_pkg::VAR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IN_W-1:0]   value,
  output logic              busy,
  output logic              done,
  output logic [IN_W/2-1:0] root
);
  localparam int OUT_W = IN_W / 2;
  localparam int CNT_W = $clog2(OUT_W + 1);

  logic [IN_W-1:0]  rad;       // radicand bits not yet brought down
  logic [OUT_W+1:0] rem;       // partial remainder
  logic [CNT_W-1:0] cnt;
  logic [OUT_W+1:0] rem_sh, trial, diff;

  always_comb begin
    rem_sh = {rem[OUT_W-1:0], rad[IN_W-1:IN_W-2]};
    trial  = {root, 2'b01};
    diff   = rem_sh - trial;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      cnt  <= '0;
      root <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rad  <= value;
        rem  <= '0;
        root <= '0;
        cnt  <= CNT_W'(OUT_W);
        busy <= 1'b1;
      end else if (busy) begin
        rad <= {rad[IN_W-3:0], 2'b00};
        if (rem_sh >= trial) begin
          rem  <= diff;
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[OUT_W-2:0], 1'b0};
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
