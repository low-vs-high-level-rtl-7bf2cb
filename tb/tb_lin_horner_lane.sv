// Self-checking testbench for lin_horner_lane.
// Drives random and extreme 12-bit samples with a randomly gated clock enable
// and random bypass, and compares every output against a reference that
// evaluates the polynomial with the same coefficient integers and, where the
// result is not saturated, also against the real-valued polynomial
// (within 1 LSB). The expected values are delayed by exactly 6 enabled
// clocks, which checks the latency.
module tb_lin_horner_lane;
  logic clk = 0, rst_n = 0, ce = 0, bypass = 0;
  logic signed [11:0] x = '0, y;
  int checks = 0, failures = 0;

  localparam real C0 = 2.2854652782872233, C1 = 0.9962862193648518, C2 = -2.506094726425692e-03;

  lin_horner_lane dut (.clk, .rst_n, .ce, .bypass, .x, .y);

  always #5 clk = ~clk;

  function automatic int ref_int(int xi);
    longint t;
    t = (longint'(-2628) * xi + 1044682) * xi + 2396484;
    t = (t + (1 << 19)) >>> 20;
    if (t > 2047) t = 2047;
    if (t < -2048) t = -2048;
    return int'(t);
  endfunction

  int exp_pipe [6];
  bit exp_bp [6];
  int exp_x [6];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin exp_pipe[i] = 0; exp_bp[i] = 0; exp_x[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int xi;
      @(negedge clk);
      case (n % 7)
        0: xi = 2047;
        1: xi = -2048;
        default: xi = int'($urandom_range(0, 4095)) - 2048;
      endcase
      if (n % 3 == 2) xi = int'($urandom_range(0, 400)) - 200; // region where the polynomial stays in range
      x = 12'(xi);
      bypass = ($urandom_range(0, 4) == 0);
      ce = (n < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (ce) begin
        for (int i = 5; i > 0; i--) begin
          exp_pipe[i] = exp_pipe[i-1]; exp_bp[i] = exp_bp[i-1]; exp_x[i] = exp_x[i-1];
        end
        exp_pipe[0] = bypass ? xi : ref_int(xi);
        exp_bp[0] = bypass;
        exp_x[0] = xi;
      end
      #1;
      if (n >= 6) checks++;
      if (n >= 6 && int'(y) != exp_pipe[5]) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d y=%0d exp=%0d", n, y, exp_pipe[5]);
      end
      if (!exp_bp[5] && n > 10) begin
        real r;
        r = C0 + C1 * exp_x[5] + C2 * exp_x[5] * exp_x[5];
        if (r > -2047.0 && r < 2046.0) begin
          checks++;
          if ((real'(y) - r) > 1.0 || (r - real'(y)) > 1.0) begin
            failures++;
            if (failures < 10) $display("real mismatch x=%0d y=%0d r=%f", exp_x[5], y, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
