// Self-checking testbench for biquad_iir at its default Q2.16 / 25 / 48-bit
// formats.
// Three coefficient sets (a low-pass, a resonant band-pass and a pure
// feed-forward set) filter impulses, steps and random samples with random
// gaps in the valid signal. Every output is compared bit for bit with a
// fixed-point model of the same equations written in the testbench with
// 64-bit integers, and with a real-valued direct-form filter (error within
// 2^-10 while the signal is in range). The impulse response checks the
// 4-clock latency, and a burst checks one sample per clock.
module tb_biquad_iir;
  logic clk = 0, rst_n = 0;
  logic signed [17:0] coeff_b0 = '0, coeff_b1 = '0, coeff_b2 = '0, coeff_a1 = '0, coeff_a2 = '0;
  logic signed [17:0] data_in = '0, data_out;
  logic data_in_vld = 0, data_out_vld;
  int checks = 0, failures = 0;

  biquad_iir dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wrap v to w bits, signed
  function automatic longint wrapw(longint v, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    if (v >= (longint'(1) << (w - 1))) v = v - (longint'(1) << w);
    return v;
  endfunction

  // fixed-point model state (integers on their own fraction grids)
  longint m1, m2, m3, m4;
  // real-valued reference state
  real rx1, rx2, ry1, ry2;
  real rb0, rb1, rb2, ra1, ra2;
  longint exp_q [$];
  real exp_r [$];
  int cycle = 0, t_in [$], lat = -1, n_out = 0;

  function automatic void model_step(longint x);
    longint w, y;
    real xr, yr;
    w = x + m1;                                                // 16 fraction bits
    y = wrapw(((w * coeff_b0) <<< 7) + m3 >>> 23, 18);          // 39 -> 16 fraction bits
    m1 = wrapw(((w * -longint'(coeff_a1)) <<< 7) + m2 >>> 23, 25);
    m2 = wrapw((w * -longint'(coeff_a2)) <<< 7, 48);
    m3 = wrapw(((w * coeff_b1) <<< 7) + m4, 48);
    m4 = wrapw((w * coeff_b2) <<< 7, 48);
    exp_q.push_back(y);
    xr = real'(x) / 65536.0;
    yr = rb0 * xr + rb1 * rx1 + rb2 * rx2 - ra1 * ry1 - ra2 * ry2;
    rx2 = rx1; rx1 = xr; ry2 = ry1; ry1 = yr;
    exp_r.push_back(yr);
  endfunction

  function automatic void set_coeffs(real b0, real b1, real b2, real a1, real a2);
    coeff_b0 = 18'($rtoi(b0 * 65536.0)); coeff_b1 = 18'($rtoi(b1 * 65536.0));
    coeff_b2 = 18'($rtoi(b2 * 65536.0)); coeff_a1 = 18'($rtoi(a1 * 65536.0));
    coeff_a2 = 18'($rtoi(a2 * 65536.0));
    rb0 = real'(coeff_b0) / 65536.0; rb1 = real'(coeff_b1) / 65536.0; rb2 = real'(coeff_b2) / 65536.0;
    ra1 = real'(coeff_a1) / 65536.0; ra2 = real'(coeff_a2) / 65536.0;
    m1 = 0; m2 = 0; m3 = 0; m4 = 0; rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && data_in_vld) begin
      model_step(longint'(data_in));
      t_in.push_back(cycle);
    end
    if (rst_n && data_out_vld) begin
      longint e;
      real er, got;
      e = exp_q.pop_front();
      er = exp_r.pop_front();
      lat = cycle - t_in.pop_front();
      n_out++;
      checks++;
      if (longint'(data_out) != e) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %0d expected %0d", n_out, data_out, e);
      end
      got = real'(data_out) / 65536.0;
      if (er > -1.9 && er < 1.9) begin
        checks++;
        if (got - er > 1.0 / 1024 || er - got > 1.0 / 1024) begin
          failures++;
          if (failures < 10) $display("sample %0d: got %f, real filter %f", n_out, got, er);
        end
      end
    end
  end

  task automatic feed(int n, int kind, int gap_pct);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (int'($urandom_range(0, 99)) < gap_pct) begin
        data_in_vld = 0;
      end else begin
        data_in_vld = 1;
        case (kind)
          0: data_in = (i == 0) ? 18'sd32768 : 18'sd0;                  // impulse of 0.5
          1: data_in = 18'sd16384;                                       // step of 0.25
          default: data_in = 18'(int'($urandom_range(0, 32767)) - 16384); // noise in [-0.25, 0.25)
        endcase
      end
    end
    @(negedge clk);
    data_in_vld = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    int n0, c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // low-pass (fc about fs/10, Q 0.7)
    set_coeffs(0.0675, 0.1349, 0.0675, -1.1430, 0.4128);
    feed(1, 0, 0);
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d clocks, expected 4", lat); end
    feed(60, 0, 0);
    feed(100, 1, 0);
    n0 = n_out; c0 = cycle;
    feed(200, 2, 0);
    checks++;
    if (n_out - n0 != 200 || cycle - c0 > 200 + 10) begin
      failures++;
      $display("burst: %0d samples in %0d clocks", n_out - n0, cycle - c0);
    end
    feed(300, 2, 30);
    // resonant band-pass (pole radius 0.95)
    repeat (2) @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;
    set_coeffs(0.05, 0.0, -0.05, -1.6, 0.9025);
    feed(200, 0, 0);
    feed(400, 2, 20);
    // feed-forward only
    rst_n = 0; @(negedge clk); rst_n = 1;
    set_coeffs(0.5, -0.75, 0.25, 0.0, 0.0);
    feed(300, 2, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
