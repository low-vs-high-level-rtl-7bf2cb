// Self-checking testbench for linearization.
// Streams random 8-lane beats through the AXI4-Stream slave with random
// valid gaps, random downstream back-pressure and random bypass per beat,
// and checks every output beat, in order, against an independently computed
// expectation (the polynomial per lane, or the raw sample when bypassed),
// including tlast. It also measures the latency of a single beat into an
// idle module (6 clocks) and the throughput of a burst with the output always
// ready (one beat per clock).
module tb_linearization;
  logic clk = 0, rst_n = 0, bypass = 0;
  logic [127:0] s_tdata = '0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic m_tvalid, m_tready = 0, m_tlast;
  int checks = 0, failures = 0;

  linearization dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] lane_ref(logic [15:0] slot, bit bp);
    longint t;
    int xi;
    xi = int'(signed'(slot[11:0]));
    if (bp) return 16'(xi);
    t = (longint'(-2628) * xi + 1044682) * xi + 2396484;
    t = (t + (1 << 19)) >>> 20;
    if (t > 2047) t = 2047;
    if (t < -2048) t = -2048;
    return 16'(t);
  endfunction

  typedef struct { logic [127:0] d; bit last; int t_acc; } beat_t;
  beat_t expq [$];
  int cycle = 0, n_in = 0, n_out = 0, n_stall = 0, n_bypass = 0;
  int to_send = 0, gap_pct = 0, last_lat = -1;
  bit random_ready = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rand_beat();
    logic [127:0] d;
    for (int l = 0; l < 8; l++) begin
      int xi;
      xi = ($urandom_range(0, 1) == 0) ? int'($urandom_range(0, 4095)) - 2048 : int'($urandom_range(0, 600)) - 300;
      d[l*16 +: 16] = {4'($urandom_range(0, 15)), 12'(xi)}; // upper slot bits are ignored
    end
    return d;
  endfunction

  // monitors: input handshake, output handshake, stalls
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && s_tvalid && s_tready) begin
      beat_t e;
      for (int l = 0; l < 8; l++) e.d[l*16 +: 16] = lane_ref(s_tdata[l*16 +: 16], bypass);
      e.last = s_tlast;
      e.t_acc = cycle;
      expq.push_back(e);
      n_in++;
      if (bypass) n_bypass++;
    end
    if (rst_n && m_tvalid && m_tready) begin
      beat_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output beat");
      end else begin
        e = expq.pop_front();
        last_lat = cycle - e.t_acc;
        if (m_tdata !== e.d || m_tlast !== e.last) begin
          failures++;
          if (failures < 10) $display("beat %0d mismatch got %h exp %h", n_out, m_tdata, e.d);
        end
      end
      n_out++;
    end
    if (rst_n && m_tvalid && !m_tready) n_stall++;
  end

  // drivers change inputs only on the falling edge
  always @(negedge clk) begin
    m_tready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (!s_tvalid || s_tready) begin
      if (to_send > 0 && int'($urandom_range(0, 99)) >= gap_pct) begin
        s_tdata  <= rand_beat();
        s_tvalid <= 1'b1;
        s_tlast  <= ($urandom_range(0, 7) == 0);
        bypass   <= ($urandom_range(0, 3) == 0);
        to_send  <= to_send - 1;
      end else begin
        s_tvalid <= 1'b0;
      end
    end
  end

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // latency of one beat into an empty pipeline
    @(negedge clk); to_send = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (last_lat != 6) begin
      failures++;
      $display("latency %0d clocks, expected 6", last_lat);
    end
    // throughput: a burst of 64 beats with the output always ready
    @(negedge clk); to_send = 64; c0 = cycle;
    wait (n_out == 65);
    checks++;
    if (cycle - c0 > 64 + 6 + 2) begin
      failures++;
      $display("throughput: 64 beats took %0d clocks", cycle - c0);
    end
    // random traffic with back-pressure
    @(negedge clk); random_ready = 1; gap_pct = 25; to_send = 3000;
    wait (to_send == 0);
    @(negedge clk); random_ready = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_stall == 0 || n_bypass == 0 || n_out != n_in) begin
      failures++;
      $display("left=%0d stalls=%0d bypass=%0d in=%0d out=%0d", expq.size(), n_stall, n_bypass, n_in, n_out);
    end
    $display("beats out=%0d stall cycles=%0d bypassed beats=%0d", n_out, n_stall, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
