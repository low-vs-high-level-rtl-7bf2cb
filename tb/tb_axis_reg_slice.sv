// Self-checking testbench for axis_reg_slice.
// Sends random beats with random input gaps and random output
// back-pressure and checks that every beat arrives once, in order and
// unchanged, that back-pressure actually occurred, and that a burst of 100
// beats into an always-ready sink passes at one beat per clock.
module tb_axis_reg_slice;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_tdata = '0, m_tdata;
  logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0;
  int checks = 0, failures = 0;

  axis_reg_slice #(.DATA_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, rcvd = 0, to_send = 0, gap_pct = 0, cycle = 0, stalls = 0;
  bit random_ready = 0, acc = 0;
  logic [31:0] q [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    acc = rst_n && s_tvalid && s_tready;
    if (acc) begin sent++; q.push_back(s_tdata); end
    if (rst_n && m_tvalid && m_tready) begin
      checks++;
      if (q.size() == 0 || m_tdata != q.pop_front()) begin
        failures++;
        if (failures < 10) $display("beat %0d: got %h", rcvd, m_tdata);
      end
      rcvd++;
    end
    if (rst_n && m_tvalid && !m_tready) stalls++;
  end

  always @(negedge clk) begin
    m_tready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (!s_tvalid || acc) begin
      if (to_send > 0 && int'($urandom_range(0, 99)) >= gap_pct) begin
        s_tdata  <= $urandom;
        s_tvalid <= 1'b1;
        to_send  <= to_send - 1;
      end else s_tvalid <= 1'b0;
    end
  end

  initial begin
    int c0, r0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    @(negedge clk); to_send = 100; c0 = cycle; r0 = rcvd;
    wait (rcvd == 100);
    checks++;
    if (cycle - c0 > 100 + 3) begin
      failures++;
      $display("burst of 100 took %0d clocks", cycle - c0);
    end
    @(negedge clk); random_ready = 1; gap_pct = 30; to_send = 3000;
    wait (rcvd == 3100);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    repeat (5) @(posedge clk);
    checks++;
    if (sent != rcvd) begin failures++; $display("sent %0d received %0d", sent, rcvd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
