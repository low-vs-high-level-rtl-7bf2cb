// End-to-end testbench of fpga_dsp_examples_top at its default sizes
// (8-lane linearization, 512 x 512 statistics frames, Q2.16 biquad), all
// three units running at the same time.
//   linearization  2000 random beats with random gaps and back-pressure and a
//                  random bypass; every output beat is checked against the
//                  polynomial (or the raw sample) computed here.
//   statistics     two full 512 x 512 frames, a Gaussian spot and a
//                  two-spot frame; results are checked at result_valid against
//                  sums formed here and read back over AXI4-Lite, and must
//                  follow the last beat of the frame within 72 clocks.
//   IIR            a low-pass driven by noise; every output is checked
//                  against a real-valued filter (within 2^-10).
// Each mechanism is counted and must occur at least once: linearization
// bypass, back-pressure stall and output saturation; statistics frame
// completion and register read; IIR output samples.
module tb_fpga_dsp_examples_top;
  logic clk = 0, rst_n = 0;
  logic lin_bypass = 0, lin_s_tvalid = 0, lin_s_tready, lin_s_tlast = 0;
  logic [127:0] lin_s_tdata = '0, lin_m_tdata;
  logic lin_m_tvalid, lin_m_tready = 0, lin_m_tlast;
  logic [31:0] st_s_tdata = '0;
  logic st_s_tvalid = 0, st_s_tready;
  logic [4:0] st_axil_awaddr = '0, st_axil_araddr = '0;
  logic st_axil_awvalid = 0, st_axil_awready, st_axil_wvalid = 0, st_axil_wready;
  logic [31:0] st_axil_wdata = '0, st_axil_rdata;
  logic [3:0] st_axil_wstrb = '0;
  logic [1:0] st_axil_bresp, st_axil_rresp;
  logic st_axil_bvalid, st_axil_bready = 1, st_axil_arvalid = 0, st_axil_arready;
  logic st_axil_rvalid, st_axil_rready = 0;
  logic [15:0] st_meanx, st_stdx, st_meany, st_stdy;
  logic st_result_valid;
  logic [31:0] st_frame_cnt;
  logic [17:0] iir_coeff_b0, iir_coeff_b1, iir_coeff_b2, iir_coeff_a1, iir_coeff_a2;
  logic [17:0] iir_data_in = '0, iir_data_out;
  logic iir_data_in_vld = 0, iir_data_out_vld;

  fpga_dsp_examples_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_stall = 0, n_sat = 0, n_frames = 0, n_reads = 0, n_iir = 0;
  bit lin_done = 0, st_done = 0, iir_done = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- linearization ----------------
  function automatic logic [15:0] lane_ref(logic [11:0] s, bit bp, output bit sat);
    longint t;
    int xi;
    xi = int'(signed'(s));
    sat = 0;
    if (bp) return 16'(xi);
    t = (longint'(-2628) * xi + 1044682) * xi + 2396484;
    t = (t + (1 << 19)) >>> 20;
    if (t > 2047) begin t = 2047; sat = 1; end
    if (t < -2048) begin t = -2048; sat = 1; end
    return 16'(t);
  endfunction

  logic [127:0] lin_q [$];
  int lin_left = 2000, lin_out = 0;

  always @(posedge clk) begin
    if (rst_n && lin_s_tvalid && lin_s_tready) begin
      logic [127:0] e;
      bit sat;
      for (int l = 0; l < 8; l++) begin
        e[l*16 +: 16] = lane_ref(lin_s_tdata[l*16 +: 12], lin_bypass, sat);
        if (sat) n_sat++;
      end
      if (lin_bypass) n_bypass++;
      lin_q.push_back(e);
    end
    if (rst_n && lin_m_tvalid && !lin_m_tready) n_stall++;
    if (rst_n && lin_m_tvalid && lin_m_tready) begin
      logic [127:0] e;
      e = lin_q.pop_front();
      lin_out++;
      checks++;
      if (lin_m_tdata != e) begin
        failures++;
        if (failures < 10) $display("linearization beat %0d: got %h expected %h", lin_out, lin_m_tdata, e);
      end
      if (lin_out == 2000) lin_done = 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      lin_m_tready <= ($urandom_range(0, 4) != 0);
      if (!lin_s_tvalid || lin_s_tready) begin
        if (lin_left > 0 && $urandom_range(0, 3) != 0) begin
          for (int l = 0; l < 8; l++)
            lin_s_tdata[l*16 +: 16] <= 16'(int'($urandom_range(0, 4095)) - 2048);
          lin_s_tvalid <= 1;
          lin_bypass   <= ($urandom_range(0, 7) == 0);
          lin_left     <= lin_left - 1;
        end else lin_s_tvalid <= 0;
      end
    end
  end

  // ---------------- statistics ----------------
  localparam int N = 512;
  function automatic int pix(int f, int x, int y);
    real g1, g2;
    g1 = 250.0 * $exp(-((x - 300.0) ** 2 / (2.0 * 40.0 * 40.0) + (y - 180.0) ** 2 / (2.0 * 25.0 * 25.0)));
    if (f == 0) return int'(g1);
    g2 = 120.0 * $exp(-((x - 100.0) ** 2 + (y - 400.0) ** 2) / (2.0 * 60.0 * 60.0));
    return int'(g1 / 2.0 + g2) + (((x ^ y) & 7) == 0 ? 3 : 0);
  endfunction

  function automatic int isqrt(longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return int'(r);
  endfunction

  int st_exp [2][4];
  time t_last_beat [2];

  task automatic axil_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    st_axil_araddr = a; st_axil_arvalid = 1;
    do @(posedge clk); while (!st_axil_arready);
    @(negedge clk);
    st_axil_arvalid = 0; st_axil_rready = 1;
    while (!st_axil_rvalid) @(negedge clk);
    d = st_axil_rdata;
    @(negedge clk);
    st_axil_rready = 0;
    n_reads++;
  endtask

  initial begin
    wait (rst_n);
    for (int f = 0; f < 2; f++) begin
      longint s, sx, sy, sx2, sy2, mx, my, vx, vy;
      s = 0; sx = 0; sy = 0; sx2 = 0; sy2 = 0;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          int p;
          p = pix(f, x, y);
          s += p; sx += x * p; sy += y * p; sx2 += longint'(x) * x * p; sy2 += longint'(y) * y * p;
        end
      mx = sx / s; my = sy / s;
      vx = sx2 / s - mx * mx; vy = sy2 / s - my * my;
      st_exp[f] = '{int'(mx), isqrt(vx < 0 ? 0 : vx), int'(my), isqrt(vy < 0 ? 0 : vy)};
      for (int y = 0; y < N; y++)
        for (int bx = 0; bx < N / 4; bx++) begin
          @(negedge clk);
          st_s_tdata = {8'(pix(f, 4*bx+3, y)), 8'(pix(f, 4*bx+2, y)), 8'(pix(f, 4*bx+1, y)), 8'(pix(f, 4*bx, y))};
          st_s_tvalid = 1;
          @(posedge clk);
          while (!st_s_tready) @(posedge clk);
        end
      t_last_beat[f] = $time;
      @(negedge clk);
      st_s_tvalid = 0;
    end
  end

  initial begin
    wait (rst_n);
    for (int f = 0; f < 2; f++) begin
      logic [31:0] d;
      @(posedge clk);
      while (!st_result_valid) @(posedge clk);
      n_frames++;
      checks++;
      if (($time - t_last_beat[f]) / 10 > 72) begin
        failures++;
        $display("frame %0d: results %0d clocks after the last beat", f, ($time - t_last_beat[f]) / 10);
      end
      $display("frame %0d: results %0d clocks after the last beat", f, ($time - t_last_beat[f]) / 10);
      checks++;
      if (st_meanx != st_exp[f][0] || st_stdx != st_exp[f][1] || st_meany != st_exp[f][2] || st_stdy != st_exp[f][3]) begin
        failures++;
        $display("frame %0d: got %0d %0d %0d %0d expected %0d %0d %0d %0d", f, st_meanx, st_stdx,
                 st_meany, st_stdy, st_exp[f][0], st_exp[f][1], st_exp[f][2], st_exp[f][3]);
      end
      for (int r = 0; r < 4; r++) begin
        axil_read(5'(4 * r), d);
        checks++;
        if (d != 32'(st_exp[f][r])) begin
          failures++;
          $display("frame %0d register %0d: %0d expected %0d", f, r, d, st_exp[f][r]);
        end
      end
      $display("frame %0d: meanx=%0d stdx=%0d meany=%0d stdy=%0d", f, st_meanx, st_stdx, st_meany, st_stdy);
    end
    st_done = 1;
  end

  // ---------------- IIR ----------------
  real rb0, rb1, rb2, ra1, ra2, rx1 = 0, rx2 = 0, ry1 = 0, ry2 = 0;
  real iir_q [$];

  always @(posedge clk) begin
    if (rst_n && iir_data_in_vld) begin
      real xr, yr;
      xr = real'(signed'(iir_data_in)) / 65536.0;
      yr = rb0 * xr + rb1 * rx1 + rb2 * rx2 - ra1 * ry1 - ra2 * ry2;
      rx2 = rx1; rx1 = xr; ry2 = ry1; ry1 = yr;
      iir_q.push_back(yr);
    end
    if (rst_n && iir_data_out_vld) begin
      real e, got;
      e = iir_q.pop_front();
      got = real'(signed'(iir_data_out)) / 65536.0;
      n_iir++;
      checks++;
      if (got - e > 1.0 / 1024 || e - got > 1.0 / 1024) begin
        failures++;
        if (failures < 10) $display("IIR sample %0d: got %f expected %f", n_iir, got, e);
      end
      if (n_iir == 3000) iir_done = 1;
    end
  end

  initial begin
    iir_coeff_b0 = 18'sd4424;  iir_coeff_b1 = 18'sd8841; iir_coeff_b2 = 18'sd4424;
    iir_coeff_a1 = -18'sd74908; iir_coeff_a2 = 18'sd27054;
    rb0 = 4424.0 / 65536; rb1 = 8841.0 / 65536; rb2 = 4424.0 / 65536;
    ra1 = -74908.0 / 65536; ra2 = 27054.0 / 65536;
    wait (rst_n);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iir_data_in = 18'(int'($urandom_range(0, 65535)) - 32768);
      iir_data_in_vld = 1;
    end
    @(negedge clk);
    iir_data_in_vld = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lin_done && st_done && iir_done);
    repeat (10) @(posedge clk);
    $display("bypassed beats=%0d stall cycles=%0d saturated samples=%0d frames=%0d register reads=%0d IIR samples=%0d",
             n_bypass, n_stall, n_sat, n_frames, n_reads, n_iir);
    if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    if (n_stall == 0)  begin failures++; $display("no back-pressure stall"); end
    if (n_sat == 0)    begin failures++; $display("no saturation"); end
    if (n_frames != 2) begin failures++; $display("frames %0d", n_frames); end
    if (n_reads == 0)  begin failures++; $display("no register read"); end
    if (n_iir == 0)    begin failures++; $display("no IIR output"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
