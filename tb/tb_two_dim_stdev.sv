// Self-checking testbench for two_dim_stdev, run at two reduced frame sizes
// side by side: 8 x 8 (frames shorter than the post-processing, so the input
// must stall) and 64 x 64 (Gaussian spots).
// For every frame the testbench forms its own sums from the pixels it sent
// and derives the expected results with the same integer rules (truncated
// quotients, var = E[x^2] - mean^2 clamped at 0, floor square root); it also
// checks the means against the exact real-valued centroid (within 1). The
// frames are random noise, Gaussian spots, an all-zero frame and a
// full-intensity frame. After each frame the four results and the frame
// counter are also read over AXI4-Lite.
module tb_two_dim_stdev;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks [2] = '{0, 0}, failures [2] = '{0, 0}, stalls [2] = '{0, 0}, frames [2] = '{0, 0};
  bit finished [2] = '{0, 0};

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished[0] && finished[1]);
    if (stalls[0] == 0) begin
      failures[0]++;
      $display("the input never stalled on short frames");
    end
    $display("frames %0d / %0d, input stall cycles %0d / %0d", frames[0], frames[1], stalls[0], stalls[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  for (genvar k = 0; k < 2; k++) begin : g_size
    localparam int N = (k == 0) ? 8 : 64;
    localparam int NFRAMES = (k == 0) ? 24 : 8;
    logic [31:0] s_tdata = '0;
    logic s_tvalid = 0, s_tready;
    logic [4:0] s_axil_awaddr = '0, s_axil_araddr = '0;
    logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
    logic [31:0] s_axil_wdata = '0, s_axil_rdata;
    logic [3:0] s_axil_wstrb = '0;
    logic [1:0] s_axil_bresp, s_axil_rresp;
    logic s_axil_bvalid, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_arready, s_axil_rvalid, s_axil_rready = 0;
    logic [15:0] meanx, stdx, meany, stdy;
    logic result_valid;
    logic [31:0] frame_cnt;

    two_dim_stdev #(.N(N)) dut (.*);

    int img [N][N];
    int exp_q [$];   // meanx, stdx, meany, stdy per frame
    real rmx [$], rmy [$];

    function automatic int isqrt(longint v);
      longint r = 0;
      while ((r + 1) * (r + 1) <= v) r++;
      return int'(r);
    endfunction

    // expected results from the frame image
    function automatic void expect_frame();
      longint s = 0, sx = 0, sy = 0, sx2 = 0, sy2 = 0;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          s += img[y][x]; sx += x * img[y][x]; sy += y * img[y][x];
          sx2 += longint'(x) * x * img[y][x]; sy2 += longint'(y) * y * img[y][x];
        end
      if (s == 0) begin
        exp_q.push_back(0); exp_q.push_back(0); exp_q.push_back(0); exp_q.push_back(0);
        rmx.push_back(0.0); rmy.push_back(0.0);
      end else begin
        longint mx, my, vx, vy;
        mx = sx / s; my = sy / s;
        vx = sx2 / s - mx * mx; vy = sy2 / s - my * my;
        if (vx < 0) vx = 0;
        if (vy < 0) vy = 0;
        exp_q.push_back(int'(mx)); exp_q.push_back(isqrt(vx));
        exp_q.push_back(int'(my)); exp_q.push_back(isqrt(vy));
        rmx.push_back(real'(sx) / real'(s)); rmy.push_back(real'(sy) / real'(s));
      end
    endfunction

    function automatic void make_frame(int f);
      real cx, cy, sg;
      cx = $urandom_range(N / 8, N - N / 8);
      cy = $urandom_range(N / 8, N - N / 8);
      sg = $urandom_range(1, N / 4 + 1);
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++)
          case (f % 4)
            0: img[y][x] = (f == 4) ? 0 : int'($urandom_range(0, 255));
            1: img[y][x] = int'(255.0 * $exp(-((x - cx) * (x - cx) + (y - cy) * (y - cy)) / (2.0 * sg * sg)));
            2: img[y][x] = (f == 2) ? 255 : int'($urandom_range(0, 15)) + ((x > N / 2 && y < N / 3) ? 200 : 0);
            default: img[y][x] = int'($urandom_range(0, 1)) * 255;
          endcase
    endfunction

    // stream the frames back to back, with random gaps on the larger size
    initial begin
      wait (rst_n);
      for (int f = 0; f < NFRAMES; f++) begin
        make_frame(f);
        expect_frame();
        for (int y = 0; y < N; y++)
          for (int bx = 0; bx < N / 4; bx++) begin
            @(negedge clk);
            while (k == 1 && $urandom_range(0, 4) == 0) begin s_tvalid = 0; @(negedge clk); end
            s_tdata = {8'(img[y][4*bx+3]), 8'(img[y][4*bx+2]), 8'(img[y][4*bx+1]), 8'(img[y][4*bx])};
            s_tvalid = 1;
            @(posedge clk);
            while (!s_tready) begin stalls[k]++; @(posedge clk); end
          end
        @(negedge clk);
        s_tvalid = 0;
      end
    end

    task automatic axil_read(logic [4:0] a, output logic [31:0] d);
      @(negedge clk);
      s_axil_araddr = a; s_axil_arvalid = 1;
      do @(posedge clk); while (!s_axil_arready);
      @(negedge clk);
      s_axil_arvalid = 0; s_axil_rready = 1;
      while (!s_axil_rvalid) @(negedge clk);
      d = s_axil_rdata;
      @(negedge clk);
      s_axil_rready = 0;
    endtask

    // results: plain outputs at result_valid, then over AXI4-Lite
    initial begin
      wait (rst_n);
      for (int f = 0; f < NFRAMES; f++) begin
        int e [4];
        real ex, ey;
        logic [31:0] d;
        @(posedge clk);
        while (!result_valid) @(posedge clk);
        frames[k]++;
        for (int i = 0; i < 4; i++) e[i] = exp_q.pop_front();
        ex = rmx.pop_front(); ey = rmy.pop_front();
        checks[k]++;
        if (meanx != e[0] || stdx != e[1] || meany != e[2] || stdy != e[3]) begin
          failures[k]++;
          $display("N=%0d frame %0d: got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                   N, f, meanx, stdx, meany, stdy, e[0], e[1], e[2], e[3]);
        end
        checks[k]++;
        if (real'(meanx) > ex || real'(meanx) + 1.0 <= ex || real'(meany) > ey || real'(meany) + 1.0 <= ey) begin
          failures[k]++;
          $display("N=%0d frame %0d: means %0d %0d, centroid %f %f", N, f, meanx, meany, ex, ey);
        end
        if (k == 1) begin
          for (int r = 0; r < 4; r++) begin
            axil_read(5'(4 * r), d);
            checks[k]++;
            if (d != 32'(e[r])) begin
              failures[k]++;
              $display("N=%0d frame %0d: register %0d read %0d expected %0d", N, f, r, d, e[r]);
            end
          end
          axil_read(5'h10, d);
          checks[k]++;
          if (d != 32'(f + 1)) begin
            failures[k]++;
            $display("frame counter %0d expected %0d", d, f + 1);
          end
        end
      end
      finished[k] = 1;
    end
  end
endmodule
