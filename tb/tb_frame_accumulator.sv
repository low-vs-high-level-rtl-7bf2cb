// Self-checking testbench for frame_accumulator (reduced to 16 x 16 frames).
// Streams frames of random pixels, with random valid gaps, and compares the
// five totals reported with each 'done' pulse against sums the testbench
// forms itself from the pixels it sent and their positions. A full-intensity
// frame checks the widest sums, and 'hold' is raised around some frame ends
// to check that the last beat is held back while it is high. One frame is
// sent back to back to check one beat per clock.
module tb_frame_accumulator;
  localparam int N = 16, IW = 4, PW = 8;
  logic clk = 0, rst_n = 0, s_tvalid = 0, hold = 0, s_tready, done;
  logic [IW*PW-1:0] s_tdata = '0;
  stats_pkg::frame_totals_t totals;
  int checks = 0, failures = 0;

  frame_accumulator #(.N(N), .INPUT_W(IW), .PIXEL_W(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e_tot, e_sx, e_sy, e_sx2, e_sy2;
  longint q_tot [$], q_sx [$], q_sy [$], q_sx2 [$], q_sy2 [$];
  int beat_idx = 0, frames_done = 0, held = 0, cycle = 0, gap_pct = 30, mode = 0;

  // record accepted beats into the expected sums
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && hold && s_tvalid && s_tready && beat_idx == N * N / IW - 1) begin
      failures++;
      $display("last beat accepted while hold was high");
    end
    if (rst_n && s_tvalid && s_tready) begin
      int bx, y;
      bx = beat_idx % (N / IW);
      y  = beat_idx / (N / IW);
      if (beat_idx == 0) begin e_tot = 0; e_sx = 0; e_sy = 0; e_sx2 = 0; e_sy2 = 0; end
      for (int j = 0; j < IW; j++) begin
        longint p, x;
        p = s_tdata[j*PW +: PW];
        x = bx * IW + j;
        e_tot += p; e_sx += x * p; e_sy += y * p; e_sx2 += x * x * p; e_sy2 += longint'(y) * y * p;
      end
      beat_idx = (beat_idx + 1) % (N * N / IW);
      if (beat_idx == 0) begin
        q_tot.push_back(e_tot); q_sx.push_back(e_sx); q_sy.push_back(e_sy);
        q_sx2.push_back(e_sx2); q_sy2.push_back(e_sy2);
      end
    end
    if (rst_n && s_tvalid && !s_tready) held++;
    if (rst_n && done) begin
      checks++;
      frames_done++;
      if (q_tot.size() == 0) begin
        failures++;
        $display("done without a frame at %0t frames=%0d mode=%0d", $time, frames_done, mode);
      end else begin
        longint a, b, c, d, e;
        a = q_tot.pop_front(); b = q_sx.pop_front(); c = q_sy.pop_front();
        d = q_sx2.pop_front(); e = q_sy2.pop_front();
        if (longint'(totals.tot) != a || longint'(totals.sx) != b || longint'(totals.sy) != c ||
            longint'(totals.sx2) != d || longint'(totals.sy2) != e) begin
          failures++;
          $display("frame %0d totals %0d %0d %0d %0d %0d expected %0d %0d %0d %0d %0d", frames_done,
                   totals.tot, totals.sx, totals.sy, totals.sx2, totals.sy2, a, b, c, d, e);
        end
      end
    end
  end

  always @(negedge clk) begin
    if (!s_tvalid || s_tready) begin
      if (int'($urandom_range(0, 99)) >= gap_pct) begin
        s_tvalid <= 1'b1;
        for (int j = 0; j < IW; j++)
          s_tdata[j*PW +: PW] <= (mode == 1) ? 8'hFF : 8'($urandom_range(0, 255));
      end else s_tvalid <= 1'b0;
    end
    hold <= (mode == 2) ? ($urandom_range(0, 1) == 1) : 1'b0;
  end

  initial begin
    int c0, f0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (frames_done == 3);
    @(negedge clk); mode = 1;               // saturated frames
    wait (frames_done == 6);
    @(negedge clk); mode = 2;               // random hold
    wait (frames_done == 10);
    @(negedge clk); mode = 0; gap_pct = 0;  // back to back
    wait (beat_idx == 0 && frames_done >= 10);
    @(posedge clk); c0 = cycle; f0 = frames_done;
    wait (frames_done == f0 + 2);
    checks++;
    if (cycle - c0 > 2 * (N * N / IW) + 6) begin
      failures++;
      $display("two frames took %0d clocks", cycle - c0);
    end
    checks++;
    if (held == 0) begin
      failures++;
      $display("hold never held a beat");
    end
    $display("frames=%0d held beats=%0d", frames_done, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
