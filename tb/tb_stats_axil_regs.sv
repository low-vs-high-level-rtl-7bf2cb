// Self-checking testbench for stats_axil_regs.
// Reads every register, and an unmapped address, with the read-data ready
// both held low for a few clocks and always high, and compares the data with
// the values driven on the register inputs. A write must complete with an
// OKAY response and leave the registers unchanged.
module tb_stats_axil_regs;
  logic clk = 0, rst_n = 0;
  logic [4:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = '1;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 0;
  logic [31:0] meanx = 32'd201, stdx = 32'd17, meany = 32'd310, stdy = 32'd23, frame_cnt = 32'd5;
  int checks = 0, failures = 0;

  stats_axil_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(logic [4:0] a, int wait_ready, logic [31:0] exp);
    @(negedge clk);
    s_axil_araddr  = a;
    s_axil_arvalid = 1'b1;
    s_axil_rready  = 1'b0;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    repeat (wait_ready) @(negedge clk);
    s_axil_rready = 1'b1;
    while (!s_axil_rvalid) @(negedge clk);
    checks++;
    if (s_axil_rdata != exp || s_axil_rresp != 2'b00) begin
      failures++;
      $display("read %h gave %0d expected %0d", a, s_axil_rdata, exp);
    end
    @(negedge clk);
    s_axil_rready = 1'b0;
  endtask

  initial begin
    logic [31:0] vals [5];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      meanx = $urandom; stdx = $urandom; meany = $urandom; stdy = $urandom; frame_cnt = $urandom;
      vals = '{meanx, stdx, meany, stdy, frame_cnt};
      for (int r = 0; r < 5; r++) rd(5'(4 * r), (k % 2) * 3, vals[r]);
      rd(5'h18, 0, 32'd0);
    end
    // a write is acknowledged and has no effect
    @(negedge clk);
    s_axil_awaddr = 5'h00; s_axil_awvalid = 1; s_axil_wdata = 32'hDEAD_BEEF; s_axil_wvalid = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    checks++;
    if (s_axil_bresp != 2'b00) begin failures++; $display("write response %0d", s_axil_bresp); end
    @(negedge clk); s_axil_bready = 0;
    rd(5'h00, 0, meanx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
