// Self-checking testbench for int_sqrt at its default 18-bit size.
// Takes the square root of every perfect square and its neighbours up to
// the largest radicand, plus random values, and checks r*r <= v < (r+1)^2.
// It also checks that 'done' comes exactly IN_W/2 + 1 clocks after 'start'.
module tb_int_sqrt;
  localparam int W = 18;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] value = '0;
  logic [W/2-1:0] root;
  int checks = 0, failures = 0;

  int_sqrt #(.IN_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int v);
    int cyc;
    longint r;
    @(negedge clk);
    value = W'(v);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = longint'(root);
    checks++;
    if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin
      failures++;
      $display("sqrt(%0d) gave %0d", v, root);
    end
    checks++;
    if (cyc != W / 2 + 1) begin
      failures++;
      $display("square root took %0d clocks", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run((1 << W) - 1);
    for (int k = 0; k < (1 << (W / 2)); k += 3) begin
      run(k * k);
      if (k > 0) run(k * k - 1);
      if (k * k + 1 < (1 << W)) run(k * k + 1);
    end
    for (int i = 0; i < 300; i++) run(int'($urandom_range(0, (1 << W) - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
