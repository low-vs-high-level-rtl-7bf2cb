// Self-checking testbench for seq_divider at its default 45 / 30-bit size.
// Divides random operand pairs of varied magnitudes (including quotients of
// 0 and 1, equal operands, the largest dividend and a zero divisor) and
// compares each quotient with the testbench's own integer division. It also
// checks that 'done' comes exactly DIVIDEND_W + 1 clocks after 'start'.
module tb_seq_divider;
  localparam int DW = 45, SW = 30;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] dividend = '0, quotient;
  logic [SW-1:0] divisor = '0;
  int checks = 0, failures = 0;

  seq_divider #(.DIVIDEND_W(DW), .DIVISOR_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint n, longint d);
    longint q;
    int cyc;
    @(negedge clk);
    dividend = DW'(n);
    divisor  = SW'(d);
    start    = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    q = (d == 0) ? ((longint'(1) << DW) - 1) : n / d;
    checks++;
    if (longint'(quotient) != q) begin
      failures++;
      $display("%0d / %0d gave %0d expected %0d", n, d, quotient, q);
    end
    checks++;
    if (cyc != DW + 1) begin
      failures++;
      $display("division took %0d clocks", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 5);
    run(7, 7);
    run(6, 7);
    run((longint'(1) << DW) - 1, 1);
    run((longint'(1) << DW) - 1, (longint'(1) << SW) - 1);
    run(12345, 0);
    for (int i = 0; i < 300; i++) begin
      longint n, d;
      n = {$urandom, $urandom} & ((longint'(1) << ($urandom_range(1, DW))) - 1);
      d = longint'($urandom) & ((longint'(1) << ($urandom_range(1, SW))) - 1);
      if (d == 0) d = 1;
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
