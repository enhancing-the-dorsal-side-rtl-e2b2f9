// he_divider_tb: self-checking test of the bit-serial restoring divider.
//
// Runs corner cases (zero dividend, divisor 1, divisor larger than the
// dividend, maximum operands, the CDF unit's own operand range) and random
// operand pairs at the default widths (23-bit dividend, 15-bit divisor).
// Quotient and remainder are compared with the simulator's / and %, and done
// must come NW+1 clocks after start.
module he_divider_tb;
  localparam int NW = 23;
  localparam int DW = 15;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NW-1:0] dividend = '0, quotient;
  logic [DW-1:0] divisor = '1, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  he_divider #(.NW(NW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic divide(input longint n, input longint d);
    int cyc;
    @(negedge clk);
    dividend = NW'(n); divisor = DW'(d); start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc, NW + 1, "latency");
    check(quotient, n / d, $sformatf("%0d / %0d", n, d));
    check(remainder, n % d, $sformatf("%0d %% %0d", n, d));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(0, 5);
    divide(12345, 1);
    divide(17, 400);
    divide((1 << NW) - 1, (1 << DW) - 1);
    divide((1 << NW) - 1, 1);
    divide(255 * 20083 + 10041, 20083);
    divide(10041, 20083);
    for (int i = 0; i < 300; i++)
      divide($urandom_range(0, (1 << NW) - 1), $urandom_range(1, (1 << DW) - 1));
    for (int i = 0; i < 100; i++)
      divide($urandom_range(0, 20083) * 255 + 10041, 20083);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
