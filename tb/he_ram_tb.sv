// he_ram_tb: self-checking test of the simple dual-port RAM.
//
// Writes a random pattern into a 50-word RAM, reads every word back and
// checks both the value and the one-clock read latency; checks that a read
// and a write to the same address in one clock return the old word; and
// checks that a write beyond the last word changes nothing.
module he_ram_tb;
  localparam int DEPTH = 50;
  localparam int WIDTH = 12;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    // read back: address set before edge n, data valid after it
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) raddr = AW'(i);
      @(negedge clk) check(rdata, model[i], $sformatf("read %0d", i));
    end
    // read-before-write collision
    @(negedge clk);
    raddr = 7; we = 1'b1; waddr = 7; wdata = ~model[7];
    @(negedge clk);
    we = 1'b0;
    check(rdata, model[7], "collision returns old word");
    model[7] = ~model[7];
    @(negedge clk);
    check(rdata, model[7], "new word after collision");
    // out-of-range write is dropped
    @(negedge clk);
    we = 1'b1; waddr = AW'(DEPTH + 5); wdata = '1;
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) raddr = AW'(i);
      @(negedge clk) check(rdata, model[i], $sformatf("after range write %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
