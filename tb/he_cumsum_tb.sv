// he_cumsum_tb: self-checking test of the cumulative (running sum) unit.
//
// A histogram table in a test RAM is filled with random bin counts that add
// up to at most the pixel count (with empty bins and one large bin among
// them). After the unit runs, every entry of its cumulative table is read
// back and compared with a running sum computed here, the last entry must
// equal the total, and done must come LEVELS+2 clocks after start. Two runs
// check that the accumulator restarts at zero.
module he_cumsum_tb;
  localparam int PIXELS = he_pkg::PIXELS;
  localparam int CW     = $clog2(PIXELS + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic          ld_we = 1'b0;
  logic [7:0]    ld_addr = '0;
  logic [CW-1:0] ld_data = '0;
  logic [7:0]    src_raddr, tbl_raddr = '0;
  logic [CW-1:0] src_rdata, tbl_rdata;
  int ref_cum [256];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(256), .WIDTH(CW)) u_hist (.clk, .we(ld_we), .waddr(ld_addr),
    .wdata(ld_data), .raddr(src_raddr), .rdata(src_rdata));

  he_cumsum #(.PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int cyc, total, h;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      total = 0;
      for (int b = 0; b < 256; b++) begin
        if (b % 7 == 3)         h = 0;
        else if (b == 100 + run) h = 5000;
        else                    h = $urandom_range(0, 55);
        total += h;
        ref_cum[b] = total;
        @(negedge clk);
        ld_we = 1'b1; ld_addr = 8'(b); ld_data = CW'(h);
      end
      @(negedge clk) ld_we = 1'b0;
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc, 256 + 2, "cumulative latency");
      for (int b = 0; b < 256; b++) begin
        @(negedge clk) tbl_raddr = 8'(b);
        @(negedge clk) check(int'(tbl_rdata), ref_cum[b], $sformatf("run %0d cum %0d", run, b));
      end
      check(int'(tbl_rdata), total, "last entry is the total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
