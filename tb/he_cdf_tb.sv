// he_cdf_tb: self-checking test of the CDF (mapping table) unit.
//
// A cumulative table for the default 151 x 133 image is placed in a test
// RAM: a non-decreasing sequence with flat stretches (empty bins), big steps
// and a last entry equal to the pixel count. After the unit runs, every
// mapping-table entry is compared with round(255*cum/PIXELS) worked out here
// in integer arithmetic, and done must come LEVELS*(NW+3)+1 clocks after
// start, NW being the counter width plus 8.
module he_cdf_tb;
  localparam int PIXELS = he_pkg::PIXELS;
  localparam int CW     = $clog2(PIXELS + 1);
  localparam int NW     = CW + 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic          ld_we = 1'b0;
  logic [7:0]    ld_addr = '0;
  logic [CW-1:0] ld_data = '0;
  logic [7:0]    src_raddr, tbl_raddr = '0, tbl_rdata;
  logic [CW-1:0] src_rdata;
  int ref_map [256];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(256), .WIDTH(CW)) u_cum (.clk, .we(ld_we), .waddr(ld_addr),
    .wdata(ld_data), .raddr(src_raddr), .rdata(src_rdata));

  he_cdf #(.PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, c;
    real exact;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    c = 0;
    for (int b = 0; b < 256; b++) begin
      if (b < 40 || (b > 120 && b < 140))      c += 0;
      else if (b == 255)                       c = PIXELS;
      else if (b == 80)                        c += 6000;
      else                                     c += $urandom_range(0, 90);
      if (c > PIXELS) c = PIXELS;
      // rounding to nearest, ties away from zero (PIXELS is odd: no ties)
      exact = 255.0 * c / PIXELS;
      ref_map[b] = int'($floor(exact + 0.5));
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 8'(b); ld_data = CW'(c);
    end
    @(negedge clk) ld_we = 1'b0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc, 256 * (NW + 3) + 1, "cdf latency");
    for (int b = 0; b < 256; b++) begin
      @(negedge clk) tbl_raddr = 8'(b);
      @(negedge clk) check(int'(tbl_rdata), ref_map[b], $sformatf("map %0d", b));
    end
    check(int'(tbl_rdata), 255, "top level maps to 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
