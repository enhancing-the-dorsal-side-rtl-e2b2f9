// he_hist_tb: self-checking test of the data count (histogram) unit.
//
// A 300-pixel image RAM is filled with a mix of long runs of one grey level,
// alternating pairs and random pixels, so that back-to-back hits on the same
// bin (the forwarding path) and hits two pixels apart both occur. After each
// run all 256 bins are read through the table port and compared with a
// histogram counted here, the forwarding count is compared with the number
// of adjacent equal pixels, and done must come LEVELS+PIXELS+4 clocks after
// start. Three runs check that the table is cleared between runs.
module he_hist_tb;
  localparam int PIXELS = 300;
  localparam int AW     = $clog2(PIXELS);
  localparam int CW     = $clog2(PIXELS + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic          ld_we = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  logic [7:0]    ld_data = '0;
  logic [AW-1:0] img_raddr, fwd_count;
  logic [7:0]    img_rdata;
  logic [7:0]    tbl_raddr = '0;
  logic [CW-1:0] tbl_rdata;
  int ref_hist [256];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(PIXELS), .WIDTH(8)) u_img (.clk, .we(ld_we), .waddr(ld_addr),
    .wdata(ld_data), .raddr(img_raddr), .rdata(img_rdata));

  he_hist #(.PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, adj;
    logic [7:0] pix, prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      foreach (ref_hist[b]) ref_hist[b] = 0;
      adj = 0;
      prev = 8'($urandom);
      for (int i = 0; i < PIXELS; i++) begin
        case ((i / 50 + run) % 3)
          0: pix = 8'(run * 40 + 3);               // run of one level
          1: pix = (i % 2 == 0) ? 8'd10 : 8'd200;  // alternating pair
          default: pix = 8'($urandom_range(0, 15) * 17);
        endcase
        if (i > 0 && pix == prev) adj++;
        prev = pix;
        ref_hist[pix]++;
        @(negedge clk);
        ld_we = 1'b1; ld_addr = AW'(i); ld_data = pix;
      end
      @(negedge clk) ld_we = 1'b0;
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc, 256 + PIXELS + 4, "count latency");
      check(int'(fwd_count), adj, "forwarded increments");
      for (int b = 0; b < 256; b++) begin
        @(negedge clk) tbl_raddr = 8'(b);
        @(negedge clk) check(int'(tbl_rdata), ref_hist[b], $sformatf("run %0d bin %0d", run, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
