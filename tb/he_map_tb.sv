// he_map_tb: self-checking test of the mapping unit.
//
// A 200-pixel random image and a random 256-entry mapping table are loaded
// into test RAMs; the image RAM's write port is shared between the loader
// and the unit, as in the engine. After the unit runs, every image address
// must hold map[original pixel] (so no pixel was mapped twice by the in-place
// update) and done must come PIXELS+3 clocks after start.
module he_map_tb;
  localparam int PIXELS = 200;
  localparam int AW     = $clog2(PIXELS);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic          ld_we = 1'b0, lut_we = 1'b0;
  logic [AW-1:0] ld_addr = '0, rb_addr = '0;
  logic [7:0]    ld_data = '0, lut_waddr = '0, lut_wdata = '0;
  logic [AW-1:0] img_raddr, img_waddr;
  logic [7:0]    img_rdata, img_wdata, lut_raddr, lut_rdata;
  logic          img_we;
  logic [7:0]    img [PIXELS];
  logic [7:0]    lut [256];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(PIXELS), .WIDTH(8)) u_img (.clk,
    .we(busy ? img_we : ld_we), .waddr(busy ? img_waddr : ld_addr),
    .wdata(busy ? img_wdata : ld_data),
    .raddr(busy ? img_raddr : rb_addr), .rdata(img_rdata));
  he_ram #(.DEPTH(256), .WIDTH(8)) u_lut (.clk, .we(lut_we), .waddr(lut_waddr),
    .wdata(lut_wdata), .raddr(lut_raddr), .rdata(lut_rdata));

  he_map #(.PIXELS(PIXELS)) dut (.*);

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
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 256; b++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_waddr = 8'(b); lut_wdata = 8'($urandom); lut[b] = lut_wdata;
    end
    @(negedge clk) lut_we = 1'b0;
    for (int i = 0; i < PIXELS; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = AW'(i);
      ld_data = (i % 10 < 3) ? 8'd77 : 8'($urandom);
      img[i] = ld_data;
    end
    @(negedge clk) ld_we = 1'b0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc, PIXELS + 3, "map latency");
    @(negedge clk);
    for (int i = 0; i < PIXELS; i++) begin
      @(negedge clk) rb_addr = AW'(i);
      @(negedge clk) check(int'(img_rdata), int'(lut[img[i]]), $sformatf("pixel %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
