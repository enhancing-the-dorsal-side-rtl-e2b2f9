// he_move_tb: self-checking test of the RAM1 -> ram2 copy unit.
//
// Loads a random 100-pixel image into a source RAM, runs the move unit into
// a destination RAM, and checks that every pixel arrived at its own address
// and that done came PIXELS+2 clocks after start. Runs twice with different
// images.
module he_move_tb;
  localparam int PIXELS = 100;
  localparam int AW     = $clog2(PIXELS);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic          ld_we = 1'b0;
  logic [AW-1:0] ld_addr = '0, rb_addr = '0;
  logic [7:0]    ld_data = '0;
  logic [AW-1:0] src_raddr, dst_waddr, dst_raddr;
  logic [7:0]    src_rdata, dst_wdata, dst_rdata;
  logic          dst_we;
  logic [7:0]    img [PIXELS];
  int checks = 0, failures = 0;

  he_ram #(.DEPTH(PIXELS), .WIDTH(8)) u_src (.clk, .we(ld_we), .waddr(ld_addr),
    .wdata(ld_data), .raddr(src_raddr), .rdata(src_rdata));
  he_ram #(.DEPTH(PIXELS), .WIDTH(8)) u_dst (.clk, .we(dst_we), .waddr(dst_waddr),
    .wdata(dst_wdata), .raddr(dst_raddr), .rdata(dst_rdata));
  assign dst_raddr = rb_addr;

  he_move #(.PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
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
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < PIXELS; i++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_addr = AW'(i); ld_data = 8'($urandom); img[i] = ld_data;
      end
      @(negedge clk) ld_we = 1'b0;
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc, PIXELS + 2, "move latency");
      for (int i = 0; i < PIXELS; i++) begin
        @(negedge clk) rb_addr = AW'(i);
        @(negedge clk) check(dst_rdata, img[i], $sformatf("pixel %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
