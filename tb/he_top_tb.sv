// he_top_tb: end-to-end test of the histogram-equalisation engine at its
// default size (151 x 133 = 20083 pixels).
//
// Generates a low-contrast synthetic knuckle image (a brightness ramp with
// dark diagonal creases, a flat patch and a little noise), loads it into
// RAM1 through the host port, starts the engine and waits for done. Then
// reads ram2 back and compares every pixel with an equalisation computed
// here: histogram, running sum and round(255*cum/N) per level. Also checks
// the run length in clocks (3N + 2*256 + 256*(CW+11) + 18), that each of the
// five phases ran with its enable set, that the histogram's same-bin
// forwarding was exercised, that the map phase lasted N+4 clocks,
// and that the output spans the full grey range. The normalised MSE and PSNR
// between input and output are printed. Ten automatic runs, one per image
// of a ten-image capture set with different exposure and polarity, check
// that every run starts clean. An eleventh image is processed in manual
// mode, applying the five phases' enable sets one at a time; an enable set
// that names no phase must be ignored, and both control modes must be used.
module he_top_tb;
  import he_pkg::*;
  localparam int N  = he_pkg::PIXELS;
  localparam int AW = $clog2(N);
  localparam int CW = $clog2(N + 1);
  localparam int RUNS = 10;   // one run per captured image

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic          host_we = 1'b0;
  logic [AW-1:0] host_waddr = '0, host_raddr = '0;
  logic [7:0]    host_wdata = '0, host_rdata;
  logic          step = 1'b0;
  strobes_t      req = '0;
  logic          busy, done, manual;
  phase_t        phase;
  strobes_t      strobes;
  logic [AW-1:0] fwd_count;

  logic [7:0] img [N];
  int hist [256];
  int cum  [256];
  int lut  [256];
  int checks = 0, failures = 0;
  // enable sets of move, count, cumulative, cdf and map, in that order
  // (bit order wr, rd, wr1, rd1, wr2, rd2, wr3, rd3)
  strobes_t manual_sets [5] = '{8'b1000_0000, 8'b0110_0000, 8'b0001_1000,
                                8'b0000_0110, 8'b0100_0001};
  int phase_clocks [6];
  int map_writes;
  int manual_clocks, auto_clocks;

  he_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    phase_clocks[int'(phase)]++;
    if (strobes.rd3) map_writes++;
    if (busy && manual)  manual_clocks++;
    if (busy && !manual) auto_clocks++;
  end

  function automatic logic [7:0] pixel(int run, int x, int y);
    int v;
    v = 95 + (x * 30) / IMG_W + (y * 15) / IMG_H;
    if (((x + y / 3 + run * 7) % 23) < 3) v -= 28;      // crease
    if (x < 12 && y < 40) v = 88 + run;                 // flat patch
    else v += $urandom_range(0, 5);                     // noise
    v += (run / 2) * 6 - 12;                            // exposure per image
    if (run % 2 == 1) v = 250 - v;                      // dark-on-light images
    return 8'(v);
  endfunction

  initial begin
    int cyc, mn_in, mx_in, mn_out, mx_out, got;
    real se, mse, psnr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    manual_clocks = 0; auto_clocks = 0;
    for (int run = 0; run <= RUNS; run++) begin
      foreach (hist[b]) hist[b] = 0;
      foreach (phase_clocks[p]) phase_clocks[p] = 0;
      map_writes = 0;
      mn_in = 255; mx_in = 0;
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          img[y * IMG_W + x] = pixel(run, x, y);
          hist[img[y * IMG_W + x]]++;
        end
      for (int b = 0, s = 0; b < 256; b++) begin
        s += hist[b];
        cum[b] = s;
        lut[b] = (255 * s + N / 2) / N;
        if (hist[b] != 0) begin
          if (b < mn_in) mn_in = b;
          if (b > mx_in) mx_in = b;
        end
      end
      // load RAM1
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        host_we = 1'b1; host_waddr = AW'(i); host_wdata = img[i];
      end
      @(negedge clk) host_we = 1'b0;
      if (run < RUNS) begin
        // automatic run
        start = 1'b1;
        @(negedge clk) start = 1'b0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        check(cyc, 3 * N + 2 * 256 + 256 * (CW + 11) + 18, "run length in clocks");
      end else begin
        // manual run: an enable set that names no phase, then the five
        // phases' enable sets one at a time
        step = 1'b1; req = 8'b1000_0001;
        @(negedge clk) step = 1'b0;
        @(negedge clk);
        check(int'(busy), 0, "unknown enable set ignored");
        cyc = 0;
        foreach (manual_sets[k]) begin
          @(negedge clk);
          step = 1'b1; req = manual_sets[k];
          @(negedge clk) step = 1'b0;
          while (!done) begin @(negedge clk); cyc++; end
          check(int'(phase), int'(PH_IDLE), "idle after a manual phase");
        end
      end
      $display("run %0d: %0d clocks, %0d forwarded increments", run, cyc, fwd_count);
      // mechanisms
      for (int p = 1; p <= 5; p++)
        if (phase_clocks[p] == 0) begin
          failures++;
          $display("FAIL phase %0d never ran", p);
        end
      checks++;
      if (fwd_count == 0) begin failures++; $display("FAIL no forwarded increment"); end
      check(map_writes, N + 4, "clocks in map phase");
      // read back and compare
      se = 0.0; mn_out = 255; mx_out = 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk) host_raddr = AW'(i);
        @(negedge clk);
        got = int'(host_rdata);
        check(got, lut[img[i]], $sformatf("run %0d pixel %0d", run, i));
        se += real'((got - int'(img[i])) ** 2);
        if (got < mn_out) mn_out = got;
        if (got > mx_out) mx_out = got;
      end
      check(mx_out, 255, "output reaches 255");
      checks++;
      if (mx_out - mn_out <= mx_in - mn_in) begin
        failures++;
        $display("FAIL contrast not stretched");
      end
      mse  = se / N / (255.0 * 255.0);
      psnr = 10.0 * $log10(1.0 / mse);
      $display("run %0d: input %0d..%0d, output %0d..%0d, MSE %f, PSNR %f dB",
               run, mn_in, mx_in, mn_out, mx_out, mse, psnr);
    end
    $display("clocks busy: automatic %0d, manual %0d", auto_clocks, manual_clocks);
    checks++;
    if (auto_clocks == 0 || manual_clocks == 0) begin
      failures++;
      $display("FAIL a control mode was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
