// he_ctrl_tb: self-checking test of the phase sequencer.
//
// Plays the five processing units: each answers its go pulse with a done
// pulse after a random delay. The test checks that the phases come in the
// order move, count, cumulative, cdf, map; that each go pulse is one clock
// long and falls in the first clock of its phase; that the enable set
// matches the phase; that a start during a run is ignored; and that done
// pulses once, back in the idle phase. Four automatic runs are made. Then
// manual mode: each phase is requested on its own by a step pulse with its
// enable set (in order, then shuffled), must run alone and return to idle
// with a done pulse; enable sets that match no phase must be ignored; and a
// start together with a step must give an automatic run.
module he_ctrl_tb;
  import he_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic move_done = 1'b0, count_done = 1'b0, cum_done = 1'b0, cdf_done = 1'b0, map_done = 1'b0;
  logic step = 1'b0;
  strobes_t req = '0;
  logic go_move, go_count, go_cum, go_cdf, go_map, busy, done, manual;
  phase_t phase;
  strobes_t strobes;
  int checks = 0, failures = 0;
  strobes_t bad_sets [4] = '{8'h00, 8'hFF, 8'b1010_0000, 8'b0100_0000};

  he_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic strobes_t expected_strobes(phase_t p);
    strobes_t s = '0;
    case (p)
      PH_MOVE:  s.wr = 1'b1;
      PH_COUNT: begin s.rd = 1'b1;  s.wr1 = 1'b1; end
      PH_CUM:   begin s.rd1 = 1'b1; s.wr2 = 1'b1; end
      PH_CDF:   begin s.rd2 = 1'b1; s.wr3 = 1'b1; end
      PH_MAP:   begin s.rd = 1'b1;  s.rd3 = 1'b1; end
      default:  s = '0;
    endcase
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checks of the enable decode and go pulses on every clock.
  always @(negedge clk) if (rst_n) begin
    check(int'(strobes), int'(expected_strobes(phase)), "enable set");
    check(int'({go_move, go_count, go_cum, go_cdf, go_map}) & ~int'({
            phase == PH_MOVE, phase == PH_COUNT, phase == PH_CUM,
            phase == PH_CDF, phase == PH_MAP}), 0, "go outside its phase");
  end

  task automatic unit_phase(input phase_t p, ref logic go, ref logic dn);
    int d;
    check(int'(phase), int'(p), "phase order");
    check(int'(go), 1, "go in first clock of phase");
    d = $urandom_range(0, 12);
    @(negedge clk);
    check(int'(go), 0, "go is one clock");
    if (p == PH_COUNT) start = 1'b1;   // stray start during a run
    repeat (d) @(negedge clk);
    start = 1'b0;
    check(int'(phase), int'(p), "phase held until done");
    dn = 1'b1;
    @(negedge clk) dn = 1'b0;
  endtask

  task automatic manual_phase(input phase_t p);
    @(negedge clk);
    step = 1'b1; req = expected_strobes(p);
    @(negedge clk);
    step = 1'b0; req = '0;
    check(int'(manual), 1, "manual flag");
    check(int'(phase), int'(p), "requested phase");
    check(int'({go_move, go_count, go_cum, go_cdf, go_map}),
          int'({p == PH_MOVE, p == PH_COUNT, p == PH_CUM, p == PH_CDF, p == PH_MAP}),
          "go of requested phase");
    repeat ($urandom_range(1, 6)) @(negedge clk);
    case (p)
      PH_MOVE:  move_done  = 1'b1;
      PH_COUNT: count_done = 1'b1;
      PH_CUM:   cum_done   = 1'b1;
      PH_CDF:   cdf_done   = 1'b1;
      default:  map_done   = 1'b1;
    endcase
    @(negedge clk);
    {move_done, count_done, cum_done, cdf_done, map_done} = '0;
    check(int'(done), 1, "done after manual phase");
    check(int'(phase), int'(PH_IDLE), "idle after manual phase");
    check(int'({go_move, go_count, go_cum, go_cdf, go_map}), 0, "no next phase in manual mode");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      check(int'(phase), int'(PH_IDLE), "idle before start");
      check(int'(busy), 0, "not busy when idle");
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      unit_phase(PH_MOVE,  go_move,  move_done);
      unit_phase(PH_COUNT, go_count, count_done);
      unit_phase(PH_CUM,   go_cum,   cum_done);
      unit_phase(PH_CDF,   go_cdf,   cdf_done);
      unit_phase(PH_MAP,   go_map,   map_done);
      check(int'(done), 1, "done after map");
      check(int'(phase), int'(PH_IDLE), "idle after done");
      @(negedge clk);
      check(int'(done), 0, "done is one clock");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // manual mode, in order and then shuffled
    for (int p = 1; p <= 5; p++) manual_phase(phase_t'(p));
    for (int i = 0; i < 10; i++) manual_phase(phase_t'($urandom_range(1, 5)));
    // enable sets that belong to no phase are ignored
    foreach (bad_sets[i]) begin
      @(negedge clk);
      step = 1'b1; req = bad_sets[i];
      @(negedge clk);
      step = 1'b0; req = '0;
      check(int'(phase), int'(PH_IDLE), "unknown enable set ignored");
    end
    // start wins over step
    @(negedge clk);
    start = 1'b1; step = 1'b1; req = expected_strobes(PH_CDF);
    @(negedge clk);
    start = 1'b0; step = 1'b0;
    check(int'(phase), int'(PH_MOVE), "start wins over step");
    check(int'(manual), 0, "automatic after start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
