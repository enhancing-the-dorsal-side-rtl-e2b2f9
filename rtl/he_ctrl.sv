// he_ctrl: phase sequencer of the histogram-equalisation engine.
//
// The equalisation runs as five phases in a fixed order: move (copy RAM1 into
// ram2), count (histogram), cumulative (running sum), cdf (mapping table) and
// map (rewrite the image). Each phase has an enable set, decoded onto
// `strobes` with the original names (wr; rd+wr1; rd1+wr2; rd2+wr3; rd+rd3).
//
// Two ways to run, both from PH_IDLE:
//   automatic  a start pulse runs all five phases in order; this sequencing
//              is this implementation's addition.
//   manual     a step pulse together with an enable set on `req` runs the one
//              phase that set belongs to and then returns to PH_IDLE. This is
//              how the original design was driven: its five phases were
//              started one by one by applying each enable set. A set that
//              matches no phase is ignored.
// start takes priority over step when both arrive together.
//
// Interface: on entering a phase the controller pulses that phase's unit
// start (go_*) in the first clock of the phase, then waits for the unit's
// done pulse. In automatic mode the next phase begins one clock later; after
// map, and after the single phase of a manual step, the controller returns to
// PH_IDLE and pulses done. start and step are ignored while busy.
module he_ctrl
  import he_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     step,
  input  strobes_t req,
  input  logic     move_done,
  input  logic     count_done,
  input  logic     cum_done,
  input  logic     cdf_done,
  input  logic     map_done,
  output logic     go_move,
  output logic     go_count,
  output logic     go_cum,
  output logic     go_cdf,
  output logic     go_map,
  output phase_t   phase,
  output strobes_t strobes,
  output logic     manual,
  output logic     busy,
  output logic     done
);

  phase_t entry;        // phase to enter from idle, PH_IDLE for none
  phase_t next_phase;   // phase after the current unit reports done
  logic   unit_done;

  always_comb begin
    if (start)     entry = PH_MOVE;
    else if (step) entry = phase_of(req);
    else           entry = PH_IDLE;
  end

  always_comb begin
    unit_done  = 1'b0;
    next_phase = PH_IDLE;
    unique case (phase)
      PH_MOVE:  begin unit_done = move_done;  next_phase = PH_COUNT; end
      PH_COUNT: begin unit_done = count_done; next_phase = PH_CUM;   end
      PH_CUM:   begin unit_done = cum_done;   next_phase = PH_CDF;   end
      PH_CDF:   begin unit_done = cdf_done;   next_phase = PH_MAP;   end
      PH_MAP:   begin unit_done = map_done;   next_phase = PH_IDLE;  end
      default:  begin unit_done = 1'b0;       next_phase = PH_IDLE;  end
    endcase
    if (manual) next_phase = PH_IDLE;
  end

  function automatic logic [4:0] go_for(phase_t p);
    return {p == PH_MOVE, p == PH_COUNT, p == PH_CUM, p == PH_CDF, p == PH_MAP};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      manual <= 1'b0;
      {go_move, go_count, go_cum, go_cdf, go_map} <= '0;
      done   <= 1'b0;
    end else begin
      {go_move, go_count, go_cum, go_cdf, go_map} <= '0;
      done <= 1'b0;
      if (phase == PH_IDLE) begin
        if (entry != PH_IDLE) begin
          phase  <= entry;
          manual <= !start;
          {go_move, go_count, go_cum, go_cdf, go_map} <= go_for(entry);
        end
      end else if (unit_done) begin
        phase <= next_phase;
        {go_move, go_count, go_cum, go_cdf, go_map} <= go_for(next_phase);
        if (next_phase == PH_IDLE) done <= 1'b1;
      end
    end
  end

  assign strobes = strobes_of(phase);
  assign busy    = (phase != PH_IDLE);

  // Exactly one phase runs at a time: a unit only reports done in its phase.
  a_done_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (move_done  |-> phase == PH_MOVE)  and (count_done |-> phase == PH_COUNT) and
    (cum_done   |-> phase == PH_CUM)   and (cdf_done   |-> phase == PH_CDF)   and
    (map_done   |-> phase == PH_MAP));

endmodule
