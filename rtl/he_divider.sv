// he_divider: sequential unsigned divider (restoring, one quotient bit per
// clock).
//
// Used by the CDF unit to scale a cumulative count into an output grey level.
// The original design names the CDF calculation but not how its division is
// done; a bit-serial restoring divider is this implementation's choice as the
// smallest circuit that does it.
//
// Operation: on a start pulse (ignored while busy) the dividend is loaded into
// a shift register. Each clock the partial remainder is shifted left by one
// bit, taking the next dividend bit, and the divisor is subtracted when it
// fits; the quotient bit is 1 when it did. After NW clocks quotient and
// remainder are final, done pulses for one clock and both stay on the outputs
// until the next start. Latency: done is high NW+1 clocks after start.
// Division by zero gives an all-ones quotient.
module he_divider #(
  parameter int NW = 23,   // dividend and quotient width
  parameter int DW = 15    // divisor and remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  localparam int SW = $clog2(NW + 1);

  logic [DW-1:0] d;        // latched divisor
  logic [SW-1:0] steps;    // quotient bits still to produce
  logic [DW:0]   shifted;  // partial remainder with the next dividend bit
  logic          fits;

  assign shifted = {remainder, quotient[NW-1]};
  assign fits    = shifted >= {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d         <= '0;
      steps     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        d         <= divisor;
        quotient  <= dividend;
        remainder <= '0;
        steps     <= SW'(NW);
        busy      <= 1'b1;
      end else if (busy) begin
        remainder <= fits ? DW'(shifted - {1'b0, d}) : shifted[DW-1:0];
        quotient  <= {quotient[NW-2:0], fits};
        steps     <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
