// he_cumsum: cumulative unit, running sum of the histogram.
//
// Third phase of the equalisation (enables "rd1" and "wr2"). After a start
// pulse it reads the histogram table at bins 0..LEVELS-1, one per clock, adds
// each bin to an accumulator and writes the running total into its own
// cumulative table, so that cum[k] = hist[0] + ... + hist[k] and
// cum[LEVELS-1] equals the pixel count. The running sum follows the original
// design; the separate table RAM and the one-bin-per-clock rate are this
// implementation's choices.
//
// Timing: the histogram table has one clock of read latency, so the write
// into the cumulative table trails the read address by one clock. done pulses
// LEVELS+2 clocks after the start pulse. tbl_raddr reads the cumulative table
// at any time, with data one clock later on tbl_rdata.
module he_cumsum #(
  parameter int PIXELS  = he_pkg::PIXELS,
  localparam int PW     = he_pkg::PIX_W,
  localparam int LEVELS = he_pkg::LEVELS,
  localparam int CW     = $clog2(PIXELS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // histogram table read port
  output logic [PW-1:0] src_raddr,
  input  logic [CW-1:0] src_rdata,
  // cumulative table read port for the next phase
  input  logic [PW-1:0] tbl_raddr,
  output logic [CW-1:0] tbl_rdata
);

  logic          issuing;
  logic [PW-1:0] k;        // bin being read
  logic          v_d;      // histogram data valid
  logic [PW-1:0] k_d;      // bin of the data now on src_rdata
  logic [CW-1:0] acc;      // running total up to bin k_d-1
  logic [CW-1:0] sum;

  assign sum = acc + src_rdata;

  he_ram #(.DEPTH(LEVELS), .WIDTH(CW)) u_tbl (
    .clk, .we(v_d), .waddr(k_d), .wdata(sum),
    .raddr(tbl_raddr), .rdata(tbl_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      k       <= '0;
      v_d     <= 1'b0;
      k_d     <= '0;
      acc     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      v_d  <= issuing;
      k_d  <= k;
      if (start && !busy) begin
        issuing <= 1'b1;
        k       <= '0;
        acc     <= '0;
      end else begin
        if (issuing) begin
          if (int'(k) == LEVELS - 1) issuing <= 1'b0;
          else                       k       <= k + 1'b1;
        end
        if (v_d) acc <= sum;
      end
      if (v_d && int'(k_d) == LEVELS - 1) done <= 1'b1;
    end
  end

  assign busy      = issuing || v_d;
  assign src_raddr = k;

endmodule
