// he_cdf: CDF unit, turns the cumulative histogram into the mapping table.
//
// Fourth phase of the equalisation (enables "rd2" and "wr3"). For every grey
// level k the unit reads cum[k] from the cumulative table and computes the
// equalised output level
//
//     map[k] = round( (LEVELS-1) * cum[k] / PIXELS )
//            = floor( (255 * cum[k] + floor(PIXELS/2)) / PIXELS )
//
// which is the normalised cumulative distribution scaled to the 8-bit range,
// and stores it in its mapping table. Computing the CDF after the cumulative
// sum follows the original design; the exact rounding and the use of a
// bit-serial divider are this implementation's choices. Since
// cum[k] <= PIXELS the result never exceeds 255.
//
// Timing per bin: one clock to read the table, one to start the divider, NW
// divider clocks, and the clock in which the quotient is written, so
// NW+3 clocks per bin with NW = counter width + 8 (26 at the default image
// size). done pulses LEVELS*(NW+3)+1 clocks after the start pulse. tbl_raddr
// reads the mapping table at any time, data one clock later on tbl_rdata.
module he_cdf #(
  parameter int PIXELS  = he_pkg::PIXELS,
  localparam int PW     = he_pkg::PIX_W,
  localparam int LEVELS = he_pkg::LEVELS,
  localparam int CW     = $clog2(PIXELS + 1),
  localparam int NW     = CW + PW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // cumulative table read port
  output logic [PW-1:0] src_raddr,
  input  logic [CW-1:0] src_rdata,
  // mapping table read port for the map phase
  input  logic [PW-1:0] tbl_raddr,
  output logic [PW-1:0] tbl_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_START, S_DIV} state_t;
  state_t state;

  logic [PW-1:0] k;
  logic          div_start, div_busy, div_done;
  logic [NW-1:0] dividend, quotient;

  assign dividend  = NW'(src_rdata) * NW'(he_pkg::MAX_LVL) + NW'(PIXELS / 2);
  assign div_start = (state == S_START);

  he_divider #(.NW(NW), .DW(CW)) u_div (
    .clk, .rst_n, .start(div_start), .dividend,
    .divisor(CW'(PIXELS)), .busy(div_busy), .done(div_done),
    .quotient, .remainder()
  );

  he_ram #(.DEPTH(LEVELS), .WIDTH(PW)) u_tbl (
    .clk, .we(div_done), .waddr(k), .wdata(quotient[PW-1:0]),
    .raddr(tbl_raddr), .rdata(tbl_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin
          state <= S_READ;
          k     <= '0;
        end
        S_READ:  state <= S_START;
        S_START: state <= S_DIV;
        S_DIV:   if (div_done) begin
          if (int'(k) == LEVELS - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_READ;
            k     <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign src_raddr = k;

  // The divider is idle whenever a new bin is started.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);

  // The scaled level always fits the pixel width.
  a_level_range: assert property (@(posedge clk) disable iff (!rst_n)
    div_done |-> (quotient < NW'(LEVELS)));

endmodule
