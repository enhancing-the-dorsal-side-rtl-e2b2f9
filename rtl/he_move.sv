// he_move: copies the input image from RAM1 into the working RAM (ram2).
//
// This is the first phase of the equalisation ("wr" enable). After a start
// pulse it reads RAM1 at addresses 0..PIXELS-1, one per clock. Because RAM1
// returns data one clock after the address, the write address into ram2 is
// the read address delayed by one clock, so pixel i lands at address i of
// ram2 and the RAM latency is cancelled. Copying through a latency-matched
// address follows the original design; the one-pixel-per-clock rate and the
// start/done handshake are this implementation's choices.
//
// Interface: start is a one-clock pulse, ignored while busy. done pulses one
// clock after the last write has been made. The phase takes PIXELS+2 clocks
// from the start pulse to the done pulse.
module he_move #(
  parameter int PIXELS = he_pkg::PIXELS,
  localparam int AW    = $clog2(PIXELS),
  localparam int PW    = he_pkg::PIX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // RAM1 read port
  output logic [AW-1:0] src_raddr,
  input  logic [PW-1:0] src_rdata,
  // ram2 write port
  output logic          dst_we,
  output logic [AW-1:0] dst_waddr,
  output logic [PW-1:0] dst_wdata
);

  logic          issuing;   // a read address is being presented
  logic [AW-1:0] cnt;       // read address
  logic          v_d;       // read data valid (one clock behind)
  logic [AW-1:0] a_d;       // address of the data now on src_rdata

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      cnt     <= '0;
      v_d     <= 1'b0;
      a_d     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      v_d  <= issuing;
      a_d  <= cnt;
      if (start && !busy) begin
        issuing <= 1'b1;
        cnt     <= '0;
      end else if (issuing) begin
        if (int'(cnt) == PIXELS - 1) issuing <= 1'b0;
        else                         cnt     <= cnt + 1'b1;
      end
      if (v_d && int'(a_d) == PIXELS - 1) done <= 1'b1;
    end
  end

  assign busy      = issuing || v_d;
  assign src_raddr = cnt;
  assign dst_we    = v_d;
  assign dst_waddr = a_d;
  assign dst_wdata = src_rdata;

endmodule
