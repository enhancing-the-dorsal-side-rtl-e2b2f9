// he_map: mapping unit, writes the equalised image back into ram2.
//
// Last phase of the equalisation (enables "rd" and "rd3"). After a start
// pulse it reads the working image at addresses 0..PIXELS-1, one per clock,
// uses each pixel as the address into the mapping table, and writes the
// table's value back to the same image address. Mapping every pixel through
// the table follows the original design; writing the result in place into
// ram2, so that ram2 ends up holding the enhanced image, is this
// implementation's reading of where the output goes.
//
// Pipeline: A image address; B pixel arrives and addresses the table;
// C mapped level arrives and is written to the address issued two clocks
// earlier. Each address is read two clocks before it is overwritten, so the
// in-place update never reads a pixel that has already been mapped.
// done pulses PIXELS+3 clocks after the start pulse.
module he_map #(
  parameter int PIXELS = he_pkg::PIXELS,
  localparam int AW    = $clog2(PIXELS),
  localparam int PW    = he_pkg::PIX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // ram2 read port
  output logic [AW-1:0] img_raddr,
  input  logic [PW-1:0] img_rdata,
  // mapping table read port
  output logic [PW-1:0] lut_raddr,
  input  logic [PW-1:0] lut_rdata,
  // ram2 write port
  output logic          img_we,
  output logic [AW-1:0] img_waddr,
  output logic [PW-1:0] img_wdata
);

  logic          issuing;
  logic [AW-1:0] cnt;
  logic          v_b, v_c;
  logic [AW-1:0] a_b, a_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      cnt     <= '0;
      v_b     <= 1'b0;
      v_c     <= 1'b0;
      a_b     <= '0;
      a_c     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      v_b  <= issuing;
      a_b  <= cnt;
      v_c  <= v_b;
      a_c  <= a_b;
      if (start && !busy) begin
        issuing <= 1'b1;
        cnt     <= '0;
      end else if (issuing) begin
        if (int'(cnt) == PIXELS - 1) issuing <= 1'b0;
        else                         cnt     <= cnt + 1'b1;
      end
      if (v_c && int'(a_c) == PIXELS - 1) done <= 1'b1;
    end
  end

  assign busy      = issuing || v_b || v_c;
  assign img_raddr = cnt;
  assign lut_raddr = img_rdata;
  assign img_we    = v_c;
  assign img_waddr = a_c;
  assign img_wdata = lut_rdata;

endmodule
