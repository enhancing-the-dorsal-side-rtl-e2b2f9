// he_ram: simple dual-port synchronous RAM.
//
// One write port and one read port on a single clock, the shape of an FPGA
// block RAM. It holds the input image (RAM1), the working image (ram2) and
// the three 256-entry tables of the histogram-equalisation engine.
//
// Timing: a write with we=1 takes effect at the clock edge. Read data appears
// on rdata one clock after raddr is presented (registered output). When the
// same address is read and written in one cycle the old contents are
// returned (read-before-write); the histogram unit forwards around this.
// Writes to addresses at or above DEPTH are dropped. Contents are not reset:
// the engine writes every location before reading it.
module he_ram #(
  parameter int DEPTH = he_pkg::PIXELS,
  parameter int WIDTH = he_pkg::PIX_W,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
