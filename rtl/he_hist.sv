// he_hist: data count unit, builds the grey-level histogram of the image.
//
// Second phase of the equalisation (enables "rd" and "wr1"). After a start
// pulse the unit first writes zero into all LEVELS bins of its histogram
// table (LEVELS clocks), then scans the working image at addresses
// 0..PIXELS-1, one pixel per clock, and adds one to the bin of each pixel's
// grey level. Counting pixels per grey level follows the original design;
// the clearing pass, the table held in a block RAM and the pipeline below are
// this implementation's choices.
//
// Pipeline (table is a RAM with one clock of read latency):
//   A  image address presented
//   B  pixel value arrives; it addresses the table read
//   C  bin value arrives; bin+1 is written back
// A pixel equal to the one just before it reads the bin before the previous
// increment has landed, so stage C forwards the value it wrote one clock
// earlier when the bins match. fwd_count counts those forwarded increments.
//
// Interface: start is a one-clock pulse, ignored while busy; done pulses once
// the last increment is written, LEVELS+PIXELS+4 clocks after the start pulse. While the
// unit is idle, tbl_raddr reads the table (data one clock later on tbl_rdata).
module he_hist #(
  parameter int PIXELS  = he_pkg::PIXELS,
  localparam int AW     = $clog2(PIXELS),
  localparam int PW     = he_pkg::PIX_W,
  localparam int LEVELS = he_pkg::LEVELS,
  localparam int CW     = $clog2(PIXELS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // working image read port
  output logic [AW-1:0] img_raddr,
  input  logic [PW-1:0] img_rdata,
  // histogram table read port for the next phase
  input  logic [PW-1:0] tbl_raddr,
  output logic [CW-1:0] tbl_rdata,
  // number of same-bin forwards in the last run
  output logic [AW-1:0] fwd_count
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_SCAN, S_DRAIN} state_t;
  state_t state;

  logic [AW-1:0] cnt;          // image address
  logic [PW-1:0] clr;          // clear address
  logic          v_b, v_c;     // stage valid flags
  logic          v_a;
  logic [PW-1:0] pix_c;        // bin written in the previous clock
  logic [CW-1:0] wdat_c;       // value written in the previous clock
  logic [PW-1:0] pix_b;        // bin whose table read is returning now

  // table RAM signals
  logic          t_we;
  logic [PW-1:0] t_waddr, t_raddr;
  logic [CW-1:0] t_wdata, t_rdata;
  logic [CW-1:0] base;
  logic          fwd;

  he_ram #(.DEPTH(LEVELS), .WIDTH(CW)) u_tbl (
    .clk, .we(t_we), .waddr(t_waddr), .wdata(t_wdata),
    .raddr(t_raddr), .rdata(t_rdata)
  );

  // Stage C: forward the previous increment when it hit the same bin.
  assign fwd  = v_c && (pix_c == pix_b);
  assign base = fwd ? wdat_c : t_rdata;

  always_comb begin
    if (state == S_CLEAR) begin
      t_we    = 1'b1;
      t_waddr = clr;
      t_wdata = '0;
    end else begin
      t_we    = v_b;
      t_waddr = pix_b;
      t_wdata = base + 1'b1;
    end
    // stage B addresses the table with the arriving pixel; otherwise the
    // next phase reads it
    t_raddr = busy ? img_rdata : tbl_raddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      clr       <= '0;
      v_a       <= 1'b0;
      v_b       <= 1'b0;
      v_c       <= 1'b0;
      pix_b     <= '0;
      pix_c     <= '0;
      wdat_c    <= '0;
      done      <= 1'b0;
      fwd_count <= '0;
    end else begin
      done   <= 1'b0;
      v_a    <= (state == S_SCAN);
      v_b    <= v_a;
      pix_b  <= img_rdata;
      v_c    <= v_b;
      pix_c  <= pix_b;
      wdat_c <= base + 1'b1;
      if (v_b && fwd) fwd_count <= fwd_count + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_CLEAR;
          clr       <= '0;
          cnt       <= '0;
          fwd_count <= '0;
        end
        S_CLEAR: begin
          if (int'(clr) == LEVELS - 1) state <= S_SCAN;
          else                         clr   <= clr + 1'b1;
        end
        S_SCAN: begin
          if (int'(cnt) == PIXELS - 1) state <= S_DRAIN;
          else                         cnt   <= cnt + 1'b1;
        end
        S_DRAIN: if (!v_a && !v_b) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign img_raddr = cnt;
  assign tbl_rdata = t_rdata;

  // A forward is only ever taken from a write made one clock earlier.
  a_fwd_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (v_b && fwd) |-> $past(t_we));

endmodule
