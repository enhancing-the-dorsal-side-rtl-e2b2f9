// he_top: histogram-equalisation engine for 8-bit greyscale images.
//
// The engine improves the contrast of a finger-knuckle image by spreading its
// grey levels over the full 0..255 range: each level k is replaced by
// round(255 * C(k) / N), where C(k) is the number of pixels at or below level
// k and N the pixel count. The image is held in on-chip RAM and processed in
// five phases run by he_ctrl:
//
//   move   he_move     RAM1 -> ram2, latency-matched copy
//   count  he_hist     histogram of ram2 (256 bins)
//   cum    he_cumsum   running sum of the histogram
//   cdf    he_cdf      mapping table map[k] = round(255*cum[k]/N)
//   map    he_map      ram2[i] <= map[ram2[i]], in place
//
// The two image RAMs, the phase order and the enable names follow the
// original design; the automatic sequencing, the in-place output in ram2 and
// the rounding rule are this implementation's choices.
//
// Host interface: the image is loaded into RAM1 through host_we/host_waddr/
// host_wdata (pixel i of a row-major image at address i). A one-clock start
// pulse runs all five phases; done pulses when ram2 holds the equalised
// image, which is then read through host_raddr with data on host_rdata one
// clock later. Alternatively a step pulse with one phase's enable set on req
// runs just that phase (manual mode, flagged on `manual`), so the five
// phases can be applied one at a time in order, as the original design was
// operated; done then pulses at the end of each phase. host_raddr is only routed to ram2 while phase is PH_IDLE,
// PH_CUM or PH_CDF. A run takes 3*PIXELS + 2*256 + 256*(CW+11) + 18 clocks,
// CW = $clog2(PIXELS+1), which is 67435 clocks at the default image size.
module he_top #(
  parameter int PIXELS = he_pkg::PIXELS,
  localparam int AW    = $clog2(PIXELS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access (RAM1 load, ram2 read-back)
  input  logic          host_we,
  input  logic [AW-1:0] host_waddr,
  input  logic [he_pkg::PIX_W-1:0] host_wdata,
  input  logic [AW-1:0] host_raddr,
  output logic [he_pkg::PIX_W-1:0] host_rdata,
  // run control and status
  input  logic          start,
  input  logic          step,
  input  he_pkg::strobes_t req,
  output logic          manual,
  output logic          busy,
  output logic          done,
  output he_pkg::phase_t phase,
  output he_pkg::strobes_t strobes,
  output logic [AW-1:0] fwd_count
);

  localparam int CW = $clog2(PIXELS + 1);

  // unit handshakes
  logic go_move, go_count, go_cum, go_cdf, go_map;
  logic move_done, count_done, cum_done, cdf_done, map_done;
  logic move_busy, count_busy, cum_busy, cdf_busy, map_busy;

  // RAM1
  logic [AW-1:0]    r1_raddr;
  logic [he_pkg::PIX_W-1:0] r1_rdata;
  // ram2
  logic             r2_we;
  logic [AW-1:0]    r2_waddr, r2_raddr;
  logic [he_pkg::PIX_W-1:0] r2_wdata, r2_rdata;
  // unit-side ram2 ports
  logic             mv_we,   mp_we;
  logic [AW-1:0]    mv_waddr, mp_waddr, hs_raddr, mp_raddr;
  logic [he_pkg::PIX_W-1:0] mv_wdata, mp_wdata;
  // table links
  logic [he_pkg::PIX_W-1:0] hist_raddr, cum_raddr, lut_raddr, lut_rdata;
  logic [CW-1:0]    hist_rdata, cum_rdata;

  he_ctrl u_ctrl (
    .clk, .rst_n, .start, .step, .req,
    .move_done, .count_done, .cum_done, .cdf_done, .map_done,
    .go_move, .go_count, .go_cum, .go_cdf, .go_map,
    .phase, .strobes, .manual, .busy, .done
  );

  he_ram #(.DEPTH(PIXELS), .WIDTH(he_pkg::PIX_W)) u_ram1 (
    .clk, .we(host_we), .waddr(host_waddr), .wdata(host_wdata),
    .raddr(r1_raddr), .rdata(r1_rdata)
  );

  he_ram #(.DEPTH(PIXELS), .WIDTH(he_pkg::PIX_W)) u_ram2 (
    .clk, .we(r2_we), .waddr(r2_waddr), .wdata(r2_wdata),
    .raddr(r2_raddr), .rdata(r2_rdata)
  );

  he_move #(.PIXELS(PIXELS)) u_move (
    .clk, .rst_n, .start(go_move), .busy(move_busy), .done(move_done),
    .src_raddr(r1_raddr), .src_rdata(r1_rdata),
    .dst_we(mv_we), .dst_waddr(mv_waddr), .dst_wdata(mv_wdata)
  );

  he_hist #(.PIXELS(PIXELS)) u_hist (
    .clk, .rst_n, .start(go_count), .busy(count_busy), .done(count_done),
    .img_raddr(hs_raddr), .img_rdata(r2_rdata),
    .tbl_raddr(hist_raddr), .tbl_rdata(hist_rdata), .fwd_count
  );

  he_cumsum #(.PIXELS(PIXELS)) u_cum (
    .clk, .rst_n, .start(go_cum), .busy(cum_busy), .done(cum_done),
    .src_raddr(hist_raddr), .src_rdata(hist_rdata),
    .tbl_raddr(cum_raddr), .tbl_rdata(cum_rdata)
  );

  he_cdf #(.PIXELS(PIXELS)) u_cdf (
    .clk, .rst_n, .start(go_cdf), .busy(cdf_busy), .done(cdf_done),
    .src_raddr(cum_raddr), .src_rdata(cum_rdata),
    .tbl_raddr(lut_raddr), .tbl_rdata(lut_rdata)
  );

  he_map #(.PIXELS(PIXELS)) u_map (
    .clk, .rst_n, .start(go_map), .busy(map_busy), .done(map_done),
    .img_raddr(mp_raddr), .img_rdata(r2_rdata),
    .lut_raddr(lut_raddr), .lut_rdata(lut_rdata),
    .img_we(mp_we), .img_waddr(mp_waddr), .img_wdata(mp_wdata)
  );

  // ram2 port steering by the current enable set.
  always_comb begin
    if (strobes.wr) begin
      r2_we = mv_we;  r2_waddr = mv_waddr; r2_wdata = mv_wdata;
    end else if (strobes.rd3) begin
      r2_we = mp_we;  r2_waddr = mp_waddr; r2_wdata = mp_wdata;
    end else begin
      r2_we = 1'b0;   r2_waddr = '0;       r2_wdata = '0;
    end
    if (strobes.wr1)      r2_raddr = hs_raddr;
    else if (strobes.rd3) r2_raddr = mp_raddr;
    else                  r2_raddr = host_raddr;
  end

  assign host_rdata = r2_rdata;

  // Units only run in their own phase.
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({move_busy, count_busy, cum_busy, cdf_busy, map_busy}));

endmodule
