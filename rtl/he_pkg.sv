// he_pkg: constants and types shared by the histogram-equalisation engine.
//
// The engine equalises one 8-bit greyscale image held in on-chip RAM. The
// default image is 151 x 133 = 20083 pixels, one byte each, the size of the
// finger-knuckle region of interest the design was made for. The grey scale
// has 256 levels, so every table (histogram, cumulative count, mapping) has
// 256 entries.
//
// The processing runs in five phases, each with its own set of read/write
// enables named after the RAM each phase reads or fills:
//   move       wr        copy RAM1 into ram2
//   count      rd, wr1   histogram of ram2
//   cumulative rd1, wr2  running sum of the histogram
//   cdf        rd2, wr3  normalise the running sum into the mapping table
//   map        rd, rd3   replace every pixel of ram2 by its mapped level
// The phase order and the enable names follow the original design; the
// encodings below are this implementation's own.
package he_pkg;

  // Image geometry and pixel format.
  parameter int IMG_W   = 151;
  parameter int IMG_H   = 133;
  parameter int PIXELS  = IMG_W * IMG_H;   // 20083
  parameter int PIX_W   = 8;
  parameter int LEVELS  = 1 << PIX_W;     // 256 grey levels
  parameter int MAX_LVL = LEVELS - 1;     // 255

  // Controller phases.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_MOVE  = 3'd1,
    PH_COUNT = 3'd2,
    PH_CUM   = 3'd3,
    PH_CDF   = 3'd4,
    PH_MAP   = 3'd5
  } phase_t;

  // The per-phase enable set.
  typedef struct packed {
    logic wr;    // ram2 written from RAM1 (move)
    logic rd;    // ram2 read (count, map)
    logic wr1;   // histogram table written (count)
    logic rd1;   // histogram table read (cumulative)
    logic wr2;   // cumulative table written (cumulative)
    logic rd2;   // cumulative table read (cdf)
    logic wr3;   // mapping table written (cdf)
    logic rd3;   // mapping table read (map)
  } strobes_t;

  // Enable set that belongs to each phase.
  function automatic strobes_t strobes_of(phase_t p);
    strobes_t s = '0;
    case (p)
      PH_MOVE:  s.wr = 1'b1;
      PH_COUNT: begin s.rd  = 1'b1; s.wr1 = 1'b1; end
      PH_CUM:   begin s.rd1 = 1'b1; s.wr2 = 1'b1; end
      PH_CDF:   begin s.rd2 = 1'b1; s.wr3 = 1'b1; end
      PH_MAP:   begin s.rd  = 1'b1; s.rd3 = 1'b1; end
      default:  s = '0;
    endcase
    return s;
  endfunction

  // Phase selected by an enable set; PH_IDLE when the set matches none.
  function automatic phase_t phase_of(strobes_t s);
    if      (s == strobes_of(PH_MOVE))  return PH_MOVE;
    else if (s == strobes_of(PH_COUNT)) return PH_COUNT;
    else if (s == strobes_of(PH_CUM))   return PH_CUM;
    else if (s == strobes_of(PH_CDF))   return PH_CDF;
    else if (s == strobes_of(PH_MAP))   return PH_MAP;
    else                                return PH_IDLE;
  endfunction

endpackage
