// deblock_pkg -- types, tables and the Order4 stage table shared by the
// boundary-level parallel H.264 deblocking engine.
//
// The unit of work is a "four-pixel-long boundary": four consecutive lines
// of one luma edge segment, i.e. four rows of p3..p0|q0..q3 across a
// vertical edge, or four columns across a horizontal edge.  A 16x16
// macroblock (MB) has 32 of them.  Boundary numbering (this design's own):
//   bid  0..15 : vertical edge e = bid/4 (x = 4e inside the MB),
//                segment s = bid%4 covers MB rows 4s..4s+3
//   bid 16..31 : horizontal edge e = (bid-16)/4 (y = 4e inside the MB),
//                segment s = (bid-16)%4 covers MB columns 4s..4s+3
// A window is 4 lines x 8 taps; tap 0..3 = p3..p0, tap 4..7 = q0..q3.
//
// Order4 stage table: boundary bid of MB (r, c) of the K-row stripe slot j
// is deblocked at time unit  T_stripe + 5*j + 6*c + STAGE(bid).  Stages
// run 0..7 with 1,2,5,6,5,5,5,3 boundaries each, which gives the
// 1,2,(5,6,5,5,6,5)*,5,6,5,5,5,3 issue pattern of one MB row, an MB period
// of 6 time units and a row delay of 5 time units.  The per-boundary
// stages were derived here from the read/write footprints of the boundaries
// under the standard H.264 filtering order; every true, output and anti
// dependency between any two boundaries of the frame is met with these
// offsets.
//
// The alpha, beta and tC0 tables are those of the H.264 standard for luma.
package deblock_pkg;

  typedef logic [7:0] pix_t;
  typedef pix_t [7:0] line_t;   // taps p3 p2 p1 p0 q0 q1 q2 q3 (index 0..7)
  typedef line_t [3:0] win_t;   // 4 lines of one four-pixel-long boundary

  typedef logic [7:0] mbc_t;    // MB row / column index
  typedef logic [4:0] bid_t;    // boundary id inside an MB

  // One boundary operation handed to a PE.
  typedef struct packed {
    logic valid;
    mbc_t mb_row;
    mbc_t mb_col;
    bid_t bid;
  } bnd_op_t;

  localparam int unsigned NUM_BND   = 32;  // boundaries per MB
  localparam int unsigned NUM_STAGE = 8;   // critical-path length of one MB
  localparam int unsigned T_MB      = 6;   // time units per MB along a row
  localparam int unsigned T_DR      = 5;   // delay between adjoining MB rows
  localparam int unsigned LANES     = 6;   // max boundaries one MB row issues per time unit

  // Order4 stage of each boundary inside its MB.
  function automatic int unsigned stage_of(input int unsigned bid);
    case (bid)
      0:                       return 0;
      1, 4:                    return 1;
      2, 3, 5, 8, 16:          return 2;
      6, 7, 9, 12, 17, 20:     return 3;
      10, 11, 13, 18, 19:      return 4;
      14, 21, 22, 23, 24:      return 5;
      15, 25, 26, 27, 28:      return 6;
      default:                 return 7;   // 29, 30, 31
    endcase
  endfunction

  // Issue lane table: at phase ph (0..5) of a row slot, lane l carries
  // boundary bid of the current MB (stage ph) or of the previous MB
  // (stage ph+6).
  typedef struct packed {
    logic       valid;
    logic       use_prev;
    logic [4:0] bid;
  } lane_t;
  typedef lane_t [LANES-1:0] lane_row_t;
  typedef lane_row_t [5:0]   lane_tab_t;

  function automatic lane_tab_t build_lane_tab();
    lane_tab_t t;
    int unsigned n;
    t = '0;
    for (int unsigned ph = 0; ph < 6; ph++) begin
      n = 0;
      for (int unsigned b = 0; b < NUM_BND; b++) begin
        if (stage_of(b) == ph || stage_of(b) == ph + 6) begin
          if (n < LANES) begin
            t[ph][n].valid    = 1'b1;
            t[ph][n].use_prev = (stage_of(b) == ph + 6);
            t[ph][n].bid      = 5'(b);
          end
          n++;
        end
      end
    end
    return t;
  endfunction

  localparam lane_tab_t LANE_TAB = build_lane_tab();

  // Geometry: pixel coordinate of line ln, tap tp of boundary op.
  // Coordinates may fall outside the picture for picture-edge boundaries.
  function automatic int pix_y(input bnd_op_t op, input int ln, input int tp);
    int b;
    b = int'(op.bid);
    if (b < 16) return 16 * int'(op.mb_row) + 4 * (b % 4) + ln;
    else        return 16 * int'(op.mb_row) + 4 * ((b - 16) / 4) - 4 + tp;
  endfunction

  function automatic int pix_x(input bnd_op_t op, input int ln, input int tp);
    int b;
    b = int'(op.bid);
    if (b < 16) return 16 * int'(op.mb_col) + 4 * (b / 4) - 4 + tp;
    else        return 16 * int'(op.mb_col) + 4 * ((b - 16) % 4) + ln;
  endfunction

  // Picture edges (left column of vertical edge 0 in MB column 0, top row of
  // horizontal edge 0 in MB row 0) are not filtered.
  function automatic logic on_picture_edge(input bnd_op_t op);
    return (op.bid < 5'd4 && op.mb_col == '0) ||
           (op.bid >= 5'd16 && op.bid < 5'd20 && op.mb_row == '0);
  endfunction

  // Is the p side of this boundary in the neighbouring MB (left or top)?
  function automatic logic p_in_neighbour(input bnd_op_t op);
    return (op.bid < 5'd4) || (op.bid >= 5'd16 && op.bid < 5'd20);
  endfunction

  // H.264 luma alpha'(indexA)
  function automatic int unsigned alpha_of(input int unsigned ia);
    case (ia)
      16, 17: return 4;   18: return 5;   19: return 6;   20: return 7;
      21: return 8;       22: return 9;   23: return 10;  24: return 12;
      25: return 13;      26: return 15;  27: return 17;  28: return 20;
      29: return 22;      30: return 25;  31: return 28;  32: return 32;
      33: return 36;      34: return 40;  35: return 45;  36: return 50;
      37: return 56;      38: return 63;  39: return 71;  40: return 80;
      41: return 90;      42: return 101; 43: return 113; 44: return 127;
      45: return 144;     46: return 162; 47: return 182; 48: return 203;
      49: return 226;     50, 51: return 255;
      default: return 0;
    endcase
  endfunction

  // H.264 luma beta'(indexB)
  function automatic int unsigned beta_of(input int unsigned ib);
    if (ib < 16) return 0;
    if (ib < 19) return 2;
    if (ib < 23) return 3;
    if (ib < 26) return 4;
    if (ib < 28) return 6;
    return 7 + (ib - 28) / 2;
  endfunction

  // H.264 tC0(indexA, bS) for bS = 1..3
  function automatic int unsigned tc0_of(input int unsigned ia, input int unsigned bs);
    int unsigned v1, v2, v3;
    case (ia)
      17, 18, 19, 20: begin v1 = 0; v2 = 0; v3 = 1; end
      21, 22:         begin v1 = 0; v2 = 1; v3 = 1; end
      23, 24, 25, 26: begin v1 = 1; v2 = 1; v3 = 1; end
      27, 28, 29, 30: begin v1 = 1; v2 = 1; v3 = 2; end
      31, 32:         begin v1 = 1; v2 = 2; v3 = 3; end
      33:             begin v1 = 2; v2 = 2; v3 = 3; end
      34:             begin v1 = 2; v2 = 2; v3 = 4; end
      35, 36:         begin v1 = 2; v2 = 3; v3 = 4; end
      37:             begin v1 = 3; v2 = 3; v3 = 5; end
      38, 39:         begin v1 = 3; v2 = 4; v3 = 6; end
      40:             begin v1 = 4; v2 = 5; v3 = 7; end
      41:             begin v1 = 4; v2 = 5; v3 = 8; end
      42:             begin v1 = 4; v2 = 6; v3 = 9; end
      43:             begin v1 = 5; v2 = 7; v3 = 10; end
      44:             begin v1 = 6; v2 = 8; v3 = 11; end
      45:             begin v1 = 6; v2 = 8; v3 = 13; end
      46:             begin v1 = 7; v2 = 10; v3 = 14; end
      47:             begin v1 = 8; v2 = 11; v3 = 16; end
      48:             begin v1 = 9; v2 = 12; v3 = 18; end
      49:             begin v1 = 10; v2 = 13; v3 = 20; end
      50:             begin v1 = 11; v2 = 15; v3 = 23; end
      51:             begin v1 = 13; v2 = 17; v3 = 25; end
      default:        begin v1 = 0; v2 = 0; v3 = 0; end
    endcase
    case (bs)
      1: return v1;
      2: return v2;
      default: return v3;
    endcase
  endfunction

  // Rows of MBs in flight (K): limited by the PEs (16/3 PEs per row), by
  // the picture height, and by the picture width (a new row may start only
  // 5 time units after the row above, and the row above of the next stripe
  // is MB_W*6 time units ahead).
  function automatic int unsigned rows_in_flight(input int unsigned mb_w,
                                                 input int unsigned mb_h,
                                                 input int unsigned n_pe);
    int unsigned k;
    k = (3 * n_pe) / 16;
    if (k > mb_h) k = mb_h;
    if (k > (6 * mb_w) / 5) k = (6 * mb_w) / 5;
    if (k < 1) k = 1;
    return k;
  endfunction

endpackage
