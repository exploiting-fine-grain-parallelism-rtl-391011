// edge_filter_pe -- one processing element (PE): deblocks one
// four-pixel-long luma boundary per time unit.
//
// The PE is the unit of parallelism of the Order4 engine: any number of
// them work side by side, each on a different boundary, and one of them
// finishes one boundary (four lines of p3..p0 | q0..q3) in one time unit.
// Here a time unit is one clock cycle and the PE is purely combinational:
// the window is read from the internal buffer, filtered, and written back
// at the next clock edge by the buffer.
//
// Filtering follows the H.264 luma edge filter: the boundary strength bS
// (0..4) selects no filtering, the normal filter (bS 1..3, clipped by tC)
// or the strong filter (bS 4); alpha and beta come from the average QP of
// the two MBs plus the slice offsets FilterOffsetA/B.  The per-line
// decision (filterSamplesFlag) is made on the unfiltered window.
//
// Interface:
//   win_in   4 lines x 8 taps (p3 p2 p1 p0 q0 q1 q2 q3), 8-bit samples
//   bs       boundary strength of this boundary, 0..4
//   qp_p/q   luma QP of the MBs holding the p and q samples
//   off_a/b  FilterOffsetA / FilterOffsetB (-12..12)
//   win_out  filtered window (p3 and q3 are never changed)
// Timing: combinational, no state.
//
// The PE as a unit (one four-pixel-long boundary per time unit) follows the
// Order4 method; the filter arithmetic is the H.264 standard's; making it
// combinational so that a time unit is a single clock is this design's
// choice.
module edge_filter_pe
  import deblock_pkg::*;
(
  input  win_t             win_in,
  input  logic [2:0]       bs,
  input  logic [5:0]       qp_p,
  input  logic [5:0]       qp_q,
  input  logic signed [4:0] off_a,
  input  logic signed [4:0] off_b,
  output win_t             win_out
);

  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  logic [6:0] qpav;
  logic [5:0] idx_a, idx_b;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;

  always_comb begin
    qpav  = 7'((7'(qp_p) + 7'(qp_q) + 7'd1) >> 1);
    idx_a = 6'(clip3(0, 51, int'(qpav) + int'(off_a)));
    idx_b = 6'(clip3(0, 51, int'(qpav) + int'(off_b)));
    alpha = 8'(alpha_of(int'(idx_a)));
    beta  = 5'(beta_of(int'(idx_b)));
    tc0   = 5'(tc0_of(int'(idx_a), int'(bs)));
  end

  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3;
    int ap, aq, tc, delta, d1;
    logic filt;
    win_out = win_in;
    for (int ln = 0; ln < 4; ln++) begin
      p3 = int'(win_in[ln][0]); p2 = int'(win_in[ln][1]);
      p1 = int'(win_in[ln][2]); p0 = int'(win_in[ln][3]);
      q0 = int'(win_in[ln][4]); q1 = int'(win_in[ln][5]);
      q2 = int'(win_in[ln][6]); q3 = int'(win_in[ln][7]);
      tc = 0; delta = 0; d1 = 0;
      ap = iabs(p2 - p0);
      aq = iabs(q2 - q0);
      filt = (bs != 3'd0) && (iabs(p0 - q0) < int'(alpha)) &&
             (iabs(p1 - p0) < int'(beta)) && (iabs(q1 - q0) < int'(beta));
      if (filt && bs < 3'd4) begin
        // normal filter
        tc    = int'(tc0) + ((ap < int'(beta)) ? 1 : 0) + ((aq < int'(beta)) ? 1 : 0);
        delta = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3);
        win_out[ln][3] = pix_t'(clip3(0, 255, p0 + delta));
        win_out[ln][4] = pix_t'(clip3(0, 255, q0 - delta));
        if (ap < int'(beta)) begin
          d1 = clip3(-int'(tc0), int'(tc0), (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1);
          win_out[ln][2] = pix_t'(p1 + d1);
        end
        if (aq < int'(beta)) begin
          d1 = clip3(-int'(tc0), int'(tc0), (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1);
          win_out[ln][5] = pix_t'(q1 + d1);
        end
      end else if (filt) begin
        // strong filter (bS = 4)
        if (ap < int'(beta) && iabs(p0 - q0) < ((int'(alpha) >>> 2) + 2)) begin
          win_out[ln][3] = pix_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          win_out[ln][2] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          win_out[ln][1] = pix_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          win_out[ln][3] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        end
        if (aq < int'(beta) && iabs(p0 - q0) < ((int'(alpha) >>> 2) + 2)) begin
          win_out[ln][4] = pix_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          win_out[ln][5] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          win_out[ln][6] = pix_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          win_out[ln][4] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
  end

endmodule
