// frame_buffer -- the internal buffer between the earlier decoding stages
// and the deblocking PEs.
//
// It holds the decoded luma samples of the picture (MB_W*16 x MB_H*16,
// 8 bits each), the boundary strength of every four-pixel-long boundary
// and the QP of every MB, and it keeps the intermediate results of
// deblocking: every PE reads its 4x8 sample window from here at the start
// of a time unit and its filtered samples are written back at the end of
// it.  No two boundaries issued in the same time unit write the same
// sample (the Order4 stages guarantee it), so all PE write ports can be
// applied in the same cycle.
//
// Boundaries on the picture edge are presented to their PE with bS = 0 and
// are never written back.  Out-of-picture window taps read a clamped
// address and are not used.
//
// Interface:
//   host_*    write one sample / one bS / one QP per cycle; host_rdata is
//             an asynchronous read of sample (host_ry, host_rx)
//   pe_op     boundary of each PE in this cycle (from the scheduler)
//   pe_win    its unfiltered window, pe_bs / pe_qp_p / pe_qp_q its filter
//             controls (combinational from pe_op)
//   pe_wb     filtered window from each PE, written at the clock edge
// Host writes and PE write-backs should not target the same sample in one
// cycle; the PE write-back then wins.
//
// The Order4 method places an internal buffer between the earlier decoding
// stages and the deblocking PEs and keeps the intermediate results in it.
// Holding the whole luma picture, the port structure (one window read and
// one window write per PE per cycle) and the host ports are this design's
// choices; the method's forwarding of intermediate results directly
// between PEs is not modelled.
module frame_buffer
  import deblock_pkg::*;
#(
  parameter int unsigned MB_W = 120,
  parameter int unsigned MB_H = 68,
  parameter int unsigned N_PE = 363
) (
  input  logic        clk,
  // host side: the previous decoding stage loads, the next stage reads
  input  logic        host_we,
  input  logic [11:0] host_y,
  input  logic [11:0] host_x,
  input  pix_t        host_wdata,
  input  logic [11:0] host_ry,
  input  logic [11:0] host_rx,
  output pix_t        host_rdata,
  input  logic        host_bs_we,
  input  mbc_t        host_bs_row,
  input  mbc_t        host_bs_col,
  input  bid_t        host_bs_bid,
  input  logic [2:0]  host_bs_data,
  input  logic        host_qp_we,
  input  mbc_t        host_qp_row,
  input  mbc_t        host_qp_col,
  input  logic [5:0]  host_qp_data,
  // PE side
  input  bnd_op_t     pe_op   [N_PE],
  output win_t        pe_win  [N_PE],
  output logic [2:0]  pe_bs   [N_PE],
  output logic [5:0]  pe_qp_p [N_PE],
  output logic [5:0]  pe_qp_q [N_PE],
  input  win_t        pe_wb   [N_PE]
);

  localparam int unsigned PW  = MB_W * 16;
  localparam int unsigned PH  = MB_H * 16;
  localparam int unsigned NMB = MB_W * MB_H;

  pix_t       pix  [PW * PH];
  logic [2:0] bsm  [NMB * NUM_BND];
  logic [5:0] qpm  [NMB];

  function automatic int unsigned addr_of(input int y, input int x);
    int yc, xc;
    yc = (y < 0) ? 0 : ((y >= int'(PH)) ? int'(PH) - 1 : y);
    xc = (x < 0) ? 0 : ((x >= int'(PW)) ? int'(PW) - 1 : x);
    return unsigned'(yc) * PW + unsigned'(xc);
  endfunction

  function automatic int unsigned mb_of(input mbc_t r, input mbc_t c);
    return int'(r) * MB_W + int'(c);
  endfunction

  assign host_rdata = pix[addr_of(int'(host_ry), int'(host_rx))];

  // read side of every PE
  always_comb begin
    bnd_op_t op;
    int unsigned mb_q, mb_p;
    for (int p = 0; p < int'(N_PE); p++) begin
      op = pe_op[p];
      for (int ln = 0; ln < 4; ln++)
        for (int tp = 0; tp < 8; tp++)
          pe_win[p][ln][tp] = pix[addr_of(pix_y(op, ln, tp), pix_x(op, ln, tp))];
      mb_q = mb_of(op.mb_row, op.mb_col);
      mb_p = mb_q;
      if (p_in_neighbour(op) && !on_picture_edge(op))
        mb_p = (op.bid < 5'd4) ? mb_q - 1 : mb_q - MB_W;
      if (mb_q >= NMB) mb_q = 0;
      if (mb_p >= NMB) mb_p = 0;
      pe_bs[p]   = (op.valid && !on_picture_edge(op)) ? bsm[mb_q * NUM_BND + int'(op.bid)] : 3'd0;
      pe_qp_q[p] = qpm[mb_q];
      pe_qp_p[p] = qpm[mb_p];
    end
  end

  always_ff @(posedge clk) begin
    if (host_we)
      pix[addr_of(int'(host_y), int'(host_x))] <= host_wdata;
    if (host_bs_we)
      bsm[mb_of(host_bs_row, host_bs_col) * NUM_BND + int'(host_bs_bid)] <= host_bs_data;
    if (host_qp_we)
      qpm[mb_of(host_qp_row, host_qp_col)] <= host_qp_data;
    for (int p = 0; p < int'(N_PE); p++) begin
      if (pe_op[p].valid && !on_picture_edge(pe_op[p])) begin
        for (int ln = 0; ln < 4; ln++)
          for (int tp = 1; tp < 7; tp++)
            pix[addr_of(pix_y(pe_op[p], ln, tp), pix_x(pe_op[p], ln, tp))] <= pe_wb[p][ln][tp];
      end
    end
  end

endmodule
