// order4_deblocker -- H.264 luma deblocking stage that exploits parallelism
// at the granularity of four-pixel-long boundaries (the "Order4" order).
//
// The standard filters a picture MB by MB, and inside an MB edge by edge.
// Here each MB is cut into its 32 four-pixel-long boundaries, and each
// boundary is deblocked as soon as the boundaries it depends on are done:
// an MB takes 8 time units, the next MB of a row starts 6 time units
// later and the next MB row 5 time units later, so ceil(16K/3) PEs keep K
// MB rows in flight.  When the picture has more MB rows than the PEs can
// keep in flight it is cut into stripes of K rows, and each stripe starts
// while the previous one is still finishing.  The result is bit-identical
// to filtering in the standard order.
//
// Blocks: order4_scheduler (which boundary runs on which PE in each time
// unit), N_PE edge_filter_pe (one boundary each per time unit) and
// frame_buffer (the internal buffer holding the picture, bS and QP, which
// every PE reads and writes each time unit).
//
// Use: load the picture, the bS of every boundary and the QP of every MB
// through the host ports, pulse start, wait for done (time_units then
// holds the time units used, one per clock), and read the picture back.
// The event outputs pulse in cycles where the scheduler overlaps two MBs
// of a row, overlaps two stripes, or leaves a row slot idle.
//
// Luma only; the whole picture is held in the buffer, and bS and QP are
// supplied by the host, not derived here.  These, the host ports and the
// one-clock time unit are this design's choices; the scheduling scheme,
// the PE count for 1080p and the timing model follow the Order4 method.
module order4_deblocker
  import deblock_pkg::*;
#(
  parameter int unsigned MB_W = 120,
  parameter int unsigned MB_H = 68,
  parameter int unsigned N_PE = 363
) (
  input  logic              clk,
  input  logic              rst_n,
  // frame control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [19:0]       time_units,
  input  logic signed [4:0] off_a,
  input  logic signed [4:0] off_b,
  // host access to the internal buffer
  input  logic              host_we,
  input  logic [11:0]       host_y,
  input  logic [11:0]       host_x,
  input  pix_t              host_wdata,
  input  logic [11:0]       host_ry,
  input  logic [11:0]       host_rx,
  output pix_t              host_rdata,
  input  logic              host_bs_we,
  input  mbc_t              host_bs_row,
  input  mbc_t              host_bs_col,
  input  bid_t              host_bs_bid,
  input  logic [2:0]        host_bs_data,
  input  logic              host_qp_we,
  input  mbc_t              host_qp_row,
  input  mbc_t              host_qp_col,
  input  logic [5:0]        host_qp_data,
  // activity
  output logic [9:0]        n_issued,
  output logic              stripe_overlap,
  output logic              mb_overlap,
  output logic              idle_slot
);

  bnd_op_t    pe_op   [N_PE];
  win_t       pe_win  [N_PE];
  win_t       pe_wb   [N_PE];
  logic [2:0] pe_bs   [N_PE];
  logic [5:0] pe_qp_p [N_PE];
  logic [5:0] pe_qp_q [N_PE];

  order4_scheduler #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) u_sched (
    .clk, .rst_n, .start, .busy, .done, .time_units,
    .pe_op, .n_issued, .stripe_overlap, .mb_overlap, .idle_slot
  );

  frame_buffer #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) u_buf (
    .clk,
    .host_we, .host_y, .host_x, .host_wdata, .host_ry, .host_rx, .host_rdata,
    .host_bs_we, .host_bs_row, .host_bs_col, .host_bs_bid, .host_bs_data,
    .host_qp_we, .host_qp_row, .host_qp_col, .host_qp_data,
    .pe_op, .pe_win, .pe_bs, .pe_qp_p, .pe_qp_q, .pe_wb
  );

  for (genvar p = 0; p < int'(N_PE); p++) begin : g_pe
    edge_filter_pe u_pe (
      .win_in (pe_win[p]),
      .bs     (pe_bs[p]),
      .qp_p   (pe_qp_p[p]),
      .qp_q   (pe_qp_q[p]),
      .off_a,
      .off_b,
      .win_out(pe_wb[p])
    );
  end

endmodule
