// order4_scheduler -- issues the four-pixel-long boundaries of a frame in
// the Order4 order and packs them onto the PEs.
//
// How it works.  K MB rows are in flight at once (K = rows_in_flight():
// floor(3*N_PE/16), at most the picture height and 6/5 of its width).  Each
// of the K "row slots" walks its MB row one MB every 6 time units; slot j
// starts 5 time units after slot j-1.  Inside an MB, boundary bid is issued
// STAGE(bid) time units after the MB started (deblock_pkg), so at any
// phase 0..5 a slot issues the boundaries of the current MB at that stage
// and of the previous MB at stage phase+6 -- at most 6 per slot.  When a
// slot reaches the end of its MB row it carries straight on with MB row
// j+K, j+2K, ... (the next stripe): the last two stages of one row overlap
// the first two of the next, exactly as two MBs of one row overlap, so
// stripes follow each other without wind-down/wind-up gaps.  Slots whose
// row would fall below the picture in the last stripe stay idle.
//
// The slot issues of one time unit are packed onto PEs 0.. in slot order
// (a prefix sum of the slot counts).  With slot phases staggered by 5,
// any three adjoining slots issue 16 boundaries per time unit, so K slots
// never need more than ceil(16K/3) <= N_PE PEs.
//
// Timing.  start (one cycle, while idle) begins a frame; the first
// boundaries are issued in the next cycle.  Every cycle while busy is one
// time unit: pe_op[] holds the boundary each PE works on in that cycle.
// done pulses for one cycle after the last time unit, with time_units = the
// number of time units used:
//   6*MB_W*ceil(MB_H/K) + 5*(((MB_H-1) mod K)) + 2.
// Event outputs (one per cycle) expose the mechanisms: stripe_overlap (a
// slot finishes one MB row while starting its next-stripe row), mb_overlap
// (a slot works on two MBs of one row), idle_slot (a started slot has no
// row left while others still work).
//
// The MB period of 6, the row delay of 5, the 16/3 PEs per row, the stripes
// of K rows and their overlap follow the Order4 method.  The per-boundary
// stage table, the row-slot structure, the packing order and the floor in
// the width bound of K are this design's own.
module order4_scheduler
  import deblock_pkg::*;
#(
  parameter int unsigned MB_W = 120,
  parameter int unsigned MB_H = 68,
  parameter int unsigned N_PE = 363
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [19:0]         time_units,
  output bnd_op_t             pe_op [N_PE],
  output logic [9:0]          n_issued,
  output logic                stripe_overlap,
  output logic                mb_overlap,
  output logic                idle_slot
);

  localparam int unsigned K = rows_in_flight(MB_W, MB_H, N_PE);

  typedef struct packed {
    logic valid;
    mbc_t row;
    mbc_t col;
  } mb_pos_t;

  typedef struct packed {
    logic [2:0] phase;
    mb_pos_t    cur;
    mb_pos_t    prev;
  } slot_t;

  slot_t       slot [K];
  logic [19:0] t;
  logic        slot_en   [K];
  logic        slot_busy [K];
  logic        any_busy;
  logic        all_started;

  function automatic mb_pos_t next_mb(input mb_pos_t m);
    mb_pos_t n;
    n = m;
    if (m.valid) begin
      if (int'(m.col) == int'(MB_W) - 1) begin
        n.col   = '0;
        n.row   = mbc_t'(int'(m.row) + int'(K));
        n.valid = (int'(m.row) + int'(K)) < int'(MB_H);
      end else begin
        n.col = m.col + 1'b1;
      end
    end
    return n;
  endfunction

  // slot j runs once the frame time reaches 5*j
  always_comb begin
    any_busy = 1'b0;
    for (int j = 0; j < int'(K); j++) begin
      slot_en[j]   = busy && (int'(t) >= int'(T_DR) * j);
      slot_busy[j] = slot[j].cur.valid || (slot[j].prev.valid && slot[j].phase < 3'd2);
      if (slot_en[j] && slot_busy[j]) any_busy = 1'b1;
    end
    all_started = int'(t) >= int'(T_DR) * (int'(K) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      t          <= '0;
      time_units <= '0;
      for (int j = 0; j < int'(K); j++) slot[j] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= '0;
          for (int j = 0; j < int'(K); j++) begin
            slot[j].phase     <= '0;
            slot[j].cur.valid <= j < int'(MB_H);
            slot[j].cur.row   <= mbc_t'(j);
            slot[j].cur.col   <= '0;
            slot[j].prev      <= '0;
          end
        end
      end else if (all_started && !any_busy) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        time_units <= t;
      end else begin
        t <= t + 1'b1;
        for (int j = 0; j < int'(K); j++) begin
          if (slot_en[j]) begin
            if (slot[j].phase == 3'd5) begin
              slot[j].phase <= '0;
              slot[j].prev  <= slot[j].cur;
              slot[j].cur   <= next_mb(slot[j].cur);
            end else begin
              slot[j].phase <= slot[j].phase + 1'b1;
            end
          end
        end
      end
    end
  end

  // issue and pack onto PEs
  always_comb begin
    int unsigned idx;
    lane_t       ln;
    mb_pos_t     m;
    logic        use_cur, use_prev;
    idx            = 0;
    ln             = '0;
    m              = '0;
    stripe_overlap = 1'b0;
    mb_overlap     = 1'b0;
    idle_slot      = 1'b0;
    for (int p = 0; p < int'(N_PE); p++) pe_op[p] = '0;
    for (int j = 0; j < int'(K); j++) begin
      use_cur  = 1'b0;
      use_prev = 1'b0;
      if (slot_en[j] && !(all_started && !any_busy)) begin
        for (int l = 0; l < int'(LANES); l++) begin
          ln = LANE_TAB[slot[j].phase][l];
          m  = ln.use_prev ? slot[j].prev : slot[j].cur;
          if (ln.valid && m.valid && (!ln.use_prev || slot[j].phase < 3'd2)) begin
            if (ln.use_prev) use_prev = 1'b1; else use_cur = 1'b1;
            if (idx < N_PE) begin
              pe_op[idx].valid  = 1'b1;
              pe_op[idx].mb_row = m.row;
              pe_op[idx].mb_col = m.col;
              pe_op[idx].bid    = ln.bid;
            end
            idx++;
          end
        end
        if (use_cur && use_prev) begin
          if (slot[j].cur.row != slot[j].prev.row) stripe_overlap = 1'b1;
          else                                     mb_overlap     = 1'b1;
        end
        if (!slot_busy[j] && any_busy) idle_slot = 1'b1;
      end
    end
    n_issued = 10'(idx);
  end

  // K rows never need more than N_PE PEs in one time unit
  a_pe_capacity: assert property (@(posedge clk) disable iff (!rst_n) n_issued <= 10'(N_PE));

endmodule
