// tb_sched_harness -- drives one order4_scheduler through one frame and
// checks it:
//  * every boundary of every MB is issued exactly once, on some PE;
//  * replaying the boundaries in the standard H.264 order against the time
//    units they were issued in, no boundary reads or overwrites a sample
//    before the boundaries that precede it in the standard order have
//    written it, and none overwrites a sample an earlier boundary still has
//    to read (the sample footprints are worked out here, not taken from the
//    design);
//  * the number of time units equals the stripe model
//    T = T_MB*MB_W*ceil(MB_H/R_P) + T_dr*(rows in last stripe - 1) + gamma
//    with T_MB = 6, T_dr = 5, gamma = 2, R_P = rows in flight;
//  * the peak number of busy PEs is ceil(16*R_P/3).
// It also counts the scheduler's event outputs.
module tb_sched_harness #(
  parameter int unsigned MB_W = 3,
  parameter int unsigned MB_H = 7,
  parameter int unsigned N_PE = 16,
  parameter int          R_P  = 3     // rows in flight expected
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_stripe_overlap,
  output int   n_mb_overlap,
  output int   n_idle_slot
);
  import deblock_pkg::*;

  localparam int PW = 16 * MB_W;
  localparam int PH = 16 * MB_H;

  logic        start, busy, done;
  logic [19:0] time_units;
  bnd_op_t     pe_op [N_PE];
  logic [9:0]  n_issued;
  logic        stripe_overlap, mb_overlap, idle_slot;

  order4_scheduler #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) dut (.*);

  int issue_t [MB_H][MB_W][32];
  int tnow, peak, first_t, last_t;

  always @(posedge clk) begin
    if (busy) begin
      for (int p = 0; p < int'(N_PE); p++) begin
        if (pe_op[p].valid) begin
          if (int'(pe_op[p].mb_row) >= int'(MB_H) || int'(pe_op[p].mb_col) >= int'(MB_W)) begin
            failures++;
            $display("op outside the picture");
          end else if (issue_t[pe_op[p].mb_row][pe_op[p].mb_col][pe_op[p].bid] != -1) begin
            failures++;
            $display("boundary issued twice r=%0d c=%0d b=%0d", pe_op[p].mb_row, pe_op[p].mb_col, pe_op[p].bid);
          end else
            issue_t[pe_op[p].mb_row][pe_op[p].mb_col][pe_op[p].bid] = tnow;
          if (first_t < 0) first_t = tnow;
          last_t = tnow;
        end
      end
      if (int'(n_issued) > peak) peak = int'(n_issued);
      if (stripe_overlap) n_stripe_overlap++;
      if (mb_overlap) n_mb_overlap++;
      if (idle_slot) n_idle_slot++;
      tnow++;
    end
  end

  initial begin
    int last_w[], max_r[];
    int t, y0, x0, ya, yb, xa, xb, wya, wyb, wxa, wxb, bad, stripes, last_rows, exp_t;
    checks = 0; failures = 0; finished = 0; start = 0;
    n_stripe_overlap = 0; n_mb_overlap = 0; n_idle_slot = 0;
    tnow = 0; peak = 0; first_t = -1; last_t = -1;
    foreach (issue_t[r, c, b]) issue_t[r][c][b] = -1;
    wait (go);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    // all issued once
    foreach (issue_t[r, c, b]) begin
      checks++;
      if (issue_t[r][c][b] < 0) begin
        failures++;
        $display("boundary never issued r=%0d c=%0d b=%0d", r, c, b);
      end
    end
    // dependency replay in the standard order
    last_w = new[PW * PH];
    max_r  = new[PW * PH];
    foreach (last_w[i]) begin last_w[i] = -1; max_r[i] = -1; end
    bad = 0;
    for (int r = 0; r < int'(MB_H); r++)
      for (int c = 0; c < int'(MB_W); c++)
        for (int b = 0; b < 32; b++) begin
          t = issue_t[r][c][b];
          if (b < 16) begin
            x0 = 16 * c + 4 * (b / 4); y0 = 16 * r + 4 * (b % 4);
            if (x0 == 0) continue;
            ya = y0; yb = y0 + 3; xa = x0 - 4; xb = x0 + 3;
            wya = ya; wyb = yb; wxa = x0 - 3; wxb = x0 + 2;
          end else begin
            y0 = 16 * r + 4 * ((b - 16) / 4); x0 = 16 * c + 4 * ((b - 16) % 4);
            if (y0 == 0) continue;
            xa = x0; xb = x0 + 3; ya = y0 - 4; yb = y0 + 3;
            wxa = xa; wxb = xb; wya = y0 - 3; wyb = y0 + 2;
          end
          checks++;
          for (int y = ya; y <= yb; y++)
            for (int x = xa; x <= xb; x++)
              if (t <= last_w[y * PW + x]) bad++;
          for (int y = wya; y <= wyb; y++)
            for (int x = wxa; x <= wxb; x++)
              if (t < max_r[y * PW + x]) bad++;
          for (int y = ya; y <= yb; y++)
            for (int x = xa; x <= xb; x++)
              if (t > max_r[y * PW + x]) max_r[y * PW + x] = t;
          for (int y = wya; y <= wyb; y++)
            for (int x = wxa; x <= wxb; x++) last_w[y * PW + x] = t;
        end
    if (bad != 0) begin
      failures++;
      $display("dependency violations: %0d", bad);
    end
    // timing model
    stripes   = (int'(MB_H) + R_P - 1) / R_P;
    last_rows = (int'(MB_H) % R_P == 0) ? R_P : int'(MB_H) % R_P;
    exp_t     = 6 * int'(MB_W) * stripes + 5 * (last_rows - 1) + 2;
    checks++;
    if (int'(time_units) != exp_t || last_t - first_t + 1 != exp_t) begin
      failures++;
      $display("time units %0d (counted %0d), expected %0d", time_units, last_t - first_t + 1, exp_t);
    end
    checks++;
    if (peak != (16 * R_P + 2) / 3) begin
      failures++;
      $display("peak PEs %0d, expected %0d", peak, (16 * R_P + 2) / 3);
    end
    $display("scheduler %0dx%0d MBs, %0d PEs: %0d time units, peak %0d PEs, overlaps mb=%0d stripe=%0d, idle=%0d",
             MB_W, MB_H, N_PE, last_t - first_t + 1, peak, n_mb_overlap, n_stripe_overlap, n_idle_slot);
    finished = 1;
  end
endmodule
