// tb_order4_scheduler -- runs the scheduler at three sizes (see
// tb_sched_harness for the checks): 3x7 MBs on 16 PEs (3 rows in flight,
// three stripes, the last with one row and two idle slots), 4x5 MBs on 11
// PEs (2 rows in flight) and 2x6 MBs on 100 PEs (the picture width limits
// the rows in flight to 2).
module tb_order4_scheduler;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic fin [3];
  int   chk [3], fl [3], so [3], mo [3], id [3];
  int   checks, failures;

  always #5 clk = ~clk;

  tb_sched_harness #(.MB_W(3), .MB_H(7), .N_PE(16),  .R_P(3)) h0 (
    .clk, .rst_n, .go, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]),
    .n_stripe_overlap(so[0]), .n_mb_overlap(mo[0]), .n_idle_slot(id[0]));
  tb_sched_harness #(.MB_W(4), .MB_H(5), .N_PE(11),  .R_P(2)) h1 (
    .clk, .rst_n, .go, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]),
    .n_stripe_overlap(so[1]), .n_mb_overlap(mo[1]), .n_idle_slot(id[1]));
  tb_sched_harness #(.MB_W(2), .MB_H(6), .N_PE(100), .R_P(2)) h2 (
    .clk, .rst_n, .go, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]),
    .n_stripe_overlap(so[2]), .n_mb_overlap(mo[2]), .n_idle_slot(id[2]));

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    go = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = chk[0] + chk[1] + chk[2];
    failures = fl[0] + fl[1] + fl[2];
    // every mechanism must have happened
    checks += 3;
    if (so[0] == 0 || so[1] == 0) failures++;
    if (mo[0] == 0 || mo[1] == 0 || mo[2] == 0) failures++;
    if (id[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
