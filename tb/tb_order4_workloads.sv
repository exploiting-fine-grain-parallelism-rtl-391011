// tb_order4_workloads -- the two other configurations the design is judged
// on, each deblocking one whole picture:
//  * a vertical 1088x1920 picture (68x120 MBs) with 438 PEs: the picture
//    width limits the rows in flight to floor(6*68/5) = 81, two stripes,
//    6*68*2 + 5*(39-1) + 2 = 1008 time units, peak ceil(16*81/3) = 432 PEs;
//  * a 1920x1088 picture (120x68 MBs) with only 70 PEs: 13 rows in flight,
//    six stripes, the last with 3 rows, 6*120*6 + 5*2 + 2 = 4332 time
//    units, peak 70 PEs.
module tb_order4_workloads;
  logic clk = 1'b0, go = 1'b0;
  logic fin [2];
  int   chk [2], fl [2];

  always #5 clk = ~clk;

  tb_workload_run #(.MB_W(68),  .MB_H(120), .N_PE(438), .EXP_T(1008), .EXP_P(432)) vert (
    .clk, .go, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  tb_workload_run #(.MB_W(120), .MB_H(68),  .N_PE(70),  .EXP_T(4332), .EXP_P(70)) few_pe (
    .clk, .go, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    go = 1'b1;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1]);
    $finish;
  end
endmodule
