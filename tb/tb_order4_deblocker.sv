// tb_order4_deblocker -- end-to-end test of the deblocking stage on a
// 64x112 picture (4x7 MBs) with 16 PEs: three MB rows in flight, three
// overlapped stripes, the last one with a single row.  Two pictures are
// loaded through the host ports (random content with smooth areas and
// steps, random bS 0..4 and QP), deblocked, read back and compared sample
// by sample with the reference model deblocking in the standard H.264
// order.  Also checked: the time units against the stripe model
// 6*MB_W*ceil(MB_H/K) + 5*(rows in last stripe - 1) + 2, the peak number
// of busy PEs (ceil(16K/3)), and that every mechanism happened: MB
// overlap in a row, stripe overlap, idle row slots in the last stripe,
// normal and strong filtering.
module tb_order4_deblocker;
  import deblock_pkg::*;
  import deblock_ref_pkg::*;

  localparam int MB_W = 4, MB_H = 7, N_PE = 16, K = 3;
  localparam int PW = 16 * MB_W, PH = 16 * MB_H;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              busy, done;
  logic [19:0]       time_units;
  logic signed [4:0] off_a = 0, off_b = 0;
  logic              host_we = 0, host_bs_we = 0, host_qp_we = 0;
  logic [11:0]       host_y = 0, host_x = 0, host_ry = 0, host_rx = 0;
  pix_t              host_wdata = 0, host_rdata;
  mbc_t              host_bs_row = 0, host_bs_col = 0, host_qp_row = 0, host_qp_col = 0;
  bid_t              host_bs_bid = 0;
  logic [2:0]        host_bs_data = 0;
  logic [5:0]        host_qp_data = 0;
  logic [9:0]        n_issued;
  logic              stripe_overlap, mb_overlap, idle_slot;

  order4_deblocker #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stripe = 0, n_mbov = 0, n_idle = 0, peak = 0, n_filtered = 0;
  int first_t, last_t, tcount;

  always @(posedge clk) begin
    if (busy) begin
      if (n_issued != 0) begin
        if (first_t < 0) first_t = tcount;
        last_t = tcount;
      end
      if (int'(n_issued) > peak) peak = int'(n_issued);
      if (stripe_overlap) n_stripe++;
      if (mb_overlap) n_mbov++;
      if (idle_slot) n_idle++;
      tcount++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_picture(input int oa, input int ob, input int bs_max);
    byte unsigned pic[], bsv[], qp[];
    int exp_t, bad;
    pic = new[PW * PH];
    bsv = new[MB_W * MB_H * 32];
    qp  = new[MB_W * MB_H];
    make_picture(pic, MB_W, MB_H);
    foreach (bsv[i]) bsv[i] = byte'($urandom_range(0, bs_max));
    foreach (qp[i])  qp[i]  = byte'($urandom_range(26, 48));
    // load through the host ports
    for (int i = 0; i < PW * PH; i++) begin
      @(negedge clk);
      host_we = 1; host_y = 12'(i / PW); host_x = 12'(i % PW); host_wdata = pic[i];
    end
    @(negedge clk) host_we = 0;
    for (int i = 0; i < MB_W * MB_H * 32; i++) begin
      @(negedge clk);
      host_bs_we = 1; host_bs_row = 8'((i / 32) / MB_W); host_bs_col = 8'((i / 32) % MB_W);
      host_bs_bid = 5'(i % 32); host_bs_data = 3'(bsv[i]);
    end
    @(negedge clk) host_bs_we = 0;
    for (int i = 0; i < MB_W * MB_H; i++) begin
      @(negedge clk);
      host_qp_we = 1; host_qp_row = 8'(i / MB_W); host_qp_col = 8'(i % MB_W); host_qp_data = 6'(qp[i]);
    end
    @(negedge clk) host_qp_we = 0;
    off_a = 5'(oa); off_b = 5'(ob);
    // reference
    n_filtered += deblock_picture(pic, MB_W, MB_H, bsv, qp, oa, ob);
    // run
    first_t = -1; last_t = -1; tcount = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    exp_t = 6 * MB_W * ((MB_H + K - 1) / K) + 5 * (((MB_H % K) == 0 ? K : MB_H % K) - 1) + 2;
    checks++;
    if (int'(time_units) != exp_t || last_t - first_t + 1 != exp_t) begin
      failures++;
      $display("time units %0d (counted %0d), expected %0d", time_units, last_t - first_t + 1, exp_t);
    end
    bad = 0;
    for (int i = 0; i < PW * PH; i++) begin
      host_ry = 12'(i / PW); host_rx = 12'(i % PW);
      #1;
      checks++;
      if (host_rdata != pic[i]) begin
        failures++;
        bad++;
        if (bad < 8) $display("sample y=%0d x=%0d got %0d expected %0d", i / PW, i % PW, host_rdata, pic[i]);
      end
    end
    $display("picture done: %0d time units, %0d mismatching samples", time_units, bad);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_picture(0, 0, 4);
    run_picture(4, -3, 2);
    checks += 6;
    if (peak != (16 * K + 2) / 3) begin failures++; $display("peak PEs %0d", peak); end
    if (n_stripe == 0) begin failures++; $display("no stripe overlap"); end
    if (n_mbov == 0) begin failures++; $display("no MB overlap"); end
    if (n_idle == 0) begin failures++; $display("no idle slot"); end
    if (n_filtered == 0) begin failures++; $display("nothing filtered"); end
    if (busy) failures++;
    $display("events: mb overlap %0d, stripe overlap %0d, idle slot %0d, peak PEs %0d, filtered lines %0d",
             n_mbov, n_stripe, n_idle, peak, n_filtered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
