// tb_order4_deblocker_full -- one 1920x1088 picture (120x68 MBs, the coded
// size of 1080p) through the deblocking stage at its default size, 363
// PEs: all 68 MB rows in flight in one stripe.  The picture, bS and QP
// tables are preloaded straight into the internal buffer's arrays (loading
// two million samples one per clock would only lengthen the run) and the
// result is read back the same way and compared with the reference model
// deblocking in the standard order.  Checked besides: the number of time
// units, 6*120 + 5*67 + 2 = 1057, and a peak of ceil(16*68/3) = 363 busy
// PEs.
module tb_order4_deblocker_full;
  import deblock_pkg::*;
  import deblock_ref_pkg::*;

  localparam int MB_W = 120, MB_H = 68, K = 68;
  localparam int PW = 16 * MB_W, PH = 16 * MB_H;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              busy, done;
  logic [19:0]       time_units;
  logic signed [4:0] off_a = 5'sd2, off_b = 5'sd1;
  logic              host_we = 0, host_bs_we = 0, host_qp_we = 0;
  logic [11:0]       host_y = 0, host_x = 0, host_ry = 0, host_rx = 0;
  pix_t              host_wdata = 0, host_rdata;
  mbc_t              host_bs_row = 0, host_bs_col = 0, host_qp_row = 0, host_qp_col = 0;
  bid_t              host_bs_bid = 0;
  logic [2:0]        host_bs_data = 0;
  logic [5:0]        host_qp_data = 0;
  logic [9:0]        n_issued;
  logic              stripe_overlap, mb_overlap, idle_slot;

  order4_deblocker dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, peak = 0, n_mbov = 0;

  always @(posedge clk) begin
    if (busy && int'(n_issued) > peak) peak = int'(n_issued);
    if (busy && mb_overlap) n_mbov++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned pic[], bsv[], qp[];
    int bad, nf, exp_t;
    pic = new[PW * PH];
    bsv = new[MB_W * MB_H * 32];
    qp  = new[MB_W * MB_H];
    make_picture(pic, MB_W, MB_H);
    foreach (bsv[i]) bsv[i] = byte'($urandom_range(0, 4));
    foreach (qp[i])  qp[i]  = byte'($urandom_range(26, 48));
    foreach (pic[i]) dut.u_buf.pix[i] = pic[i];
    foreach (bsv[i]) dut.u_buf.bsm[i] = 3'(bsv[i]);
    foreach (qp[i])  dut.u_buf.qpm[i] = 6'(qp[i]);
    nf = deblock_picture(pic, MB_W, MB_H, bsv, qp, 2, 1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    exp_t = 6 * MB_W + 5 * (MB_H - 1) + 2;
    checks++;
    if (int'(time_units) != exp_t) begin
      failures++;
      $display("time units %0d, expected %0d", time_units, exp_t);
    end
    checks++;
    if (peak != (16 * K + 2) / 3) begin
      failures++;
      $display("peak PEs %0d, expected %0d", peak, (16 * K + 2) / 3);
    end
    checks++;
    if (n_mbov == 0) failures++;
    bad = 0;
    foreach (pic[i]) begin
      checks++;
      if (dut.u_buf.pix[i] != pic[i]) begin
        bad++;
        failures++;
        if (bad < 8) $display("sample y=%0d x=%0d got %0d expected %0d", i / PW, i % PW, dut.u_buf.pix[i], pic[i]);
      end
    end
    $display("1920x1088: %0d time units, peak %0d PEs, %0d lines filtered, %0d mismatches",
             time_units, peak, nf, bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
