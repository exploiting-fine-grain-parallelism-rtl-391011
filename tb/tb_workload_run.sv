// tb_workload_run -- deblocks one generated picture on an order4_deblocker
// of the given size, loaded and read back directly through the internal
// buffer's arrays, and checks it against the reference model (standard
// order), the expected number of time units and the peak PE count.
// Reports through its outputs; used by tb_order4_workloads.
module tb_workload_run #(
  parameter int unsigned MB_W  = 4,
  parameter int unsigned MB_H  = 4,
  parameter int unsigned N_PE  = 22,
  parameter int          EXP_T = 0,    // expected time units
  parameter int          EXP_P = 0     // expected peak busy PEs
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);
  import deblock_pkg::*;
  import deblock_ref_pkg::*;

  localparam int PW = 16 * MB_W, PH = 16 * MB_H;

  logic              rst_n = 1'b0, start = 1'b0;
  logic              busy, done;
  logic [19:0]       time_units;
  logic signed [4:0] off_a = 5'sd0, off_b = 5'sd0;
  logic              host_we = 0, host_bs_we = 0, host_qp_we = 0;
  logic [11:0]       host_y = 0, host_x = 0, host_ry = 0, host_rx = 0;
  pix_t              host_wdata = 0, host_rdata;
  mbc_t              host_bs_row = 0, host_bs_col = 0, host_qp_row = 0, host_qp_col = 0;
  bid_t              host_bs_bid = 0;
  logic [2:0]        host_bs_data = 0;
  logic [5:0]        host_qp_data = 0;
  logic [9:0]        n_issued;
  logic              stripe_overlap, mb_overlap, idle_slot;
  int                peak;

  order4_deblocker #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) dut (.*);

  always @(posedge clk) if (busy && int'(n_issued) > peak) peak = int'(n_issued);

  initial begin
    byte unsigned pic[], bsv[], qp[];
    int bad, nf;
    checks = 0; failures = 0; finished = 0; peak = 0;
    wait (go);
    pic = new[PW * PH];
    bsv = new[MB_W * MB_H * 32];
    qp  = new[MB_W * MB_H];
    make_picture(pic, MB_W, MB_H);
    foreach (bsv[i]) bsv[i] = byte'($urandom_range(0, 4));
    foreach (qp[i])  qp[i]  = byte'($urandom_range(26, 48));
    foreach (pic[i]) dut.u_buf.pix[i] = pic[i];
    foreach (bsv[i]) dut.u_buf.bsm[i] = 3'(bsv[i]);
    foreach (qp[i])  dut.u_buf.qpm[i] = 6'(qp[i]);
    nf = deblock_picture(pic, MB_W, MB_H, bsv, qp, 0, 0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    checks += 2;
    if (int'(time_units) != EXP_T) begin
      failures++;
      $display("time units %0d, expected %0d", time_units, EXP_T);
    end
    if (peak != EXP_P) begin
      failures++;
      $display("peak PEs %0d, expected %0d", peak, EXP_P);
    end
    bad = 0;
    foreach (pic[i]) begin
      checks++;
      if (dut.u_buf.pix[i] != pic[i]) begin
        bad++;
        failures++;
      end
    end
    $display("%0dx%0d picture on %0d PEs: %0d time units, peak %0d PEs, %0d lines filtered, %0d mismatches",
             PW, PH, N_PE, time_units, peak, nf, bad);
    finished = 1;
  end
endmodule
