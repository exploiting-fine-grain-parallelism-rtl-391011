// tb_frame_buffer -- loads a random 2x2-MB picture, bS and QP table through
// the host ports, then presents random boundaries on the PE ports and
// checks the windows (sample positions worked out here), the bS (0 on the
// picture edge) and the p/q QPs, writes random filtered windows back and
// checks through the host read port that exactly taps p2..q2 changed,
// and nothing at all for picture-edge boundaries.
module tb_frame_buffer;
  import deblock_pkg::*;

  localparam int MB_W = 2, MB_H = 2, N_PE = 3;
  localparam int PW = 16 * MB_W, PH = 16 * MB_H;

  logic        clk = 1'b0;
  logic        host_we = 0, host_bs_we = 0, host_qp_we = 0;
  logic [11:0] host_y = 0, host_x = 0, host_ry = 0, host_rx = 0;
  pix_t        host_wdata = 0, host_rdata;
  mbc_t        host_bs_row = 0, host_bs_col = 0, host_qp_row = 0, host_qp_col = 0;
  bid_t        host_bs_bid = 0;
  logic [2:0]  host_bs_data = 0;
  logic [5:0]  host_qp_data = 0;
  bnd_op_t     pe_op   [N_PE];
  win_t        pe_win  [N_PE];
  logic [2:0]  pe_bs   [N_PE];
  logic [5:0]  pe_qp_p [N_PE];
  logic [5:0]  pe_qp_q [N_PE];
  win_t        pe_wb   [N_PE];

  frame_buffer #(.MB_W(MB_W), .MB_H(MB_H), .N_PE(N_PE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [PH][PW];
  int bsm [MB_H][MB_W][32];
  int qpm [MB_H][MB_W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // sample (y, x) of line ln, tap tp of boundary (r, c, b); edge: on picture edge
  function automatic void where(input int r, input int c, input int b, input int ln, input int tp,
                                output int y, output int x);
    if (b < 16) begin y = 16 * r + 4 * (b % 4) + ln; x = 16 * c + 4 * (b / 4) + tp - 4; end
    else begin y = 16 * r + 4 * ((b - 16) / 4) + tp - 4; x = 16 * c + 4 * ((b - 16) % 4) + ln; end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c, b, y, x, on_edge, qpp;
    for (int p = 0; p < N_PE; p++) begin pe_op[p] = '0; pe_wb[p] = '0; end
    // load
    for (int yy = 0; yy < PH; yy++)
      for (int xx = 0; xx < PW; xx++) begin
        model[yy][xx] = $urandom_range(0, 255);
        @(negedge clk);
        host_we = 1; host_y = 12'(yy); host_x = 12'(xx); host_wdata = 8'(model[yy][xx]);
      end
    for (int rr = 0; rr < MB_H; rr++)
      for (int cc = 0; cc < MB_W; cc++) begin
        qpm[rr][cc] = $urandom_range(0, 51);
        @(negedge clk);
        host_we = 0;
        host_qp_we = 1; host_qp_row = 8'(rr); host_qp_col = 8'(cc); host_qp_data = 6'(qpm[rr][cc]);
        for (int bb = 0; bb < 32; bb++) begin
          bsm[rr][cc][bb] = $urandom_range(1, 4);
          @(negedge clk);
          host_qp_we = 0;
          host_bs_we = 1; host_bs_row = 8'(rr); host_bs_col = 8'(cc); host_bs_bid = 5'(bb);
          host_bs_data = 3'(bsm[rr][cc][bb]);
        end
      end
    @(negedge clk);
    host_bs_we = 0;
    // host read-back of the whole picture
    for (int yy = 0; yy < PH; yy++)
      for (int xx = 0; xx < PW; xx++) begin
        host_ry = 12'(yy); host_rx = 12'(xx);
        #1 check(int'(host_rdata) == model[yy][xx], "host read-back");
      end
    // random boundaries, one PE at a time so that write-backs never collide
    for (int it = 0; it < 300; it++) begin
      int p;
      @(negedge clk);
      p = it % N_PE;
      r = $urandom_range(0, MB_H - 1); c = $urandom_range(0, MB_W - 1); b = $urandom_range(0, 31);
      for (int k = 0; k < N_PE; k++) pe_op[k] = '0;
      pe_op[p].valid = 1; pe_op[p].mb_row = 8'(r); pe_op[p].mb_col = 8'(c); pe_op[p].bid = 5'(b);
      on_edge = (b < 4 && c == 0) || (b >= 16 && b < 20 && r == 0);
      for (int ln = 0; ln < 4; ln++)
        for (int tp = 0; tp < 8; tp++) pe_wb[p][ln][tp] = 8'($urandom_range(0, 255));
      #1;
      if (!on_edge)
        for (int ln = 0; ln < 4; ln++)
          for (int tp = 0; tp < 8; tp++) begin
            where(r, c, b, ln, tp, y, x);
            check(int'(pe_win[p][ln][tp]) == model[y][x], "window sample");
          end
      check(int'(pe_bs[p]) == (on_edge ? 0 : bsm[r][c][b]), "bS");
      qpp = qpm[r][c];
      if (!on_edge && b < 4)              qpp = qpm[r][c-1];
      if (!on_edge && b >= 16 && b < 20)  qpp = qpm[r-1][c];
      check(int'(pe_qp_q[p]) == qpm[r][c], "qp q");
      check(int'(pe_qp_p[p]) == qpp, "qp p");
      @(negedge clk);
      pe_op[p] = '0;
      if (!on_edge)
        for (int ln = 0; ln < 4; ln++)
          for (int tp = 1; tp < 7; tp++) begin
            where(r, c, b, ln, tp, y, x);
            model[y][x] = int'(pe_wb[p][ln][tp]);
          end
      for (int ln = 0; ln < 4; ln++)
        for (int tp = 0; tp < 8; tp++) begin
          where(r, c, b, ln, tp, y, x);
          if (y >= 0 && x >= 0) begin
            host_ry = 12'(y); host_rx = 12'(x);
            #1 check(int'(host_rdata) == model[y][x], "write-back");
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
