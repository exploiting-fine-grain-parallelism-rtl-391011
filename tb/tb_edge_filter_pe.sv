// tb_edge_filter_pe -- checks the PE against the reference line filter on
// random four-line windows (smooth sides with a random step between p0 and
// q0, so that the normal, strong and no-filter cases all occur), random bS,
// QPs and filter offsets.  The PE is combinational: one window per cycle.
module tb_edge_filter_pe;
  import deblock_pkg::*;
  import deblock_ref_pkg::*;

  logic              clk = 1'b0;
  win_t              win_in, win_out;
  logic [2:0]        bs;
  logic [5:0]        qp_p, qp_q;
  logic signed [4:0] off_a, off_b;
  int checks = 0, failures = 0;
  int n_normal = 0, n_strong = 0, n_none = 0;

  edge_filter_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[8], exp_s[8], kind, lvl_p, lvl_q, step;
    for (int it = 0; it < 4000; it++) begin
      bs    = 3'($urandom_range(0, 4));
      qp_p  = 6'($urandom_range(16, 51));
      qp_q  = 6'($urandom_range(16, 51));
      off_a = 5'($signed($urandom_range(0, 12)) - 6);
      off_b = 5'($signed($urandom_range(0, 12)) - 6);
      lvl_p = $urandom_range(5, 250);
      step  = $urandom_range(0, 3) == 0 ? $urandom_range(0, 80) : $urandom_range(0, 12);
      lvl_q = clampi(lvl_p + (($urandom_range(0, 1) == 1) ? step : -step), 0, 255);
      for (int ln = 0; ln < 4; ln++)
        for (int k = 0; k < 8; k++)
          win_in[ln][k] = 8'(clampi(((k < 4) ? lvl_p : lvl_q) + $urandom_range(0, 6) - 3, 0, 255));
      @(posedge clk);
      for (int ln = 0; ln < 4; ln++) begin
        for (int k = 0; k < 8; k++) s[k] = int'(win_in[ln][k]);
        kind = filter_line(s, int'(bs), int'(qp_p), int'(qp_q), int'(off_a), int'(off_b));
        if (kind == 0) n_none++; else if (kind == 1) n_normal++; else n_strong++;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(win_out[ln][k]) != s[k]) begin
            failures++;
            if (failures < 10)
              $display("mismatch it=%0d line=%0d tap=%0d bs=%0d got=%0d exp=%0d",
                       it, ln, k, bs, win_out[ln][k], s[k]);
          end
        end
      end
    end
    $display("lines: unfiltered=%0d normal=%0d strong=%0d", n_none, n_normal, n_strong);
    checks++;
    if (n_normal < 100 || n_strong < 100 || n_none < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
