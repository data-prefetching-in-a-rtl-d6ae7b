// tb_pcdc_pf: self-checking test of the PC/DC (GHB) prefetcher.
//
// Two loads miss in L2 alternately. Load A walks a constant stride of 256
// bytes; load B repeats the delta pattern +64, +64, +1024. After a warm-up
// of 8 events per load, every event must produce the next four addresses of
// that load's own sequence, in four consecutive cycles starting at cycle
// h+2 after the event, where h is the number of history addresses walked
// (the event's own plus one GHB read per cycle, at most 16) (degree-4
// instance), and the fourth next address only (distance-4 instance).
// Before that, no wrong address may be issued. Then an L2 miss of a store
// carrying B's PC must neither predict nor disturb B's history, and a miss
// of B one cycle after a miss of A must cancel A's walk.
module tb_pcdc_pf;
  import pf_pkg::*;

  localparam int GAP  = 26;
  localparam int WARM = 8;

  logic      clk = 1'b0, rst_n = 1'b0;
  l2_event_t ev;
  logic      dv, sv;
  addr_t     da, sa;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  pcdc_pf dut (.clk, .rst_n, .ev_i(ev), .pf_valid_o(dv), .pf_addr_o(da));
  pcdc_pf #(.MODE(PF_DISTANCE), .N(4)) dut_dist (.clk, .rst_n, .ev_i(ev), .pf_valid_o(sv), .pf_addr_o(sa));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t pcs [2] = '{32'h0001_2340, 32'h0001_5678};
  addr_t seq [2][$];

  function automatic addr_t pat(input int l, input int k);   // k-th delta of load l
    if (l == 0) return 256;
    return (k % 3 == 2) ? 1024 : 64;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n [2] = '{0, 0};
    ev = '0;
    // build the two address sequences
    for (int l = 0; l < 2; l++) begin
      seq[l].push_back(32'h0100_0000 + l * 32'h0010_0000);
      for (int k = 0; k < 80; k++) seq[l].push_back(seq[l][k] + pat(l, k));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < 120; e++) begin
      int l, i;
      l = e % 2; i = n[l]; n[l]++;
      ev = '{valid: 1'b1, miss: 1'b1, load: 1'b1, pc: pcs[l], addr: seq[l][i]};
      #1 check(!dv && !sv, "nothing issued in the update cycle");
      @(negedge clk);
      ev = '0;
      for (int c = 1; c < GAP; c++) begin
        #1;
        if (i >= WARM) begin
          int f;
          f = ((i + 1 < 16) ? i + 1 : 16) + 2;   // first issue cycle
          if (c >= f && c < f + 4) check(dv && da == seq[l][i + c - f + 1], $sformatf("load %0d ev %0d degree c=%0d %h exp %h", l, i, c, da, seq[l][i + c - f + 1]));
          else                     check(!dv, $sformatf("degree: four only, c=%0d", c));
          if (c == f + 3) check(sv && sa == seq[l][i + 4], $sformatf("distance %h exp %h", sa, seq[l][i + 4]));
          else            check(!sv, "distance: one only");
        end else begin
          if (dv) check(da == seq[l][i + 1] || da == seq[l][i + 2] || da == seq[l][i + 3] || da == seq[l][i + 4], "early degree prefetch is wrong");
          if (sv) check(sa == seq[l][i + 4], "early distance prefetch is wrong");
        end
        @(negedge clk);
      end
    end
    // a store event of load B's PC at an unrelated address must be ignored
    ev = '{valid: 1'b1, miss: 1'b1, load: 1'b0, pc: pcs[1], addr: 32'h7777_0000};
    @(negedge clk);
    ev = '0;
    for (int c = 0; c < GAP; c++) begin
      #1 check(!dv && !sv, "a store event predicts nothing");
      @(negedge clk);
    end
    // override: A then B in consecutive cycles; only B's chain survives
    begin
      int ia, ib;
      ia = n[0]; ib = n[1];
      ev = '{valid: 1'b1, miss: 1'b1, load: 1'b1, pc: pcs[0], addr: seq[0][ia]};
      @(negedge clk);
      ev = '{valid: 1'b1, miss: 1'b0, load: 1'b1, pc: pcs[1], addr: seq[1][ib]};
      #1 check(!dv, "nothing issued in the update cycle");
      @(negedge clk);
      ev = '0;
      for (int c = 1; c < 18; c++) begin
        #1 check(!dv, "no prefetch during B's walk");
        @(negedge clk);
      end
      for (int c = 1; c <= 4; c++) begin
        #1 check(dv && da == seq[1][ib + c], $sformatf("B after override c=%0d", c));
        @(negedge clk);
      end
      #1 check(!dv, "A's walk was abandoned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
