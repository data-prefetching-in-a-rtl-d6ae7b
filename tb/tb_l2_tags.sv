// tb_l2_tags: self-checking test of the L2 tag directory.
//
// Uses the full 256 KB / 8-way / 128 B geometry (256 sets). Checks misses
// on an empty directory, hits after demand and prefetch fills, that the
// first demand hit on a prefetched block is flagged once and clears the
// prefetch bit, four lookups in one cycle, the side-effect-free probe, and
// round-robin eviction when a ninth block is filled into a full set. A
// random phase compares against a model that keeps at most eight blocks
// per set, so no eviction is involved.
module tb_l2_tags;
  import pf_pkg::*;

  localparam int NP = 4;
  logic           clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0]  lv, hit, pfh;
  addr_t          la [NP];
  addr_t          pa;
  logic           ph;
  logic           fv, fpf;
  addr_t          fa;
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  l2_tags dut (.clk, .rst_n, .lk_valid_i(lv), .lk_addr_i(la), .lk_hit_o(hit), .lk_pf_hit_o(pfh),
               .probe_addr_i(pa), .probe_hit_o(ph), .fill_valid_i(fv), .fill_addr_i(fa), .fill_pf_i(fpf));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fill(input addr_t a, input logic p);
    fv = 1; fa = a; fpf = p;
    @(negedge clk);
    fv = 0;
  endtask

  // single lookup on port 0; returns hit and pf-hit seen this cycle
  task automatic look(input addr_t a, output logic h, output logic f);
    lv = 4'b0001; la[0] = a;
    #1 h = hit[0]; f = pfh[0];
    @(negedge clk);
    lv = '0;
  endtask

  // set s, tag t
  function automatic addr_t mk(input int s, input int t, input int off = 0);
    return addr_t'((t << 15) | (s << 7) | off);
  endfunction

  typedef struct { logic pres; logic pbit; } ent_t;
  ent_t model [addr_t];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h, f;
    lv = '0; fv = 0; fa = '0; fpf = 0; pa = '0;
    for (int p = 0; p < NP; p++) la[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    look(mk(3, 5), h, f);          check(!h && !f, "empty miss");
    fill(mk(3, 5), 0);
    look(mk(3, 5, 100), h, f);     check(h && !f, "demand fill hit");
    fill(mk(7, 9), 1);
    pa = mk(7, 9, 4); #1 check(ph, "probe sees block");
    pa = mk(7, 10);   #1 check(!ph, "probe miss");
    look(mk(7, 9), h, f);          check(h && f, "first hit on prefetched block");
    look(mk(7, 9), h, f);          check(h && !f, "second hit: bit cleared");
    // four lookups in one cycle
    fill(mk(1, 1), 1);
    lv = '1; la[0] = mk(1, 1); la[1] = mk(3, 5); la[2] = mk(1, 2); la[3] = mk(7, 9, 8);
    #1 check(hit == 4'b1011 && pfh == 4'b0001, $sformatf("4 ports hit=%b pfh=%b", hit, pfh));
    @(negedge clk); lv = '0;
    // invalid lookup does not hit
    lv = 4'b0000; la[0] = mk(3, 5); #1 check(hit == '0, "lookup without valid");
    // eviction: set 20 gets 9 blocks, the first is replaced
    for (int t = 0; t < 9; t++) fill(mk(20, 100 + t), 0);
    look(mk(20, 100), h, f);       check(!h, "oldest evicted");
    for (int t = 1; t < 9; t++) begin look(mk(20, 100 + t), h, f); check(h, "others kept"); end
    // refill of a present block changes nothing
    fill(mk(20, 101), 1);
    look(mk(20, 101), h, f);       check(h && !f, "refill of present block ignored");
    // random against a model, sets 40..59, at most 8 tags per set
    for (int i = 0; i < 3000; i++) begin
      addr_t a;
      a = mk($urandom_range(40, 59), $urandom_range(0, 7), $urandom_range(0, 127));
      if ($urandom_range(0, 1)) begin
        logic p;
        p = 1'($urandom);
        if (!model.exists({a[31:7], 7'd0})) model[{a[31:7], 7'd0}] = '{pres: 1, pbit: p};
        fill(a, p);
      end else begin
        logic eh, ef;
        eh = model.exists({a[31:7], 7'd0});
        ef = 1'b0;
        if (eh) ef = model[{a[31:7], 7'd0}].pbit;
        look(a, h, f);
        check(h == eh && f == ef, $sformatf("random %h hit %0d/%0d pf %0d/%0d ", a, h, eh, f, ef));
        if (ef) model[{a[31:7], 7'd0}].pbit = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
