// tb_pf_top: end-to-end test of the L2 prefetch subsystem at its default
// sizes.
//
// A small pipeline model feeds the four reference ports: each load is seen
// in AG, one cycle later in M1 (L2 tag lookup), and commits three cycles
// after M1, one per cycle, with its L2 miss flag. A memory model answers
// every demand miss and every prefetch request with a fill LAT cycles
// later; a block already in flight is not requested twice. The request
// port's ready is random, so the Prefetch Address Buffer backs up.
// Workload: load A streams with a 64-byte stride, load B repeats the
// deltas +128, +128, +2048. In the first half of the run a reference is
// issued every four cycles and, every 80 cycles, four in one cycle; in the
// second half one every 24 cycles, which leaves the PC/DC walk time to
// finish before the next L2 event overrides it. The run is repeated, after a reset, for the no-prefetch
// baseline and for each of the four prefetchers.
// Checks: no prefetch requests without a prefetcher; each prefetcher issues
// requests, gets first hits on prefetched blocks and has fewer demand
// misses than the baseline; every request is block aligned and not already
// in the L2. Each mechanism (L2 miss event, first hit on a prefetched
// block, PAB merge and drop, discard of a resident block at the buffer
// output, four lookups in a cycle, a prefetch chain cut short by a newer
// event, each selector setting) is counted and must occur.
module tb_pf_top;
  import pf_pkg::*;

  localparam int NREF  = 4;
  localparam int LAT   = 30;
  localparam int NLOAD = 1200;

  logic            clk = 1'b0, rst_n = 1'b0;
  pf_sel_e         sel;
  mem_ref_t        ag [NREF];
  mem_ref_t        m1 [NREF];
  logic [NREF-1:0] m1_l2ref, m1_load, m1_hit;
  mem_ref_t        cm;
  logic            cm_miss;
  logic            fv, fpf;
  addr_t           fa;
  logic            rq_v, rq_rdy;
  addr_t           rq_a;
  l2_event_t       ev;
  logic [2:0]      drop, merge;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  pf_top dut (.clk, .rst_n, .sel_i(sel), .ag_i(ag), .m1_i(m1), .m1_l2ref_i(m1_l2ref), .m1_load_i(m1_load),
    .m1_l2_hit_o(m1_hit), .cm_i(cm), .cm_l2_miss_i(cm_miss), .fill_valid_i(fv),
    .fill_addr_i(fa), .fill_pf_i(fpf), .pf_req_valid_o(rq_v), .pf_req_addr_o(rq_a),
    .pf_req_ready_i(rq_rdy), .ev_o(ev), .drop_o(drop), .merge_o(merge));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters (whole run)
  int n_miss_ev, n_pfhit_ev, n_drop, n_merge, n_discard, n_quad, n_override, n_sel [5];

  // ---------------- per-run statistics
  int r_miss, r_req, r_pfhit;

  // ---------------- memory model
  typedef struct { int t; addr_t a; logic pf; } fill_t;
  fill_t   fq[$];
  bit      inflight [addr_t];
  int      cyc_n;

  function automatic addr_t blk(input addr_t a);
    return {a[31:7], 7'd0};
  endfunction

  task automatic mem_req(input addr_t a, input logic pf);
    if (!inflight.exists(blk(a))) begin
      inflight[blk(a)] = 1'b1;
      fq.push_back('{t: cyc_n + LAT, a: blk(a), pf: pf});
    end
  endtask

  // ---------------- pipeline model
  mem_ref_t cq[$];          // loads waiting to commit, with their miss flag
  logic     cq_miss[$];
  int       cq_t[$];

  always @(posedge clk) begin
    if (rst_n) begin
      // observe M1 results and prefetch requests (inputs are stable here)
      for (int p = 0; p < NREF; p++) if (m1[p].valid) begin
        if (!m1_hit[p]) begin r_miss++; mem_req(m1[p].addr, 1'b0); end
        cq.push_back(m1[p]); cq_miss.push_back(!m1_hit[p]); cq_t.push_back(cyc_n + 3);
      end
      if (&{m1[0].valid, m1[1].valid, m1[2].valid, m1[3].valid}) n_quad++;
      if (ev.valid && ev.miss)  n_miss_ev++;
      if (ev.valid && !ev.miss) begin n_pfhit_ev++; r_pfhit++; end
      n_drop  += int'(drop);
      n_merge += int'(merge);
      if (dut.q_valid && dut.probe_hit) n_discard++;
      if (ev.valid && (dut.u_pcdc.st_q != 2'd0 || dut.u_pdfcm.busy_q)) n_override++;
      if (rq_v && rq_rdy) begin
        r_req++;
        check(rq_a[6:0] == 7'd0, "request is block aligned");
        check(!dut.probe_hit, "request is not resident in L2");
        mem_req(rq_a, 1'b1);
      end
      cyc_n++;
    end
  end

  // drive fills, commits and ready between clock edges
  always @(negedge clk) begin
    fv = 1'b0; fpf = 1'b0; fa = '0;
    cm = '0; cm_miss = 1'b0;
    rq_rdy = ($urandom_range(0, 2) == 0);
    if (fq.size() != 0 && fq[0].t <= cyc_n) begin
      fv = 1'b1; fa = fq[0].a; fpf = fq[0].pf;
      inflight.delete(fq[0].a);
      void'(fq.pop_front());
    end
    if (cq.size() != 0 && cq_t[0] <= cyc_n) begin
      cm = cq.pop_front(); cm_miss = cq_miss.pop_front(); void'(cq_t.pop_front());
    end
  end

  // ---------------- workload
  addr_t a_next, b_next;
  int    b_k;

  function automatic addr_t pc_of(input int l);
    return (l == 0) ? 32'h0040_1200 : 32'h0040_3404;
  endfunction

  task automatic next_ref(input int l, output mem_ref_t r);
    if (l == 0) begin
      r = '{valid: 1'b1, pc: pc_of(0), addr: a_next};
      a_next += 64;
    end else begin
      r = '{valid: 1'b1, pc: pc_of(1), addr: b_next};
      b_next += (b_k % 3 == 2) ? 2048 : 128;
      b_k++;
    end
  endtask

  task automatic run(input pf_sel_e s, output int misses, output int reqs, output int pfhits);
    int n, c, k;
    sel = s;
    rst_n = 1'b0;
    fq.delete(); inflight.delete(); cq.delete(); cq_miss.delete(); cq_t.delete();
    r_miss = 0; r_req = 0; r_pfhit = 0;
    a_next = 32'h0100_0000; b_next = 32'h0200_0000; b_k = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    c = 0; n = 0;
    while (n < NLOAD) begin
      mem_ref_t r [NREF];
      for (int p = 0; p < NREF; p++) r[p] = '0;
      k = (n < NLOAD / 2) ? 2 : 12;
      if (k == 2 && c % 40 == 39) begin
        for (int p = 0; p < NREF; p++) next_ref(p % 2, r[p]);
        n += NREF;
      end else if (c % k == 0) begin
        next_ref(n % 2, r[n % NREF]);
        n++;
      end
      ag = r;
      @(negedge clk);
      m1 = r;
      for (int p = 0; p < NREF; p++) ag[p] = '0;
      @(negedge clk);
      for (int p = 0; p < NREF; p++) m1[p] = '0;
      c++;
    end
    repeat (LAT + 40) @(negedge clk);
    misses = r_miss; reqs = r_req; pfhits = r_pfhit;
    n_sel[int'(s)]++;
    $display("sel=%s demand misses=%0d prefetch requests=%0d first hits on prefetched blocks=%0d",
             s.name(), misses, reqs, pfhits);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base_miss, m, q, h;
    for (int p = 0; p < NREF; p++) begin ag[p] = '0; m1[p] = '0; end
    m1_l2ref = '1;
    m1_load  = '1;
    sel = SEL_NONE; cyc_n = 0;
    n_miss_ev = 0; n_pfhit_ev = 0; n_drop = 0; n_merge = 0; n_discard = 0; n_quad = 0; n_override = 0;
    for (int i = 0; i < 5; i++) n_sel[i] = 0;
    run(SEL_NONE, base_miss, q, h);
    check(q == 0 && h == 0, "baseline issues no prefetches");
    check(base_miss > 0, "baseline misses");
    for (int s = 1; s <= 4; s++) begin
      run(pf_sel_e'(s), m, q, h);
      check(q > 0, $sformatf("%0d: prefetches issued", s));
      check(h > 0, $sformatf("%0d: prefetched blocks used", s));
      check(m < base_miss, $sformatf("%0d: fewer demand misses (%0d vs %0d)", s, m, base_miss));
    end
    $display("mechanisms: miss_ev=%0d pfhit_ev=%0d drop=%0d merge=%0d discard=%0d quad=%0d override=%0d",
             n_miss_ev, n_pfhit_ev, n_drop, n_merge, n_discard, n_quad, n_override);
    check(n_miss_ev > 0, "L2 miss events");
    check(n_pfhit_ev > 0, "first hits on prefetched blocks");
    check(n_drop > 0, "PAB drops when full");
    check(n_merge > 0, "PAB merges");
    check(n_discard > 0, "resident blocks discarded at the PAB output");
    check(n_quad > 0, "four references in one cycle");
    check(n_override > 0, "prediction cut short by a newer event");
    for (int i = 0; i < 5; i++) check(n_sel[i] > 0, "selector setting used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
