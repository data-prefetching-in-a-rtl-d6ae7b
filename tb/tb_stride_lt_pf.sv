// tb_stride_lt_pf: self-checking test of the Stride prefetcher with
// on-miss Load Table insertion.
//
// Checks: a load that misses in the LT is inserted only when it missed in
// L2; three updates with the same stride make it confident; a confident
// load looked up in AG on any of the four read ports issues a+4*s one cycle
// later (distance 4, the default) and, in a degree-4 instance, a+s ... a+4*s
// over four cycles; a stride change lowers the confidence and stops
// prefetching; four loads looked up in one cycle all prefetch.
module tb_stride_lt_pf;
  import pf_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  mem_ref_t    ag [4];
  mem_ref_t    cm;
  logic        cm_miss;
  logic [3:0]  pv, gv;
  addr_t       pa [4];
  addr_t       ga [4];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  stride_lt_pf dut (.clk, .rst_n, .ag_i(ag), .cm_i(cm), .cm_l2_miss_i(cm_miss), .pf_valid_o(pv), .pf_addr_o(pa));
  stride_lt_pf #(.MODE(PF_DEGREE), .N(4)) dut_deg (.clk, .rst_n, .ag_i(ag), .cm_i(cm), .cm_l2_miss_i(cm_miss), .pf_valid_o(gv), .pf_addr_o(ga));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic commit(input addr_t pc, input addr_t a, input logic miss);
    cm = '{valid: 1'b1, pc: pc, addr: a}; cm_miss = miss;
    @(negedge clk);
    cm = '0; cm_miss = 0;
  endtask

  // AG lookup on port p, then check M1 output: exp_pf=0 means no prefetch
  task automatic lookup(input int p, input addr_t pc, input addr_t a, input logic exp_pf, input addr_t s);
    ag[p] = '{valid: 1'b1, pc: pc, addr: a};
    @(negedge clk);
    ag[p] = '0;
    #1;
    check(pv == (exp_pf ? 4'(1 << p) : 4'b0), $sformatf("distance valid %b port %0d", pv, p));
    if (exp_pf) check(pa[p] == a + 4 * s, $sformatf("distance addr %h exp %h", pa[p], a + 4 * s));
    for (int k = 1; k <= 4; k++) begin
      check(gv == (exp_pf ? 4'(1 << p) : 4'b0), $sformatf("degree valid k=%0d %b", k, gv));
      if (exp_pf) check(ga[p] == a + k * s, $sformatf("degree addr k=%0d %h", k, ga[p]));
      @(negedge clk); #1;
      if (k == 1) check(pv == 4'b0, "distance issues once");
    end
    check(gv == 4'b0, "degree stops");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t pcA, pcB;
    pcA = 32'h0040_1000; pcB = 32'h0040_2004;
    for (int p = 0; p < 4; p++) ag[p] = '0;
    cm = '0; cm_miss = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // no L2 miss: not inserted, so never confident
    for (int i = 0; i < 5; i++) commit(pcB, 32'h2000 + i * 8, 0);
    lookup(0, pcB, 32'h2028, 0, 8);
    // inserted on L2 miss, stride 64 learned, confident after 3 matches
    commit(pcA, 32'h10000, 1);
    commit(pcA, 32'h10040, 0);
    commit(pcA, 32'h10080, 0);
    lookup(1, pcA, 32'h100C0, 0, 64);       // confidence 1
    commit(pcA, 32'h100C0, 0);
    for (int p = 0; p < 4; p++) lookup(p, pcA, 32'h10100 + p * 64, 1, 64);
    // negative stride on pcB, inserted this time
    commit(pcB, 32'h9000, 1);
    for (int i = 1; i < 4; i++) commit(pcB, 32'h9000 - i * 24, 0);
    lookup(2, pcB, 32'h9000 - 4 * 24, 1, -32'sd24);
    // four lookups in the same cycle
    for (int p = 0; p < 4; p++) ag[p] = '{valid: 1'b1, pc: (p % 2) ? pcB : pcA, addr: 32'h5000 + p * 4096};
    @(negedge clk);
    for (int p = 0; p < 4; p++) ag[p] = '0;
    #1 check(pv == 4'b1111, "four prefetches in one cycle");
    for (int p = 0; p < 4; p++) check(pa[p] == 32'h5000 + p * 4096 + 4 * ((p % 2) ? -24 : 64), "four-port address");
    @(negedge clk);
    repeat (4) @(negedge clk);
    // one more match (conf 3), then the stride breaks: 3 -> 2 -> 1
    commit(pcA, 32'h10100, 0);
    commit(pcA, 32'h20000, 0);
    lookup(0, pcA, 32'h20040, 1, 64);       // conf 2, still confident
    commit(pcA, 32'h30000, 0);
    lookup(0, pcA, 32'h30040, 0, 64);       // conf 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
