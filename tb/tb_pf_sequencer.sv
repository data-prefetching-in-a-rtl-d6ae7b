// tb_pf_sequencer: self-checking test of pf_sequencer in both modes.
//
// A degree-4 and a distance-4 instance get the same triggers. The test
// checks that degree issues base+step in the trigger cycle and
// base+2..4*step in the next three cycles, one per cycle, then stops; that
// distance issues only base+4*step, in the trigger cycle; that a negative
// step works; and that a new trigger abandons a running sequence.
module tb_pf_sequencer;
  import pf_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  trig;
  addr_t base, step;
  logic  dg_v, ds_v;
  addr_t dg_a, ds_a;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  pf_sequencer #(.MODE(PF_DEGREE),   .N(4)) dut_deg  (.clk, .rst_n, .trig_i(trig), .base_i(base), .step_i(step), .pf_valid_o(dg_v), .pf_addr_o(dg_a));
  pf_sequencer #(.MODE(PF_DISTANCE), .N(4)) dut_dist (.clk, .rst_n, .trig_i(trig), .base_i(base), .step_i(step), .pf_valid_o(ds_v), .pf_addr_o(ds_a));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one cycle: drive, let settle, check, clock
  task automatic cyc(input logic t, input addr_t b, input addr_t s,
                     input logic exp_dv, input addr_t exp_da,
                     input logic exp_sv, input addr_t exp_sa);
    trig = t; base = b; step = s;
    #1;
    check(dg_v == exp_dv && (!exp_dv || dg_a == exp_da), $sformatf("degree v=%0d a=%h exp %0d %h", dg_v, dg_a, exp_dv, exp_da));
    check(ds_v == exp_sv && (!exp_sv || ds_a == exp_sa), $sformatf("distance v=%0d a=%h exp %0d %h", ds_v, ds_a, exp_sv, exp_sa));
    @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = 0; base = 0; step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // idle
    cyc(0, 0, 0, 0, 0, 0, 0);
    // positive step, full sequence: 4 addresses in 4 consecutive cycles
    cyc(1, 32'h1000, 32'h80, 1, 32'h1080, 1, 32'h1200);
    cyc(0, 0, 0, 1, 32'h1100, 0, 0);
    cyc(0, 0, 0, 1, 32'h1180, 0, 0);
    cyc(0, 0, 0, 1, 32'h1200, 0, 0);
    cyc(0, 0, 0, 0, 0, 0, 0);
    cyc(0, 0, 0, 0, 0, 0, 0);
    // negative step
    cyc(1, 32'h8000, -32'sd24, 1, 32'h7FE8, 1, 32'h7FA0);
    cyc(0, 0, 0, 1, 32'h7FD0, 0, 0);
    // override by a new trigger in the middle
    cyc(1, 32'h2000, 32'h10, 1, 32'h2010, 1, 32'h2040);
    cyc(0, 0, 0, 1, 32'h2020, 0, 0);
    cyc(0, 0, 0, 1, 32'h2030, 0, 0);
    cyc(0, 0, 0, 1, 32'h2040, 0, 0);
    cyc(0, 0, 0, 0, 0, 0, 0);
    // random triggers against a reference
    for (int r = 0; r < 50; r++) begin
      addr_t b, s;
      b = $urandom; s = $urandom_range(1, 4096);
      cyc(1, b, s, 1, b + s, 1, b + 4 * s);
      for (int k = 2; k <= 4; k++) cyc(0, 0, 0, 1, b + k * s, 0, 0);
      cyc(0, 0, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
