// tb_seq_tagged_pf: self-checking test of the Sequential Tagged prefetcher.
//
// A degree-4 instance (the default configuration) and a distance-4
// instance see the same L2 events: misses and first hits on prefetched
// blocks, at unaligned addresses. Degree must issue the next four blocks
// in the event cycle and the three cycles after; distance only the fourth
// next block, in the event cycle. Both kinds of event must trigger.
module tb_seq_tagged_pf;
  import pf_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  l2_event_t ev;
  logic      dv, sv;
  addr_t     da, sa;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_tagged_pf dut (.clk, .rst_n, .ev_i(ev), .pf_valid_o(dv), .pf_addr_o(da));
  seq_tagged_pf #(.MODE(PF_DISTANCE), .N(4)) dut_dist (.clk, .rst_n, .ev_i(ev), .pf_valid_o(sv), .pf_addr_o(sa));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      addr_t a, blk;
      a   = $urandom;
      blk = {a[31:7], 7'd0};
      ev  = '{valid: 1'b1, miss: 1'(i % 2), load: 1'(i % 3 != 0), pc: $urandom, addr: a};
      for (int c = 0; c < 6; c++) begin
        #1;
        if (c < 4) check(dv && da == blk + 128 * (c + 1), $sformatf("degree c=%0d %h", c, da));
        else       check(!dv, "degree stops after four");
        if (c == 0) check(sv && sa == blk + 512, $sformatf("distance %h", sa));
        else        check(!sv, "distance issues once");
        @(negedge clk);
        ev = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
