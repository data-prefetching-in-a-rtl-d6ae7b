// tb_pab: self-checking test of the Prefetch Address Buffer.
//
// Fills the buffer to its eight entries from several ports in one cycle,
// checks the drop of the ninth address and the merge of an address whose
// block is already queued, drains it in FIFO order with simultaneous
// pushes, and compares a random run against a queue model.
module tb_pab;
  import pf_pkg::*;

  localparam int NIN = 4;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic [NIN-1:0]  iv;
  addr_t           ia [NIN];
  logic            ov, ordy;
  addr_t           oa;
  logic [2:0]      drop, merge;
  int              checks = 0, failures = 0;
  addr_t           model[$];

  always #5 clk = ~clk;

  pab #(.DEPTH(8), .NIN(NIN)) dut (.clk, .rst_n, .in_valid_i(iv), .in_addr_i(ia),
    .out_valid_o(ov), .out_addr_o(oa), .out_ready_i(ordy), .drop_o(drop), .merge_o(merge));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic in_model(input addr_t a);
    foreach (model[i]) if (model[i][31:7] == a[31:7]) return 1'b1;
    return 1'b0;
  endfunction

  // reference: pop first, then inputs in port order
  task automatic step_model(output int d, output int m);
    d = 0; m = 0;
    if (ov && ordy) void'(model.pop_front());
    for (int p = 0; p < NIN; p++) if (iv[p]) begin
      if (in_model(ia[p])) m++;
      else if (model.size() == 8) d++;
      else model.push_back(ia[p]);
    end
  endtask

  task automatic cyc();
    int d, m;
    #1;
    check(ov == (model.size() != 0), "out_valid");
    if (model.size() != 0) check(oa == model[0], $sformatf("head %h exp %h", oa, model[0]));
    step_model(d, m);
    check(drop == 3'(d) && merge == 3'(m), $sformatf("drop %0d/%0d merge %0d/%0d", drop, d, merge, m));
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = '0; ordy = 0;
    for (int p = 0; p < NIN; p++) ia[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 4 + 4 distinct blocks fill the buffer
    for (int c = 0; c < 2; c++) begin
      iv = '1;
      for (int p = 0; p < NIN; p++) ia[p] = 32'h1000 + (c * 4 + p) * 128;
      cyc();
    end
    // ninth dropped, one merged (same block, other offset)
    iv = 4'b0011; ia[0] = 32'h9000; ia[1] = 32'h1000 + 3 * 128 + 5;
    #1 check(drop == 1 && merge == 1, "full: one drop, one merge");
    cyc();
    iv = '0;
    // drain in order while pushing
    ordy = 1;
    for (int c = 0; c < 10; c++) begin
      iv = (c % 3 == 0) ? 4'b0001 : 4'b0000;
      ia[0] = 32'h4000_0000 + c * 128;
      cyc();
    end
    // random
    for (int c = 0; c < 1500; c++) begin
      iv = 4'($urandom);
      for (int p = 0; p < NIN; p++) ia[p] = {24'h0, 8'($urandom_range(0, 40))} << 7;
      ordy = ($urandom_range(0, 2) == 0);
      cyc();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
