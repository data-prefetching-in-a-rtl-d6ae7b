// tb_pf_configs: the five prefetch aggressiveness settings compared for
// each prefetcher (degree 1, distance 2, degree 2, distance 4, degree 4),
// applied to the three prefetchers trained by L2 events.
//
// Fifteen instances (Sequential Tagged, PC/DC and P-DFCM, each in the five
// settings) see the same L2 events: load A walks a 256-byte stride, load B
// repeats the deltas +64, +64, +1024, alternating, one event every GAP
// cycles. Within the GAP cycles after an event, once a load is warmed up,
// each instance must issue exactly the expected set of addresses:
//   degree n   : the next n addresses of that load's sequence (for
//                Sequential Tagged, the next n blocks after the event's)
//   distance n : only the n-th next address (block)
// The Stride prefetcher's settings are exercised in tb_stride_lt_pf.
module tb_pf_configs;
  import pf_pkg::*;

  localparam int GAP  = 26;
  localparam int WARM = 8;
  localparam int NC   = 5;
  localparam pf_mode_e    CM [NC] = '{PF_DEGREE, PF_DISTANCE, PF_DEGREE, PF_DISTANCE, PF_DEGREE};
  localparam int unsigned CN [NC] = '{1, 2, 2, 4, 4};

  logic      clk = 1'b0, rst_n = 1'b0;
  l2_event_t ev;
  logic      v [3][NC];
  addr_t     a [3][NC];
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    seq_tagged_pf #(.MODE(CM[c]), .N(CN[c])) u_seq   (.clk, .rst_n, .ev_i(ev), .pf_valid_o(v[0][c]), .pf_addr_o(a[0][c]));
    pcdc_pf       #(.MODE(CM[c]), .N(CN[c])) u_pcdc  (.clk, .rst_n, .ev_i(ev), .pf_valid_o(v[1][c]), .pf_addr_o(a[1][c]));
    pdfcm_pf      #(.MODE(CM[c]), .N(CN[c])) u_pdfcm (.clk, .rst_n, .ev_i(ev), .pf_valid_o(v[2][c]), .pf_addr_o(a[2][c]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t pcs [2] = '{32'h0001_2340, 32'h0001_5678};
  addr_t seq [2][$];
  addr_t got [3][NC][$];

  function automatic addr_t pat(input int l, input int k);
    if (l == 0) return 256;
    return (k % 3 == 2) ? 1024 : 64;
  endfunction

  // collect everything issued
  always @(posedge clk)
    for (int t = 0; t < 3; t++)
      for (int c = 0; c < NC; c++)
        if (rst_n && v[t][c]) got[t][c].push_back(a[t][c]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n [2] = '{0, 0};
    string tn [3] = '{"seq", "pcdc", "pdfcm"};
    ev = '0;
    for (int l = 0; l < 2; l++) begin
      seq[l].push_back(32'h0100_0000 + l * 32'h0010_0000);
      for (int k = 0; k < 60; k++) seq[l].push_back(seq[l][k] + pat(l, k));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < 80; e++) begin
      int l, i;
      addr_t blk;
      l = e % 2; i = n[l]; n[l]++;
      blk = {seq[l][i][31:7], 7'd0};
      for (int t = 0; t < 3; t++) for (int c = 0; c < NC; c++) got[t][c].delete();
      ev = '{valid: 1'b1, miss: 1'b1, load: 1'b1, pc: pcs[l], addr: seq[l][i]};
      @(negedge clk);
      ev = '0;
      repeat (GAP - 1) @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        addr_t exp [3][$];
        for (int t = 0; t < 3; t++) exp[t].delete();
        for (int k = 1; k <= int'(CN[c]); k++) begin
          if (CM[c] == PF_DEGREE || k == int'(CN[c])) begin
            exp[0].push_back(blk + 128 * k);
            exp[1].push_back(seq[l][i + k]);
            exp[2].push_back(seq[l][i + k]);
          end
        end
        for (int t = 0; t < 3; t++) begin
          if (t == 0 || i >= WARM) begin
            check(got[t][c] == exp[t], $sformatf("%s %s %0d, load %0d event %0d: %0d issued, %0d expected",
                  tn[t], CM[c].name(), CN[c], l, i, got[t][c].size(), exp[t].size()));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
