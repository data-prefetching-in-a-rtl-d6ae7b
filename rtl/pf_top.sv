// pf_top: L2 data prefetch subsystem of a three-level on-chip cache
// hierarchy.
//
// All four prefetchers bring data into the L2 and are built side by side;
// sel_i chooses, at run time, which one writes the Prefetch Address Buffer
// (SEL_NONE gives the no-prefetch baseline). Each prefetcher keeps training
// whether or not it is selected.
//   * l2_tags      L2 tag directory with a prefetch bit per block, looked up
//                  by up to NREF references per cycle in M1.
//   * seq_tagged_pf, pcdc_pf, pdfcm_pf   trained by L2 events: an L2 demand
//                  miss, or the first demand hit on a prefetched block. At
//                  most one event per cycle is passed on, from the lowest
//                  numbered reference port that has one.
//   * stride_lt_pf trained by the AG-stage load stream (lookups) and the
//                  commit stream (updates, on-miss insertion).
//   * pab          eight-entry Prefetch Address Buffer. Its oldest address is
//                  probed in the L2 tags; a block already present is
//                  discarded, any other is offered on pf_req_*.
// Interface:
//   ag_i         loads in AG (PC and generated address), to the stride LT
//   m1_i         references in M1; m1_l2ref_i marks those that reach the L2
//                (L1d misses and, the L1d being write-through, stores);
//                m1_load_i marks loads: PC/DC and P-DFCM learn from loads only
//   m1_l2_hit_o  L2 tag hit per reference
//   cm_i, cm_l2_miss_i   committed load and whether it missed in L2
//   fill_*       block installed in L2 (from L3 or memory), fill_pf_i when it
//                was fetched by a prefetch
//   pf_req_*     prefetch requests towards the L2 queue (valid/ready)
//   ev_o, drop_o, merge_o   observation: events taken, PAB drops and merges
// Timing: L2 tag lookup and event selection are combinational in M1;
// Sequential Tagged issues in the event cycle, Stride one cycle after AG
// (in M1), PC/DC and P-DFCM after their table walks. A PAB entry can leave
// the cycle after it is written.
// Taken from the original description: the four prefetchers and their selected
// configuration (distance four for Stride, degree four for the others), the
// table sizes, the eight-entry buffer, four references per cycle. The event
// arbitration, the run-time selector and the L2 probe of outgoing
// prefetches are this design's own choices.
module pf_top
  import pf_pkg::*;
#(
  parameter int unsigned NREF = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pf_sel_e         sel_i,
  // AG stage
  input  mem_ref_t        ag_i [NREF],
  // M1 stage
  input  mem_ref_t        m1_i [NREF],
  input  logic [NREF-1:0] m1_l2ref_i,
  input  logic [NREF-1:0] m1_load_i,
  output logic [NREF-1:0] m1_l2_hit_o,
  // Commit
  input  mem_ref_t        cm_i,
  input  logic            cm_l2_miss_i,
  // L2 fill
  input  logic            fill_valid_i,
  input  addr_t           fill_addr_i,
  input  logic            fill_pf_i,
  // prefetch requests
  output logic            pf_req_valid_o,
  output addr_t           pf_req_addr_o,
  input  logic            pf_req_ready_i,
  // observation
  output l2_event_t       ev_o,
  output logic [$clog2(NREF+1)-1:0] drop_o,
  output logic [$clog2(NREF+1)-1:0] merge_o
);

  // ---------------- L2 tags
  logic [NREF-1:0] lk_valid, lk_hit, lk_pf_hit;
  addr_t           lk_addr [NREF];
  addr_t           probe_addr;
  logic            probe_hit;

  always_comb begin
    for (int p = 0; p < NREF; p++) begin
      lk_valid[p] = m1_i[p].valid && m1_l2ref_i[p];
      lk_addr[p]  = m1_i[p].addr;
    end
  end

  l2_tags #(.NPORTS(NREF)) u_l2_tags (
    .clk         (clk),
    .rst_n       (rst_n),
    .lk_valid_i  (lk_valid),
    .lk_addr_i   (lk_addr),
    .lk_hit_o    (lk_hit),
    .lk_pf_hit_o (lk_pf_hit),
    .probe_addr_i(probe_addr),
    .probe_hit_o (probe_hit),
    .fill_valid_i(fill_valid_i),
    .fill_addr_i (fill_addr_i),
    .fill_pf_i   (fill_pf_i)
  );

  assign m1_l2_hit_o = lk_hit;

  // ---------------- L2 event selection (one per cycle)
  l2_event_t ev;
  always_comb begin
    ev = '0;
    for (int p = NREF - 1; p >= 0; p--) begin
      if (lk_valid[p] && (!lk_hit[p] || lk_pf_hit[p])) begin
        ev.valid = 1'b1;
        ev.miss  = !lk_hit[p];
        ev.load  = m1_load_i[p];
        ev.pc    = m1_i[p].pc;
        ev.addr  = m1_i[p].addr;
      end
    end
  end
  assign ev_o = ev;

  // ---------------- prefetchers
  logic           seq_v, pcdc_v, pdfcm_v;
  addr_t          seq_a, pcdc_a, pdfcm_a;
  logic [NREF-1:0] str_v;
  addr_t          str_a [NREF];

  seq_tagged_pf #(.MODE(PF_DEGREE), .N(4)) u_seq (
    .clk(clk), .rst_n(rst_n), .ev_i(ev), .pf_valid_o(seq_v), .pf_addr_o(seq_a)
  );

  stride_lt_pf #(.ENTRIES(32), .NRD(NREF), .MODE(PF_DISTANCE), .N(4)) u_stride (
    .clk(clk), .rst_n(rst_n), .ag_i(ag_i), .cm_i(cm_i), .cm_l2_miss_i(cm_l2_miss_i),
    .pf_valid_o(str_v), .pf_addr_o(str_a)
  );

  pcdc_pf #(.IT_ENTRIES(256), .GHB_ENTRIES(256), .MODE(PF_DEGREE), .N(4)) u_pcdc (
    .clk(clk), .rst_n(rst_n), .ev_i(ev), .pf_valid_o(pcdc_v), .pf_addr_o(pcdc_a)
  );

  pdfcm_pf #(.HT_ENTRIES(256), .DT_ENTRIES(512), .MODE(PF_DEGREE), .N(4)) u_pdfcm (
    .clk(clk), .rst_n(rst_n), .ev_i(ev), .pf_valid_o(pdfcm_v), .pf_addr_o(pdfcm_a)
  );

  // ---------------- selector
  logic [NREF-1:0] pab_v;
  addr_t           pab_a [NREF];
  always_comb begin
    pab_v = '0;
    for (int p = 0; p < NREF; p++) pab_a[p] = '0;
    unique case (sel_i)
      SEL_SEQ:    begin pab_v[0] = seq_v;   pab_a[0] = seq_a;   end
      SEL_STRIDE: begin pab_v    = str_v;   pab_a    = str_a;   end
      SEL_PCDC:   begin pab_v[0] = pcdc_v;  pab_a[0] = pcdc_a;  end
      SEL_PDFCM:  begin pab_v[0] = pdfcm_v; pab_a[0] = pdfcm_a; end
      default: ;
    endcase
  end

  // ---------------- Prefetch Address Buffer and L2 filter
  logic  q_valid, q_pop;
  addr_t q_addr;

  pab #(.DEPTH(8), .NIN(NREF)) u_pab (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid_i (pab_v),
    .in_addr_i  (pab_a),
    .out_valid_o(q_valid),
    .out_addr_o (q_addr),
    .out_ready_i(q_pop),
    .drop_o     (drop_o),
    .merge_o    (merge_o)
  );

  assign probe_addr     = q_addr;
  assign pf_req_valid_o = q_valid && !probe_hit;
  assign pf_req_addr_o  = {q_addr[ADDR_W-1:L2_OFF_W], {L2_OFF_W{1'b0}}};
  assign q_pop          = q_valid && (probe_hit || pf_req_ready_i);

endmodule
