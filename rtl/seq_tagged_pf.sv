// seq_tagged_pf: Sequential Tagged prefetcher, working at the L2.
//
// A prefetch is started by an L2 demand miss, or by the first demand
// reference to a block that was itself prefetched (the L2 tag directory
// keeps one prefetch bit per block and reports that hit). The prefetched
// addresses are the L2 blocks that follow the referenced one: with degree N
// the next N blocks, one per cycle; with distance N only the N-th next
// block. The block-aligned base and the block-size step go to a
// pf_sequencer.
//
// Interface: ev_i is the (at most one per cycle) L2 event; pf_valid_o/
// pf_addr_o are block-aligned prefetch addresses. The first prefetch is
// issued in the event cycle, later ones one per cycle.
// Taken from the original description: trigger on miss or first reference, the tag bit
// at L2, degree/distance. The default degree of four is the original evaluation's
// selected configuration.
module seq_tagged_pf
  import pf_pkg::*;
#(
  parameter pf_mode_e    MODE = PF_DEGREE,
  parameter int unsigned N    = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  l2_event_t ev_i,
  output logic      pf_valid_o,
  output addr_t     pf_addr_o
);

  addr_t base;
  assign base = {ev_i.addr[ADDR_W-1:L2_OFF_W], {L2_OFF_W{1'b0}}};

  pf_sequencer #(.MODE(MODE), .N(N)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .trig_i    (ev_i.valid),
    .base_i    (base),
    .step_i    (addr_t'(L2_BLK_B)),
    .pf_valid_o(pf_valid_o),
    .pf_addr_o (pf_addr_o)
  );

endmodule
