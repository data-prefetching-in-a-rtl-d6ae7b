// stride_lt_pf: Stride prefetcher with on-miss insertion in the Load Table.
//
// The Load Table (LT) has ENTRIES entries, direct mapped by the load PC
// (word index), each with the PC tag, the last address, the stride and a
// 2-bit saturating confidence counter. It has NRD read ports and one write
// port.
//   * AG stage: every load (up to NRD per cycle) reads the LT with its PC
//     and its freshly generated address. A hit with confidence >= 2 and a
//     non-zero stride s arms a prefetch.
//   * M1 stage (next cycle): the armed prefetch is issued through a
//     pf_sequencer: a+N*s for distance N, or a+s ... a+N*s for degree N.
//   * Commit: a load that hits in the LT updates its entry (stride compare,
//     confidence, last address), whether or not it missed in the cache; a
//     load that misses in the LT is inserted only if it missed in L2.
//
// Confidence: +1 (saturating) when the new stride equals the stored one,
// otherwise -1, and the stored stride is replaced while the counter is
// below 2. A new entry starts with stride 0 and confidence 0.
// Taken from the original description: 32 entries, four read ports and one write port,
// AG read / M1 issue / Commit update, on-miss insertion, confidence
// counter, distance four as the selected configuration. The direct-mapped
// organisation, the counter policy and the threshold are own choices.
module stride_lt_pf
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned NRD     = 4,
  parameter pf_mode_e    MODE    = PF_DISTANCE,
  parameter int unsigned N       = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // AG-stage lookups
  input  mem_ref_t       ag_i [NRD],
  // Commit-stage update
  input  mem_ref_t       cm_i,
  input  logic           cm_l2_miss_i,
  // M1-stage prefetches
  output logic [NRD-1:0] pf_valid_o,
  output addr_t          pf_addr_o [NRD]
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef struct packed {
    logic       valid;
    tag_t       tag;
    addr_t      last;
    addr_t      stride;
    logic [1:0] conf;
  } lt_entry_t;

  lt_entry_t lt_q [ENTRIES];

  function automatic idx_t idx_of(input addr_t pc);
    return pc[2 +: IDX_W];
  endfunction
  function automatic tag_t tag_of(input addr_t pc);
    return pc[ADDR_W-1 -: TAG_W];
  endfunction

  // ---- AG: read ports, registered into M1
  logic [NRD-1:0] arm_q;
  addr_t          base_q   [NRD];
  addr_t          stride_q [NRD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arm_q <= '0;
      for (int p = 0; p < NRD; p++) begin
        base_q[p]   <= '0;
        stride_q[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NRD; p++) begin
        lt_entry_t e;
        e = lt_q[idx_of(ag_i[p].pc)];
        arm_q[p]    <= ag_i[p].valid && e.valid && e.tag == tag_of(ag_i[p].pc) &&
                       e.conf >= 2'd2 && e.stride != '0;
        base_q[p]   <= ag_i[p].addr;
        stride_q[p] <= e.stride;
      end
    end
  end

  // ---- M1: issue
  for (genvar p = 0; p < NRD; p++) begin : g_seq
    pf_sequencer #(.MODE(MODE), .N(N)) u_seq (
      .clk       (clk),
      .rst_n     (rst_n),
      .trig_i    (arm_q[p]),
      .base_i    (base_q[p]),
      .step_i    (stride_q[p]),
      .pf_valid_o(pf_valid_o[p]),
      .pf_addr_o (pf_addr_o[p])
    );
  end

  // ---- Commit: the single write port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) lt_q[i] <= '0;
    end else if (cm_i.valid) begin
      lt_entry_t e;
      addr_t     s;
      e = lt_q[idx_of(cm_i.pc)];
      s = cm_i.addr - e.last;
      if (e.valid && e.tag == tag_of(cm_i.pc)) begin
        if (s == e.stride) begin
          if (e.conf != 2'd3) e.conf = e.conf + 2'd1;
        end else begin
          if (e.conf < 2'd2) e.stride = s;
          if (e.conf != 2'd0) e.conf = e.conf - 2'd1;
        end
        e.last = cm_i.addr;
        lt_q[idx_of(cm_i.pc)] <= e;
      end else if (cm_l2_miss_i) begin
        lt_q[idx_of(cm_i.pc)] <= '{valid: 1'b1, tag: tag_of(cm_i.pc), last: cm_i.addr,
                                    stride: '0, conf: 2'd0};
      end
    end
  end

endmodule
