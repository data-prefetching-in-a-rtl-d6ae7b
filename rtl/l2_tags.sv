// l2_tags: tag directory of the second-level cache, with one prefetch bit
// per entry.
//
// The L2 holds 256 KB in 128-byte blocks, 8 ways, so 256 sets. Every entry
// keeps a valid bit, the tag and a prefetch bit that is set when the block
// was brought in by a prefetch. NPORTS demand references look up the tags
// in the same cycle (the M1 stage, in parallel with L1d). A demand hit on a
// block whose prefetch bit is set is reported on pf_hit_o and clears the
// bit: this is the "first reference" that Sequential Tagged prefetching
// and the PC/DC and P-DFCM training use. A probe port answers whether a
// block is present without side effects, so that prefetches to resident
// blocks can be discarded. One fill port installs a block returned by L3 or
// memory, into an invalid way if there is one, otherwise into the way named
// by a per-set round-robin pointer.
//
// Timing: lookups and the probe are combinational; the prefetch-bit clear
// and the fill take effect at the next clock edge. A fill of a block that
// is already present changes nothing.
// Taken from the original description: the geometry, the extra bit per L2 tag entry,
// four references per cycle. Round-robin replacement, the probe port and
// the reset-to-invalid state are this design's own choices.
module l2_tags
  import pf_pkg::*;
#(
  parameter int unsigned SIZE_B = 262144,  // 256 KB
  parameter int unsigned WAYS   = 8,
  parameter int unsigned BLK_B  = 128,
  parameter int unsigned NPORTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // demand lookups (M1)
  input  logic [NPORTS-1:0] lk_valid_i,
  input  addr_t             lk_addr_i [NPORTS],
  output logic [NPORTS-1:0] lk_hit_o,
  output logic [NPORTS-1:0] lk_pf_hit_o,
  // side-effect-free probe
  input  addr_t             probe_addr_i,
  output logic              probe_hit_o,
  // fill
  input  logic              fill_valid_i,
  input  addr_t             fill_addr_i,
  input  logic              fill_pf_i
);

  localparam int unsigned SETS  = SIZE_B / (WAYS * BLK_B);
  localparam int unsigned OFF_W = $clog2(BLK_B);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic [WAYS-1:0] valid_q [SETS];
  logic [WAYS-1:0] pbit_q  [SETS];
  tag_t            tag_q   [SETS][WAYS];
  logic [WAY_W-1:0] rr_q   [SETS];

  function automatic idx_t idx_of(input addr_t a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(input addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // lookups
  logic [WAY_W-1:0] lk_way [NPORTS];
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lk_hit_o[p]    = 1'b0;
      lk_pf_hit_o[p] = 1'b0;
      lk_way[p]      = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[idx_of(lk_addr_i[p])][w] && tag_q[idx_of(lk_addr_i[p])][w] == tag_of(lk_addr_i[p])) begin
          lk_hit_o[p] = lk_valid_i[p];
          lk_way[p]   = WAY_W'(w);
        end
      end
      lk_pf_hit_o[p] = lk_hit_o[p] && pbit_q[idx_of(lk_addr_i[p])][lk_way[p]];
    end
  end

  // probe
  always_comb begin
    probe_hit_o = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[idx_of(probe_addr_i)][w] && tag_q[idx_of(probe_addr_i)][w] == tag_of(probe_addr_i))
        probe_hit_o = 1'b1;
  end

  // fill: way choice
  idx_t             f_idx;
  logic             f_present;
  logic             f_has_inv;
  logic [WAY_W-1:0] f_inv_way;
  logic [WAY_W-1:0] f_way;
  always_comb begin
    f_idx     = idx_of(fill_addr_i);
    f_present = 1'b0;
    f_has_inv = 1'b0;
    f_inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[f_idx][w]) begin
        f_has_inv = 1'b1;
        f_inv_way = WAY_W'(w);
      end
      if (valid_q[f_idx][w] && tag_q[f_idx][w] == tag_of(fill_addr_i)) f_present = 1'b1;
    end
    f_way = f_has_inv ? f_inv_way : rr_q[f_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        pbit_q[s]  <= '0;
        rr_q[s]    <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++)
        if (lk_pf_hit_o[p]) pbit_q[idx_of(lk_addr_i[p])][lk_way[p]] <= 1'b0;
      if (fill_valid_i && !f_present) begin
        valid_q[f_idx][f_way] <= 1'b1;
        pbit_q[f_idx][f_way]  <= fill_pf_i;
        if (!f_has_inv) rr_q[f_idx] <= rr_q[f_idx] + 1'b1;
      end
    end
  end

  // tags need no reset: an entry is only read when its valid bit is set
  always_ff @(posedge clk) begin
    if (fill_valid_i && !f_present) tag_q[f_idx][f_way] <= tag_of(fill_addr_i);
  end

endmodule
