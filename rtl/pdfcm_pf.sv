// pdfcm_pf: P-DFCM prefetcher, a delta correlating prefetcher built on the
// organisation of the DFCM value predictor.
//
// Two tables:
//   * History Table (HT), HT_ENTRIES entries, direct mapped by the load PC
//     (word index) with a PC tag. Each entry keeps the last address the
//     load produced, its hashed history of recent deltas and a 2-bit
//     confidence counter.
//   * Delta Table (DT), DT_ENTRIES deltas, indexed by the hashed history.
// The history hash is the fold-and-shift FS R-5 function:
//   hist' = ((hist << 5) ^ fold(delta)) mod DT_ENTRIES
// where fold() XORs the delta's bits down to log2(DT_ENTRIES) bits. With
// 512 DT entries (n = 9) a delta survives two updates, giving a history
// order of ceil(9/5) = 2 deltas.
//
// Update, in the cycle of an L2 event (a demand miss, or the first hit on a
// prefetched block) for load PC with address a:
//   (1) d = a - HT.last;
//   (2) DT[HT.hist] <= d, and the new history hash(HT.hist, d) is formed;
//       the confidence rises if DT[HT.hist] already held d, else falls;
//   (3) HT <= {a, new history, confidence}.
// A load that misses in HT is allocated (history 0, confidence 0) and
// predicts nothing.
// Predict, from the next cycle, one DT read per cycle: d' = DT[hist],
// address a+d', hist = hash(hist, d'). With degree N each of the N
// addresses is issued; with distance N the chain runs N steps and only the
// last address is issued. Prediction needs confidence >= 2 and stops at a
// zero delta. A new L2 event abandons a chain still running.
//
// Only events of loads (ev_i.load) are used; store events are ignored.
// Interface: ev_i (at most one per cycle), pf_valid_o/pf_addr_o.
// Taken from the original description: HT and DT sizes, indexing by PC, HT contents,
// the update steps (1)-(3), the FS R-5 hash and its order, confidence
// counters in HT, training on L2 misses at one per cycle, degree four as
// the selected configuration. Full-width deltas, the counter policy and
// threshold, and chaining predictions through DT for degree/distance above
// one are this design's own choices.
module pdfcm_pf
  import pf_pkg::*;
#(
  parameter int unsigned HT_ENTRIES = 256,
  parameter int unsigned DT_ENTRIES = 512,
  parameter pf_mode_e    MODE       = PF_DEGREE,
  parameter int unsigned N          = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  l2_event_t ev_i,
  output logic      pf_valid_o,
  output addr_t     pf_addr_o
);

  // only loads train and trigger this prefetcher
  logic ev_v;
  assign ev_v = ev_i.valid && ev_i.load;

  localparam int unsigned HI_W  = $clog2(HT_ENTRIES);
  localparam int unsigned H_W   = $clog2(DT_ENTRIES);   // history hash width, n
  localparam int unsigned TAG_W = ADDR_W - 2 - HI_W;
  localparam int unsigned CNT_W = $clog2(N + 1);

  typedef logic [H_W-1:0]   hist_t;
  typedef logic [HI_W-1:0]  hidx_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef struct packed {
    logic       valid;
    tag_t       tag;
    addr_t      last;
    hist_t      hist;
    logic [1:0] conf;
  } ht_entry_t;

  ht_entry_t ht_q [HT_ENTRIES];
  addr_t     dt_q [DT_ENTRIES];

  function automatic hist_t fold(input addr_t d);
    hist_t f;
    f = '0;
    for (int i = 0; i < ADDR_W; i++) f[i % H_W] ^= d[i];
    return f;
  endfunction

  function automatic hist_t fs_r5(input hist_t h, input addr_t d);
    return hist_t'({h, 5'b0}) ^ fold(d);
  endfunction

  // ---- update (event cycle)
  hidx_t     u_idx;
  ht_entry_t u_e;
  logic      u_hit;
  addr_t     u_delta;
  hist_t     u_hist;
  logic [1:0] u_conf;
  always_comb begin
    u_idx   = ev_i.pc[2 +: HI_W];
    u_e     = ht_q[u_idx];
    u_hit   = u_e.valid && u_e.tag == ev_i.pc[ADDR_W-1 -: TAG_W];
    u_delta = ev_i.addr - u_e.last;
    u_hist  = fs_r5(u_e.hist, u_delta);
    u_conf  = u_e.conf;
    if (dt_q[u_e.hist] == u_delta) begin
      if (u_conf != 2'd3) u_conf = u_conf + 2'd1;
    end else if (u_conf != 2'd0) begin
      u_conf = u_conf - 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HT_ENTRIES; i++) ht_q[i] <= '0;
      for (int i = 0; i < DT_ENTRIES; i++) dt_q[i] <= '0;
    end else if (ev_v) begin
      if (u_hit) begin
        dt_q[u_e.hist] <= u_delta;
        ht_q[u_idx]    <= '{valid: 1'b1, tag: u_e.tag, last: ev_i.addr, hist: u_hist, conf: u_conf};
      end else begin
        ht_q[u_idx]    <= '{valid: 1'b1, tag: ev_i.pc[ADDR_W-1 -: TAG_W], last: ev_i.addr,
                            hist: '0, conf: 2'd0};
      end
    end
  end

  // ---- predict chain
  logic             busy_q;
  hist_t            p_hist_q;
  addr_t            p_addr_q;
  logic [CNT_W-1:0] p_left_q;
  addr_t            p_delta;
  addr_t            p_next;

  assign p_delta = dt_q[p_hist_q];
  assign p_next  = p_addr_q + p_delta;

  always_comb begin
    pf_valid_o = 1'b0;
    pf_addr_o  = p_next;
    if (busy_q && !ev_v && p_delta != '0)
      pf_valid_o = (MODE == PF_DEGREE) || (p_left_q == CNT_W'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      p_hist_q <= '0;
      p_addr_q <= '0;
      p_left_q <= '0;
    end else if (ev_v) begin
      busy_q   <= u_hit && u_conf >= 2'd2;
      p_hist_q <= u_hist;
      p_addr_q <= ev_i.addr;
      p_left_q <= CNT_W'(N);
    end else if (busy_q) begin
      p_hist_q <= fs_r5(p_hist_q, p_delta);
      p_addr_q <= p_next;
      p_left_q <= p_left_q - 1'b1;
      busy_q   <= (p_left_q > CNT_W'(1)) && (p_delta != '0);
    end
  end

endmodule
