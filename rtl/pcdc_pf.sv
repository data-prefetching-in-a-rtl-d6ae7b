// pcdc_pf: PC/DC prefetcher, delta correlation over a Global History
// Buffer (GHB) keyed by the load PC.
//
// Tables:
//   * Index Table (IT), IT_ENTRIES entries, direct mapped by the load PC
//     (word index) with a PC tag; each holds the GHB position of the most
//     recent L2 event of that load.
//   * GHB, GHB_ENTRIES entries, a circular buffer filled in L2-event order.
//     Each entry holds the address and a link to the previous entry of the
//     same load. Positions carry one extra wrap bit, so a link that points
//     to an entry already overwritten is recognised as stale.
// Operation, for an L2 event (demand miss, or first hit on a prefetched
// block) of load PC at address a:
//   Update (event cycle): read IT, write the GHB head entry {a, link to the
//     IT pointer}, write IT with the new head.
//   Walk (one GHB read per cycle): follow the links, collecting up to HIST
//     addresses of this load, newest first.
//   Search (one cycle): form the deltas d0 (newest), d1, ... and look for
//     the nearest older pair (dk, dk+1) equal to (d0, d1), k >= 1.
//   Issue (one per cycle): replay the deltas that followed the match,
//     dk-1 ... d0, repeating with period k, adding each to a. Degree N
//     issues the first N addresses; distance N only the N-th.
// A new L2 event overrides a walk, search or issue still in progress.
// Only events of loads (ev_i.load) are used; store events are ignored.
//
// Interface: ev_i (at most one per cycle), pf_valid_o/pf_addr_o.
// Taken from the original description: IT and GHB sizes, PC as key, insertion and
// prediction on L2 misses and first hits on prefetched lines, one table
// access per cycle for the walk, override by a later miss, degree four as
// the selected configuration. The IT read, GHB write and IT write are done
// in one cycle here (separate read and write ports), so that one event per
// cycle is accepted; HIST, the wrap-bit staleness test and the periodic
// replay are this design's own choices.
module pcdc_pf
  import pf_pkg::*;
#(
  parameter int unsigned IT_ENTRIES  = 256,
  parameter int unsigned GHB_ENTRIES = 256,
  parameter int unsigned HIST        = 16,
  parameter pf_mode_e    MODE        = PF_DEGREE,
  parameter int unsigned N           = 4
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

  localparam int unsigned II_W  = $clog2(IT_ENTRIES);
  localparam int unsigned P_W   = $clog2(GHB_ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - II_W;
  localparam int unsigned H_W   = $clog2(HIST + 1);
  localparam int unsigned CNT_W = $clog2(N + 1);

  typedef logic [P_W:0]     ptr_t;   // position with wrap bit
  typedef logic [TAG_W-1:0] tag_t;

  typedef struct packed {
    logic valid;
    tag_t tag;
    ptr_t head;
  } it_entry_t;

  typedef struct packed {
    addr_t addr;
    logic  lvalid;
    ptr_t  link;
  } ghb_entry_t;

  typedef enum logic [1:0] {S_IDLE, S_WALK, S_SEARCH, S_ISSUE} state_e;

  it_entry_t  it_q  [IT_ENTRIES];
  ghb_entry_t ghb_q [GHB_ENTRIES];
  ptr_t       wr_q;                    // next GHB position to write

  // an entry at position p is live if it is one of the last GHB_ENTRIES written
  function automatic logic live(input ptr_t p, input ptr_t wr);
    ptr_t age;
    age = wr - p;
    return age != '0 && age <= ptr_t'(GHB_ENTRIES);
  endfunction

  // ---- update
  logic [II_W-1:0] u_idx;
  tag_t            u_tag;
  it_entry_t       u_it;
  logic            u_link_ok;
  assign u_idx     = ev_i.pc[2 +: II_W];
  assign u_tag     = ev_i.pc[ADDR_W-1 -: TAG_W];
  assign u_it      = it_q[u_idx];
  assign u_link_ok = u_it.valid && u_it.tag == u_tag && live(u_it.head, wr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0;
      for (int i = 0; i < IT_ENTRIES; i++) it_q[i] <= '0;
      for (int i = 0; i < GHB_ENTRIES; i++) ghb_q[i] <= '0;
    end else if (ev_v) begin
      ghb_q[wr_q[P_W-1:0]] <= '{addr: ev_i.addr, lvalid: u_link_ok, link: u_it.head};
      it_q[u_idx]          <= '{valid: 1'b1, tag: u_tag, head: wr_q};
      wr_q                 <= wr_q + 1'b1;
    end
  end

  // ---- walk / search / issue
  state_e           st_q;
  addr_t            hist_q [HIST];     // hist_q[0] is the newest address
  logic [H_W-1:0]   cnt_q;
  ptr_t             ptr_q;
  logic             ptr_v_q;
  logic [H_W-1:0]   k_q;               // pattern period
  logic [H_W-1:0]   j_q;               // index of the next delta to apply
  addr_t            cur_q;
  logic [CNT_W-1:0] left_q;

  ghb_entry_t g;
  assign g = ghb_q[ptr_q[P_W-1:0]];

  function automatic addr_t delta(input int unsigned j);
    return hist_q[j] - hist_q[j+1];
  endfunction

  // search: nearest k >= 1 with (d[k], d[k+1]) == (d[0], d[1])
  logic           s_found;
  logic [H_W-1:0] s_k;
  always_comb begin
    s_found = 1'b0;
    s_k     = '0;
    for (int k = HIST - 3; k >= 1; k--) begin
      if (k + 2 < int'(cnt_q) && delta(k) == delta(0) && delta(k + 1) == delta(1)) begin
        s_found = 1'b1;
        s_k     = H_W'(k);
      end
    end
  end

  addr_t i_delta, i_next;
  assign i_delta = delta(int'(j_q));
  assign i_next  = cur_q + i_delta;

  always_comb begin
    pf_valid_o = 1'b0;
    pf_addr_o  = i_next;
    if (st_q == S_ISSUE && !ev_v)
      pf_valid_o = (MODE == PF_DEGREE) || (left_q == CNT_W'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      cnt_q   <= '0;
      ptr_q   <= '0;
      ptr_v_q <= 1'b0;
      k_q     <= '0;
      j_q     <= '0;
      cur_q   <= '0;
      left_q  <= '0;
      for (int i = 0; i < HIST; i++) hist_q[i] <= '0;
    end else if (ev_v) begin
      hist_q[0] <= ev_i.addr;
      cnt_q     <= H_W'(1);
      ptr_q     <= u_it.head;
      ptr_v_q   <= u_link_ok;
      st_q      <= u_link_ok ? S_WALK : S_IDLE;
    end else begin
      unique case (st_q)
        S_IDLE: ;
        S_WALK: begin
          if (ptr_v_q && live(ptr_q, wr_q) && cnt_q < H_W'(HIST)) begin
            hist_q[cnt_q[$clog2(HIST)-1:0]] <= g.addr;
            cnt_q         <= cnt_q + 1'b1;
            ptr_q         <= g.link;
            ptr_v_q       <= g.lvalid;
          end else begin
            st_q <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          k_q    <= s_k;
          j_q    <= s_k - 1'b1;
          cur_q  <= hist_q[0];
          left_q <= CNT_W'(N);
          st_q   <= s_found ? S_ISSUE : S_IDLE;
        end
        S_ISSUE: begin
          cur_q  <= i_next;
          j_q    <= (j_q == '0) ? k_q - 1'b1 : j_q - 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == CNT_W'(1)) st_q <= S_IDLE;
        end
      endcase
    end
  end

endmodule
