// pab: Prefetch Address Buffer.
//
// Holds up to DEPTH (eight) prefetch addresses between the prefetchers and
// the L2 request queue. Up to NIN addresses can arrive in one cycle (the
// Stride prefetcher looks up four loads per cycle); they are taken in port
// order. An address whose L2 block is already in the buffer, or that arrives
// twice in one cycle, is merged; an address that finds the buffer full is
// dropped and reported on drop_o. The oldest entry leaves when out_ready_i
// is high (first-in first-out).
//
// Interface: in_valid_i/in_addr_i (NIN ports), out_valid_o/out_addr_o/
// out_ready_i (valid-ready, one per cycle), drop_o/merge_o (count of
// addresses dropped/merged this cycle). An address written in cycle t can
// leave in cycle t+1.
// Taken from the original description: the depth of eight addresses. Merging, dropping
// when full and FIFO order are this design's own choices.
module pab
  import pf_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NIN   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NIN-1:0]           in_valid_i,
  input  addr_t                    in_addr_i [NIN],
  output logic                     out_valid_o,
  output addr_t                    out_addr_o,
  input  logic                     out_ready_i,
  output logic [$clog2(NIN+1)-1:0] drop_o,
  output logic [$clog2(NIN+1)-1:0] merge_o
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned BLK_W = ADDR_W - L2_OFF_W;

  addr_t            mem_q   [DEPTH];
  logic [PTR_W-1:0] head_q;
  logic [PTR_W:0]   count_q;

  addr_t            mem_d   [DEPTH];
  logic [PTR_W-1:0] head_d;
  logic [PTR_W:0]   count_d;

  function automatic logic [BLK_W-1:0] blk(input addr_t a);
    return a[ADDR_W-1:L2_OFF_W];
  endfunction

  assign out_valid_o = (count_q != 0);
  assign out_addr_o  = mem_q[head_q];

  always_comb begin
    logic             dup;
    logic [PTR_W-1:0] slot;
    dup     = 1'b0;
    slot    = '0;
    mem_d   = mem_q;
    head_d  = head_q;
    count_d = count_q;
    drop_o  = '0;
    merge_o = '0;
    // pop first: the slot it frees is usable this cycle
    if (out_valid_o && out_ready_i) begin
      head_d  = head_q + 1'b1;
      count_d = count_q - 1'b1;
    end
    for (int p = 0; p < NIN; p++) begin
      if (in_valid_i[p]) begin
        dup = 1'b0;
        for (int e = 0; e < DEPTH; e++) begin
          slot = head_d + PTR_W'(e);
          if ((PTR_W+1)'(e) < count_d && blk(mem_d[slot]) == blk(in_addr_i[p])) dup = 1'b1;
        end
        if (dup) begin
          merge_o = merge_o + 1'b1;
        end else if (count_d == (PTR_W+1)'(DEPTH)) begin
          drop_o = drop_o + 1'b1;
        end else begin
          mem_d[head_d + count_d[PTR_W-1:0]] = in_addr_i[p];
          count_d = count_d + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      count_q <= '0;
      for (int e = 0; e < DEPTH; e++) mem_q[e] <= '0;
    end else begin
      head_q  <= head_d;
      count_q <= count_d;
      mem_q   <= mem_d;
    end
  end

endmodule
