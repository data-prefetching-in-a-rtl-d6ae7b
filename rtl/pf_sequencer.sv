// pf_sequencer: turns one prefetch trigger into the addresses that the
// prefetch degree or distance asks for.
//
// A trigger brings a base address and a step (a block size, a stride or a
// delta, two's complement). With MODE = PF_DEGREE the sequencer issues
// base+step in the trigger cycle and base+2*step ... base+N*step in the
// following N-1 cycles, one per cycle, as the prefetchers do for a degree
// above one. With MODE = PF_DISTANCE it issues only base+N*step, in the
// trigger cycle. A new trigger abandons a sequence still in progress.
//
// Interface: trig_i/base_i/step_i in; pf_valid_o/pf_addr_o out, combinational
// from the trigger in its own cycle, registered afterwards. No back-pressure:
// the buffer downstream drops what it cannot hold.
// Taken from the original description: degree, distance and the one-per-cycle rate of
// the second and later prefetches. The override by a new trigger is this
// design's own choice.
module pf_sequencer
  import pf_pkg::*;
#(
  parameter pf_mode_e    MODE = PF_DEGREE,
  parameter int unsigned N    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trig_i,
  input  addr_t base_i,
  input  addr_t step_i,
  output logic  pf_valid_o,
  output addr_t pf_addr_o
);

  localparam int unsigned CNT_W = (N > 1) ? $clog2(N) + 1 : 1;

  logic             busy_q;
  addr_t            cur_q;   // last address issued
  addr_t            step_q;
  logic [CNT_W-1:0] left_q;  // prefetches still to issue

  always_comb begin
    pf_valid_o = 1'b0;
    pf_addr_o  = '0;
    if (trig_i) begin
      pf_valid_o = 1'b1;
      pf_addr_o  = (MODE == PF_DISTANCE) ? base_i + addr_t'(N) * step_i : base_i + step_i;
    end else if (busy_q) begin
      pf_valid_o = 1'b1;
      pf_addr_o  = cur_q + step_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cur_q  <= '0;
      step_q <= '0;
      left_q <= '0;
    end else if (trig_i) begin
      cur_q  <= base_i + step_i;
      step_q <= step_i;
      left_q <= CNT_W'(N - 1);
      busy_q <= (MODE == PF_DEGREE) && (N > 1);
    end else if (busy_q) begin
      cur_q  <= cur_q + step_q;
      left_q <= left_q - 1'b1;
      busy_q <= (left_q > 1);
    end
  end

endmodule
