// pf_pkg: types and constants shared by the L2 prefetch subsystem.
//
// Addresses are 32-bit byte addresses. The L2 geometry (256 KB, 8-way,
// 128-byte blocks) follows the baseline cache hierarchy; the address width,
// the enum encodings and the reference struct are this design's own choices.
package pf_pkg;

  localparam int unsigned ADDR_W   = 32;   // byte address / PC width (own choice)
  localparam int unsigned L2_BLK_B = 128;  // L2 block size in bytes
  localparam int unsigned L2_OFF_W = $clog2(L2_BLK_B);

  typedef logic [ADDR_W-1:0] addr_t;

  // How a prefetcher spends its aggressiveness N:
  //   PF_DEGREE   : issue base+1*step ... base+N*step, one per cycle
  //   PF_DISTANCE : issue only base+N*step
  typedef enum logic {
    PF_DEGREE   = 1'b0,
    PF_DISTANCE = 1'b1
  } pf_mode_e;

  // Which prefetcher feeds the Prefetch Address Buffer.
  typedef enum logic [2:0] {
    SEL_NONE   = 3'd0,
    SEL_SEQ    = 3'd1,
    SEL_STRIDE = 3'd2,
    SEL_PCDC   = 3'd3,
    SEL_PDFCM  = 3'd4
  } pf_sel_e;

  // One memory reference as seen at a stage of the memory pipeline.
  typedef struct packed {
    logic  valid;
    addr_t pc;
    addr_t addr;
  } mem_ref_t;

  // An L2 event that trains the L2-level prefetchers: a demand miss, or a
  // demand hit on a block whose prefetch bit is still set.
  typedef struct packed {
    logic  valid;
    logic  miss;      // 1: L2 miss, 0: first hit on a prefetched block
    logic  load;      // the reference is a load (stores train only Sequential Tagged)
    addr_t pc;
    addr_t addr;
  } l2_event_t;

endpackage
