// mpu_pkg: widths, types and constants shared by the memory
// profiling unit (MPU).
//
// Every counter of every address monitor is named on the profiling bus by a
// 16-bit global key whose low 9 bits are the counter index inside a monitor
// and whose next 5 bits are the monitor number (so only 14 bits are used).
// Counters and profile values are 36 bits wide, the width of one block-RAM
// word holding a counter. The 32-bit address, the 9-bit query index, the
// 5-bit size code, 16-bit key and 36-bit value widths are the ones printed on
// the module schematics; the valid flags and the struct grouping are this
// design's own.
package mpu_pkg;

  localparam int unsigned ADDR_W   = 32;  // memory bus address width
  localparam int unsigned CNT_W    = 36;  // counter / profile value width
  localparam int unsigned KEY_W    = 16;  // global key width on the profiling bus
  localparam int unsigned IDX_W    = 9;   // counter index inside one monitor
  localparam int unsigned NCNT     = 1 << IDX_W;  // 512 counters per monitor
  localparam int unsigned SIZE_W   = 5;   // width of the region size code
  localparam int unsigned MON_W    = 5;   // monitor select bits of the scan counter
  localparam int unsigned NMON     = 1 << MON_W;  // 32 address monitors
  localparam int unsigned SCAN_W   = MON_W + IDX_W;  // 14-bit scan counter
  localparam int unsigned LIST_LEN = 4;   // entries of one TOP4/FLOP4 list

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [IDX_W-1:0]  idx_t;

  // One key/value pair as held in a sorted profile list.
  typedef struct packed {
    logic valid;
    key_t key;
    cnt_t value;
  } entry_t;

  // One beat of the profiling bus driven by the update logic.
  typedef struct packed {
    logic valid;
    key_t key;
    cnt_t reads;
    cnt_t writes;
  } prof_bus_t;

  // Per-cycle event flags of the whole unit, for debug and statistics.
  typedef struct packed {
    logic access_hit;   // a counted reference hit at least one monitor
    logic bypass;       // a back-to-back increment of one counter was forwarded
    logic scan_wrap;    // the update logic finished a full sweep
    logic prof_update;  // a profiler took a beat from the profiling bus
    logic list_insert;  // a new key entered some profile list
    logic list_move;    // a listed key changed its slot in some profile list
  } mpu_events_t;

  // Upper two bits of a profiler's 4-bit profile index.
  typedef enum logic [1:0] {
    PROF_MOST_READ   = 2'd0,
    PROF_LEAST_READ  = 2'd1,
    PROF_MOST_WRITE  = 2'd2,
    PROF_LEAST_WRITE = 2'd3
  } profile_sel_e;

  // Global key of counter `idx` in monitor `mon`.
  function automatic key_t make_key(input logic [MON_W-1:0] mon, input idx_t idx);
    return key_t'({mon, idx});
  endfunction

endpackage
