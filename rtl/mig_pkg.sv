// mig_pkg: types and default sizes shared by the locked-cache migration design.
//
// The defaults are the evaluated platform: 32-byte lines, 8 KB 8-way private L2
// (32 sets), 256-bit cache-to-cache bus, four Region Register pairs, cache access
// D = 10 cycles and processor-to-processor (bus) delay B = 2 cycles. The PID width,
// the core-id width and the message layout are this design's own choices.
package mig_pkg;

  parameter int unsigned NUM_CORES  = 4;
  parameter int unsigned CORE_W     = 2;
  parameter int unsigned ADDR_W     = 32;
  parameter int unsigned LINE_BYTES = 32;
  parameter int unsigned OFF_W      = 5;            // log2(LINE_BYTES)
  parameter int unsigned LINE_W     = 8 * LINE_BYTES; // 256 bits = bus width
  parameter int unsigned PID_W      = 8;
  parameter int unsigned NUM_RR     = 4;            // Region Register pairs
  parameter int unsigned L2_BYTES   = 8192;
  parameter int unsigned L2_WAYS    = 8;
  parameter int unsigned L2_SETS    = L2_BYTES / (LINE_BYTES * L2_WAYS);
  parameter int unsigned D_CYC      = 10;           // L2 access latency
  parameter int unsigned B_CYC      = 2;            // cache-to-cache bus delay
  parameter int unsigned OFFS_W     = 16;           // start-offset register width
  parameter int unsigned CNT_W      = 16;           // cycle / event counters

  // Migration scheme selected per migration.
  typedef enum logic [2:0] {
    MODE_RCM          = 3'd0,  // Regional Cache Migration, serialized
    MODE_CCMP         = 3'd1,  // Controlled Cache Migration Pipelining (2 pending)
    MODE_SCMP         = 3'd2,  // Streamed Cache Migration Pipelining
    MODE_SSCM         = 3'd3,  // Set-Scan Cache Migration
    MODE_SLOTTED      = 3'd4,  // Slotted-SSCM
    MODE_SLOTTED_PIPE = 3'd5   // Slotted-SSCM Pipelining
  } mig_mode_e;

  // Cache-to-cache bus message kinds.
  typedef enum logic [1:0] {
    MSG_PUSH     = 2'd0,  // source -> target: one locked line
    MSG_ACK      = 2'd1,  // target -> source: line written
    MSG_INIT     = 2'd2,  // target -> source: packed Region Registers, start
    MSG_INIT_ACK = 2'd3   // source -> target: region block taken
  } msg_type_e;

  // Cache port operations.
  typedef enum logic [1:0] {
    OP_READ     = 2'd0,  // look up one line, no state change
    OP_MIG_READ = 2'd1,  // look up one line, match if locked; clear its lock
    OP_SET_SCAN = 2'd2,  // read a whole set, match locked lines of a PID; clear their locks
    OP_INSTALL  = 2'd3   // write one line with PID and lock bit
  } cache_op_e;

  typedef struct packed {
    logic [ADDR_W-1:0] start_a;  // first byte address of the region (line aligned)
    logic [ADDR_W-1:0] end_a;    // one past the last byte of the region
  } region_t;

  typedef struct packed {
    msg_type_e         mtype;
    logic [CORE_W-1:0] src;
    logic [CORE_W-1:0] dst;
    mig_mode_e         mode;
    logic [PID_W-1:0]  pid;
    logic [ADDR_W-1:0] addr;
    logic [LINE_W-1:0] data;     // line data, or the packed region block
  } bus_msg_t;

  // Per-core target context, written by the scheduler before a migration phase.
  typedef struct packed {
    logic                     valid;
    logic [CORE_W-1:0]        src;
    logic [OFFS_W-1:0]        offset;
    mig_mode_e                mode;
    logic [PID_W-1:0]         pid;
    region_t [NUM_RR-1:0]     regions;
  } target_ctx_t;

endpackage
