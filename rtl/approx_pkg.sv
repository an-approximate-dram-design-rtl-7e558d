// approx_pkg: types and constants shared by the approximate-DRAM memory controller.
//
// The approximate rank is built from 16 x4 DRAM devices that together form the 64-bit channel.
// A 64-bit beat carries two single-precision words; device n stores bits [2n+1:2n] of both words.
// Devices 11..15 hold bits [31:22] (sign, exponent and the top mantissa bit) and are refreshed every
// 64-ms round; devices 0..10 hold mantissa bits and are refreshed less often. A 64-byte cache
// line is one burst of eight beats. The command encoding below is an abstraction of the DDR3
// command bus (RAS/CAS/WE decoded into an enum); it is this design's own choice.
package approx_pkg;

  localparam int unsigned NUM_DEV       = 16;  // x4 devices in the approximate rank
  localparam int unsigned DEV_W         = 4;   // data pins per approximate device
  localparam int unsigned NUM_DEV_P     = 8;   // x8 devices in the precise rank
  localparam int unsigned WORD_W        = 32;  // single-precision float
  localparam int unsigned BEAT_W        = 64;  // rank data width
  localparam int unsigned BURST_LEN     = 8;   // BL = 8
  localparam int unsigned LINE_W        = BEAT_W * BURST_LEN;  // 512-bit cache line
  localparam int unsigned FIRST_PRECISE = 11;  // devices 11..15 are precise
  localparam int unsigned PERIOD_W      = 12;  // refresh period in 64-ms rounds, up to 262 s
  localparam int unsigned BANK_W        = 3;   // 8 banks per DDR3 device
  localparam int unsigned ROW_W         = 16;  // 64K rows in a 4 Gb device
  localparam int unsigned COL_W         = 11;  // column address width of the command bus
  localparam int unsigned LINE_ADDR_W   = 28;  // 16 GB of 64-byte lines
  localparam int unsigned NUM_RANKS     = 2;   // rank 0 precise, rank 1 approximate
  localparam int unsigned NUM_BANKS     = 2**BANK_W;
  localparam int unsigned TAG_W         = 8;   // request tag, returned with the response

  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_RD  = 3'd2,
    CMD_WR  = 3'd3,
    CMD_PRE = 3'd4,
    CMD_REF = 3'd5
  } dram_cmd_e;

  typedef enum logic {
    REGION_PRECISE = 1'b0,
    REGION_APPROX  = 1'b1
  } region_e;

  // Location of a cache line inside the hybrid memory.
  typedef struct packed {
    region_e              region;
    logic [BANK_W-1:0]    bank;
    logic [ROW_W-1:0]     row;
    logic [COL_W-1:0]     col;    // first column of the burst
  } dram_loc_t;

  // Run-time refresh configuration, in units of the normal 64-ms refresh round.
  typedef struct packed {
    logic                 approx_off;  // 1: approximate devices are never refreshed
    logic [PERIOD_W-1:0]  incr;        // period step between neighbouring approximate devices
    logic [PERIOD_W-1:0]  offset;      // period of device 10, the most significant approximate one
  } refresh_cfg_t;

  typedef logic [PERIOD_W-1:0] period_t;

  // Open-row state of every bank of both ranks, exported by the sequencer to the scheduler.
  typedef struct packed {
    logic              open;
    logic [ROW_W-1:0]  row;
  } bank_state_t;

  // One queued cache-line request.
  typedef struct packed {
    logic              we;
    logic [TAG_W-1:0]  tag;
    dram_loc_t         loc;
    logic [LINE_W-1:0] data;
  } mem_req_t;

endpackage
