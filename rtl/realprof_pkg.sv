// realprof_pkg -- constants shared by the REALprof profiler modules.
//
// Holds the register map of the controller (five 32-bit registers at
// 4-byte spacing from the slave's base address), the event numbering of the
// monitors (event 0 is the program counter, events 1..16 are processor
// hardware events), the bit layout of the Status register and the states of
// the control unit.  The register offsets and the event list follow the
// published description of REALprof; the Status bit layout, the record
// window address split and the state encoding are this design's choices.
package realprof_pkg;

  // Register indices (byte offset / 4)
  typedef enum logic [2:0] {
    REG_STATUS     = 3'd0,  // 0x00 control / status
    REG_PERIOD     = 3'd1,  // 0x04 sampling period in cycles
    REG_OFFSET     = 3'd2,  // 0x08 start offset in cycles
    REG_SAMPLE_NUM = 3'd3,  // 0x0C number of records taken (read-only)
    REG_EVENT_MASK = 3'd4   // 0x10 per-event-number enable
  } reg_idx_e;

  // Status register bits
  localparam int unsigned ST_START   = 0;  // RW: 1 = armed or running
  localparam int unsigned ST_WAITING = 1;  // RO: counting the start offset
  localparam int unsigned ST_RUNNING = 2;  // RO: monitors enabled (En)
  localparam int unsigned ST_DONE    = 3;  // RO: all records filled

  // Monitor event numbers
  typedef enum logic [4:0] {
    EV_PC          = 5'd0,   // program counter
    EV_ICMISS_STALL = 5'd1,  // pipeline stall on instruction cache miss
    EV_DCMISS_STALL = 5'd2,  // pipeline stall on data cache miss
    EV_MUL         = 5'd3,
    EV_DIV         = 5'd4,
    EV_IC_HIT      = 5'd5,
    EV_DC_RD_HIT   = 5'd6,
    EV_DC_WR_HIT   = 5'd7,
    EV_IC_MISS     = 5'd8,
    EV_DC_RD_MISS  = 5'd9,
    EV_DC_WR_MISS  = 5'd10,
    EV_CACHE_FLUSH = 5'd11,
    EV_ITLB_MISS   = 5'd12,
    EV_DTLB_MISS   = 5'd13,
    EV_POWER_DOWN  = 5'd14,
    EV_RF_SINGLE   = 5'd15,
    EV_RF_DOUBLE   = 5'd16
  } event_e;

  // Control unit states
  typedef enum logic [1:0] {
    CS_IDLE    = 2'd0,
    CS_WAITING = 2'd1,
    CS_RUNNING = 2'd2,
    CS_DONE    = 2'd3
  } ctrl_state_e;

  // Address split of the slave window: bit 17 selects the record window,
  // bits 16:10 the monitor, bits 9:2 the record.
  localparam int unsigned REC_WINDOW_BIT = 17;
  localparam int unsigned MON_IDX_LSB    = 10;
  localparam int unsigned MON_IDX_W      = 7;
  localparam int unsigned REC_IDX_LSB    = 2;

  // AHB transfer types
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;
  localparam logic [1:0] HRESP_OKAY    = 2'b00;

endpackage
