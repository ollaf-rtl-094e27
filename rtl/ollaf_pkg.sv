// ollaf_pkg: sizes, control-bus types and the column register map shared by
// every OLLAF block.
//
// Default sizes are those of the 4-column reference platform: 4 columns of
// 1024 logic elements (LE), one context flip-flop per LE (1 Kbit of context per
// column), 87 configuration bits per LE (87 Kbit of bitstream per column), a
// 32-bit control bus and local memories holding 3 configurations and 3
// contexts. The 87 bits per LE and the word-level register map below are this
// design's own reading of those totals.
//
// Control bus: one master (the central repository's transfer engine), one
// request per cycle, always accepted, reads answered exactly one cycle later.
// A request carries a column mask, so a single write can reach several columns
// in the same cycle (used to swap all columns of a multi-column task at once).
package ollaf_pkg;

  localparam int unsigned DEF_N_COLS      = 4;
  localparam int unsigned DEF_N_LE        = 1024;
  localparam int unsigned DEF_CFG_PER_LE  = 87;
  localparam int unsigned BUS_W       = 32;
  localparam int unsigned DEF_LCM_SLOTS   = 3;
  localparam int unsigned MAX_COLS    = 16;

  localparam int unsigned TASK_W      = 8;
  localparam int unsigned VER_W       = 8;
  localparam int unsigned ADDR_W      = 20;

  // Word address map inside one column (20-bit word address).
  //   [19:18] = 2'b00 : context memory, [17:0] = slot*ctx_words + word (R/W)
  //   [19:18] = 2'b01 : configuration stream, [15:12] = slot, [11:0] = word (W)
  //   [19:18] = 2'b10 : registers, [3:0] = register index
  localparam logic [1:0] REGION_CTX = 2'b00;
  localparam logic [1:0] REGION_CFG = 2'b01;
  localparam logic [1:0] REGION_REG = 2'b10;

  localparam logic [3:0] REG_CMD    = 4'd0;  // W: start an L1/L1'/L2 operation
  localparam logic [3:0] REG_STATUS = 4'd1;  // R: busy, plane, error, running task
  localparam logic [3:0] REG_TAG0   = 4'd4;  // R/W: TAG[slot] at REG_TAG0 + slot
  localparam logic [3:0] REG_CLEAN0 = 4'd8;  // W: CLEAN[slot], clears the dirty bit

  // Context tag kept beside each local context slot and each plane.
  typedef struct packed {
    logic [VER_W-1:0]  version;
    logic [TASK_W-1:0] task_id;
    logic              dirty;   // saved locally, not yet copied to the CCR
    logic              valid;
  } ctx_tag_t;

  // Bus view of a tag: {8'h0, version, task_id, 6'h0, dirty, valid}.
  function automatic logic [BUS_W-1:0] tag_to_word(ctx_tag_t t);
    return {8'h00, t.version, t.task_id, 6'h00, t.dirty, t.valid};
  endfunction

  function automatic ctx_tag_t word_to_tag(logic [BUS_W-1:0] w);
    ctx_tag_t t;
    t.valid   = w[0];
    t.dirty   = w[1];
    t.task_id = w[15:8];
    t.version = w[23:16];
    return t;
  endfunction

  // Column command word written to REG_CMD.
  typedef struct packed {
    logic [15:0] rsvd;
    logic [3:0]  save_slot;    // L1' destination
    logic [3:0]  rst_slot;     // L1 context source
    logic [3:0]  cfg_slot;     // L1 configuration source
    logic        swap;         // L2: exchange the planes (alone)
    logic        ctx_save;     // L1': shift the scan-plane context out
    logic        ctx_restore;  // L1: shift a context into the scan plane
    logic        cfg_load;     // L1: shift a configuration into the scan plane
  } col_cmd_t;

  // Status word read from REG_STATUS.
  function automatic logic [BUS_W-1:0] status_word(logic hcm_busy, logic cmu_busy,
                                                   logic plane, logic error,
                                                   ctx_tag_t run_tag);
    return {8'h00, run_tag.version, run_tag.task_id, 4'h0, error, plane, cmu_busy, hcm_busy};
  endfunction

  typedef struct packed {
    logic                valid;
    logic                we;
    logic [MAX_COLS-1:0] col_mask;  // columns addressed (reads: exactly one)
    logic [ADDR_W-1:0]   addr;
    logic [BUS_W-1:0]    wdata;
  } bus_req_t;

  typedef struct packed {
    logic             rvalid;
    logic [BUS_W-1:0] rdata;
  } bus_rsp_t;

  // Supervisor requests to the central repository.
  typedef enum logic [2:0] {
    OP_L0     = 3'd0,  // CCR -> LCM: configuration and/or context, then tag
    OP_L0P    = 3'd1,  // LCM -> CCR: context, then clean the slot
    OP_REG_WR = 3'd2,  // one register write to the columns of col_mask
    OP_REG_RD = 3'd3   // one register read from one column
  } sup_op_e;

  typedef struct packed {
    sup_op_e             op;
    logic [MAX_COLS-1:0] col_mask;
    logic [3:0]          slot;
    logic                with_cfg;
    logic                with_ctx;
    logic [15:0]         cfg_idx;   // configuration number in the CCR
    logic [15:0]         ctx_idx;   // context number in the CCR
    logic [3:0]          reg_idx;
    logic [BUS_W-1:0]    data;      // register write data, or L0 tag word
  } sup_cmd_t;

  function automatic logic [ADDR_W-1:0] reg_addr(logic [3:0] idx);
    return {REGION_REG, 14'd0, idx};
  endfunction

endpackage
