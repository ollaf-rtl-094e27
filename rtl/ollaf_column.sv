// ollaf_column: the operating-system hardware of one reconfigurable column.
//
// Every column is identical, so a task occupying a whole number of columns can
// be placed on any of them with the same configuration data. A column holds:
//   - a dual-plane context scanpath (one flip-flop per LE) and a dual-plane
//     configuration scanpath (CFG_PER_LE bits per LE), sharing one plane
//     select: the run planes hold the running task, the scan planes are loaded
//     or emptied behind it;
//   - its local memories (LCM): 3 configurations and 3 versioned contexts;
//   - the HCM (configuration into the scan plane) and the CMU (context in and
//     out of the scan plane);
//   - a control-bus slave giving the supervisor the LCM words, the slot tags,
//     a command register and a status register (map in ollaf_pkg).
//
// Command register (one write starts an operation):
//   cfg_load / ctx_restore / ctx_save  start the HCM and/or the CMU (L1, L1'),
//                                      each taking N_LE clocks;
//   swap                               exchanges run and scan planes of both
//                                      scanpaths in one clock (L2), refused
//                                      while the HCM or CMU is busy.
// A refused command, a restore from an invalid slot or a context write into a
// dirty slot sets the sticky error bit; a command word with no operation bit
// clears it. The logic elements themselves are outside this block: le_d is
// the next state the task logic computes for each LE flip-flop, le_q the
// flip-flop value, cfg_q the configuration the LE currently runs with.
//
// Timing: bus requests are always accepted; reads answer one clock later.
// The register map, error handling and read latency are this design's own.
module ollaf_column
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE       = ollaf_pkg::DEF_N_LE,
  parameter int unsigned CFG_PER_LE = ollaf_pkg::DEF_CFG_PER_LE,
  parameter int unsigned SLOTS      = ollaf_pkg::DEF_LCM_SLOTS,
  localparam int unsigned CTX_WORDS = N_LE / BUS_W,
  localparam int unsigned CTX_AW    = $clog2(SLOTS * CTX_WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bus_req_t              bus_req,   // valid only when this column is addressed
  output bus_rsp_t              bus_rsp,
  input  logic                  task_en,   // run-plane clock enable
  input  logic [0:0]            le_d  [N_LE],
  output logic [0:0]            le_q  [N_LE],
  output logic [CFG_PER_LE-1:0] cfg_q [N_LE],
  output logic                  plane,     // current plane select (CSrs)
  output logic                  busy,
  output logic                  error
);

  // ---------------------------------------------------------------- decode
  logic [1:0] region;
  logic [3:0] reg_idx;
  logic       wr, rd;
  assign region  = bus_req.addr[19:18];
  assign reg_idx = bus_req.addr[3:0];
  assign wr      = bus_req.valid &&  bus_req.we;
  assign rd      = bus_req.valid && !bus_req.we;

  col_cmd_t cmd;
  logic     cmd_wr;
  assign cmd    = col_cmd_t'(bus_req.wdata);
  assign cmd_wr = wr && region == REGION_REG && reg_idx == REG_CMD;

  // ---------------------------------------------------------------- blocks
  logic hcm_busy, hcm_done, cmu_busy, cmu_done, cmu_error;
  logic swap_ok, swap_bad, hcm_start, hcm_bad, cmu_start, cmu_bad;
  ctx_tag_t run_tag, scan_tag;
  ctx_tag_t tags [SLOTS];

  assign swap_ok   = cmd_wr && cmd.swap && !hcm_busy && !cmu_busy;
  assign swap_bad  = cmd_wr && cmd.swap && (hcm_busy || cmu_busy);
  assign hcm_start = cmd_wr && !cmd.swap && cmd.cfg_load && !hcm_busy;
  assign hcm_bad   = cmd_wr && !cmd.swap && cmd.cfg_load && hcm_busy;
  assign cmu_start = cmd_wr && !cmd.swap && (cmd.ctx_restore || cmd.ctx_save);
  assign cmu_bad   = cmu_start && cmu_busy;

  // plane select
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       plane <= 1'b0;
    else if (swap_ok) plane <= !plane;
  end

  // context memory
  logic             lcm_refused;
  logic             cm_re, cm_we, cm_tag_we;
  logic [CTX_AW-1:0] cm_raddr, cm_waddr;
  logic [BUS_W-1:0] cm_rdata, cm_wdata, ctx_bus_rdata;
  logic [3:0]       cm_tag_slot;
  ctx_tag_t         cm_tag;

  local_context_memory #(.N_LE(N_LE), .SLOTS(SLOTS)) u_ctx_mem (
    .clk, .rst_n,
    .bus_en    (bus_req.valid && region == REGION_CTX),
    .bus_we    (bus_req.we),
    .bus_addr  (CTX_AW'(bus_req.addr)),
    .bus_wdata (bus_req.wdata),
    .bus_rdata (ctx_bus_rdata),
    .wr_refused(lcm_refused),
    .cmu_re    (cm_re), .cmu_raddr(cm_raddr), .cmu_rdata(cm_rdata),
    .cmu_we    (cm_we), .cmu_waddr(cm_waddr), .cmu_wdata(cm_wdata),
    .tag_we    (wr && region == REGION_REG && reg_idx >= REG_TAG0 && reg_idx < REG_CLEAN0),
    .tag_slot  (reg_idx - REG_TAG0),
    .tag_wdata (word_to_tag(bus_req.wdata)),
    .clean_we  (wr && region == REGION_REG && reg_idx >= REG_CLEAN0),
    .clean_slot(reg_idx - REG_CLEAN0),
    .cmu_tag_we(cm_tag_we), .cmu_tag_slot(cm_tag_slot), .cmu_tag(cm_tag),
    .tags
  );

  // context scanpath
  logic ctx_scan_en, ctx_scan_in, ctx_scan_out;
  logic [0:0] ctx_scan_out_v;
  assign ctx_scan_out = ctx_scan_out_v[0];

  dual_plane_scanpath #(.N_LE(N_LE), .WIDTH(1)) u_ctx_plane (
    .clk, .rst_n, .csrs(plane), .run_en(task_en),
    .d(le_d), .q(le_q),
    .scan_en(ctx_scan_en), .scan_in(ctx_scan_in), .scan_out(ctx_scan_out_v)
  );

  cmu #(.N_LE(N_LE), .SLOTS(SLOTS)) u_cmu (
    .clk, .rst_n,
    .start(cmu_start), .restore_en(cmd.ctx_restore), .rst_slot(cmd.rst_slot),
    .save_en(cmd.ctx_save), .save_slot(cmd.save_slot), .swap(swap_ok),
    .busy(cmu_busy), .done(cmu_done), .error(cmu_error),
    .run_tag, .scan_tag, .tags,
    .mem_re(cm_re), .mem_raddr(cm_raddr), .mem_rdata(cm_rdata),
    .mem_we(cm_we), .mem_waddr(cm_waddr), .mem_wdata(cm_wdata),
    .tag_we(cm_tag_we), .tag_slot(cm_tag_slot), .tag_wdata(cm_tag),
    .scan_en(ctx_scan_en), .scan_in(ctx_scan_in), .scan_out(ctx_scan_out)
  );

  // configuration memory, HCM and configuration scanpath
  logic                  cf_rd_en, cfg_scan_en;
  logic [3:0]            cf_rd_slot;
  logic [$clog2(N_LE)-1:0] cf_rd_row;
  logic [CFG_PER_LE-1:0] cf_rd_data, cfg_scan_in, cfg_scan_out;
  logic                  cf_row_done;
  logic [CFG_PER_LE-1:0] cfg_hold [N_LE];

  local_config_memory #(.N_LE(N_LE), .CFG_PER_LE(CFG_PER_LE), .SLOTS(SLOTS)) u_cfg_mem (
    .clk, .rst_n,
    .wr_en  (wr && region == REGION_CFG),
    .wr_slot(bus_req.addr[15:12]),
    .wr_word(bus_req.addr[11:0]),
    .wr_data(bus_req.wdata),
    .row_done(cf_row_done),
    .rd_en(cf_rd_en), .rd_slot(cf_rd_slot), .rd_row(cf_rd_row), .rd_data(cf_rd_data)
  );

  hcm #(.N_LE(N_LE), .CFG_PER_LE(CFG_PER_LE)) u_hcm (
    .clk, .rst_n, .start(hcm_start), .cfg_slot(cmd.cfg_slot),
    .busy(hcm_busy), .done(hcm_done),
    .rd_en(cf_rd_en), .rd_slot(cf_rd_slot), .rd_row(cf_rd_row), .rd_data(cf_rd_data),
    .scan_en(cfg_scan_en), .scan_in(cfg_scan_in)
  );

  // The running configuration never changes: its run plane reloads itself.
  assign cfg_hold = cfg_q;

  dual_plane_scanpath #(.N_LE(N_LE), .WIDTH(CFG_PER_LE)) u_cfg_plane (
    .clk, .rst_n, .csrs(plane), .run_en(1'b0),
    .d(cfg_hold), .q(cfg_q),
    .scan_en(cfg_scan_en), .scan_in(cfg_scan_in), .scan_out(cfg_scan_out)
  );

  // ---------------------------------------------------------------- status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error <= 1'b0;
    else if (swap_bad || hcm_bad || cmu_bad || cmu_error || lcm_refused) error <= 1'b1;
    else if (cmd_wr && cmd[3:0] == 4'b0) error <= 1'b0;
  end

  assign busy = hcm_busy || cmu_busy;

  // ---------------------------------------------------------------- reads
  logic       rd_q;
  logic [1:0] rd_region;
  logic [BUS_W-1:0] reg_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q      <= 1'b0;
      rd_region <= '0;
      reg_rdata <= '0;
    end else begin
      rd_q      <= rd;
      rd_region <= region;
      if (rd && region == REGION_REG) begin
        if (reg_idx == REG_STATUS)
          reg_rdata <= status_word(hcm_busy, cmu_busy, plane, error, run_tag);
        else if (reg_idx >= REG_TAG0 && reg_idx < REG_TAG0 + 4'(SLOTS))
          reg_rdata <= tag_to_word(tags[reg_idx - REG_TAG0]);
        else
          reg_rdata <= '0;
      end
    end
  end

  assign bus_rsp.rvalid = rd_q;
  assign bus_rsp.rdata  = !rd_q ? '0 : (rd_region == REGION_CTX) ? ctx_bus_rdata : reg_rdata;

endmodule
