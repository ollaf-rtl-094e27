// ollaf_top: the OLLAF reconfigurable fabric's operating-system hardware.
//
// The fabric is split into N_COLS identical columns, each reconfigured on its
// own, so a task occupies a whole number of columns and can be moved between
// them without touching its bitstream. Each column (ollaf_column) keeps its
// logic elements' flip-flops and configuration bits in two planes: the task in
// the run plane keeps running while the next task's configuration and context
// are shifted into the scan plane, and swapping the planes then costs a single
// clock. Behind the planes sits a memory hierarchy: per-column local memories
// (3 configurations and 3 versioned contexts) and the central repository (ccr)
// of the supervisor, linked to all columns by the 32-bit control bus.
//
// Transfers, with the reference sizes (4 columns x 1024 LE, 87 configuration
// bits and 1 context bit per LE):
//   L0  repository -> local memory, bitstream and context, 2816 bus words;
//   L0' local memory -> repository, context, 32 bus words;
//   L1  local memory -> scan planes, 1024 clocks (HCM and CMU in parallel);
//   L1' scan plane -> local memory, context, 1024 clocks (CMU);
//   L2  plane swap, 1 clock.
//
// Interface: the supervisor processor drives sup_mem (its view of the
// repository) and sup_cmd (transfer and column-register commands, see ccr).
// The logic elements, their interconnect and the application communication
// ports are not part of this RTL: per column, le_d is the next state computed
// by the task logic for each LE flip-flop, le_q the flip-flop outputs, and
// cfg_q the configuration bits each LE currently runs with. task_en gates the
// run-plane clock of each column.
module ollaf_top
  import ollaf_pkg::*;
#(
  parameter int unsigned N_COLS      = ollaf_pkg::DEF_N_COLS,
  parameter int unsigned N_LE        = ollaf_pkg::DEF_N_LE,
  parameter int unsigned CFG_PER_LE  = ollaf_pkg::DEF_CFG_PER_LE,
  parameter int unsigned SLOTS       = ollaf_pkg::DEF_LCM_SLOTS,
  parameter int unsigned CFG_ENTRIES = 16,
  parameter int unsigned CTX_ENTRIES = 128,
  localparam int unsigned CCR_AW     = $clog2(CFG_ENTRIES * (N_LE * CFG_PER_LE / BUS_W)
                                              + CTX_ENTRIES * (N_LE / BUS_W))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // supervisor
  input  logic                  sup_mem_en,
  input  logic                  sup_mem_we,
  input  logic [CCR_AW-1:0]     sup_mem_addr,
  input  logic [BUS_W-1:0]      sup_mem_wdata,
  output logic [BUS_W-1:0]      sup_mem_rdata,
  input  logic                  sup_cmd_valid,
  input  sup_cmd_t              sup_cmd,
  output logic                  sup_cmd_ready,
  output logic                  sup_done,
  output logic [BUS_W-1:0]      sup_rdata,
  // reconfigurable logic core
  input  logic [N_COLS-1:0]     task_en,
  input  logic [0:0]            le_d  [N_COLS][N_LE],
  output logic [0:0]            le_q  [N_COLS][N_LE],
  output logic [CFG_PER_LE-1:0] cfg_q [N_COLS][N_LE],
  output logic [N_COLS-1:0]     plane,
  output logic [N_COLS-1:0]     col_busy,
  output logic [N_COLS-1:0]     col_error
);

  bus_req_t m_req;
  bus_rsp_t m_rsp;
  bus_req_t s_req [N_COLS];
  bus_rsp_t s_rsp [N_COLS];

  ccr #(.N_LE(N_LE), .CFG_PER_LE(CFG_PER_LE),
        .CFG_ENTRIES(CFG_ENTRIES), .CTX_ENTRIES(CTX_ENTRIES)) u_ccr (
    .clk, .rst_n,
    .sup_mem_en, .sup_mem_we, .sup_mem_addr, .sup_mem_wdata, .sup_mem_rdata,
    .sup_cmd_valid, .sup_cmd, .sup_cmd_ready, .sup_done, .sup_rdata,
    .bus_req(m_req), .bus_rsp(m_rsp)
  );

  ctrl_bus #(.N_COLS(N_COLS)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp
  );

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    ollaf_column #(.N_LE(N_LE), .CFG_PER_LE(CFG_PER_LE), .SLOTS(SLOTS)) u_col (
      .clk, .rst_n,
      .bus_req(s_req[c]), .bus_rsp(s_rsp[c]),
      .task_en(task_en[c]),
      .le_d(le_d[c]), .le_q(le_q[c]), .cfg_q(cfg_q[c]),
      .plane(plane[c]), .busy(col_busy[c]), .error(col_error[c])
    );
  end

endmodule
