// ccr: Central Context/Configuration Repository, the supervisor's memory of the
// bitstreams and contexts of every task, with the engine that moves them over
// the control bus.
//
// Memory: CFG_ENTRIES configurations of CFG_WORDS 32-bit words (one column's
// bitstream each) at word 0, then CTX_ENTRIES contexts of CTX_WORDS words. The
// supervisor processor reads and writes it through the sup_mem port (read data
// one clock later).
//
// Engine commands (sup_cmd, accepted when sup_cmd_ready is high; sup_done
// pulses at the end, with sup_rdata for a register read):
//   OP_L0      repository -> local memory of one column: the bitstream
//              cfg_idx (if with_cfg) into configuration slot `slot`, then the
//              context ctx_idx (if with_ctx) into context slot `slot`, one word
//              per clock, then the slot's tag (from `data`, dirty cleared);
//   OP_L0P     local memory -> repository: context slot `slot` of one column
//              into context ctx_idx, one word per clock, then CLEAN of the slot;
//   OP_REG_WR  one register write (reg_idx, data) to all columns of col_mask;
//   OP_REG_RD  one register read from one column.
// Timing: with the reference sizes an L0 of bitstream and context moves 2784 +
// 32 = 2816 words (one per clock) plus the tag write, after one clock of
// repository read latency; an L0' moves 32 words plus the CLEAN write.
//
// Only the repository's role, its ">100 contexts" size and the one-word-per-clock
// bus rate come from the architecture; the engine, its commands and the
// number of stored configurations are this design's own.
module ccr
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE        = ollaf_pkg::DEF_N_LE,
  parameter int unsigned CFG_PER_LE  = ollaf_pkg::DEF_CFG_PER_LE,
  parameter int unsigned CFG_ENTRIES = 16,
  parameter int unsigned CTX_ENTRIES = 128,
  localparam int unsigned CFG_WORDS  = N_LE * CFG_PER_LE / BUS_W,
  localparam int unsigned CTX_WORDS  = N_LE / BUS_W,
  localparam int unsigned CTX_BASE   = CFG_ENTRIES * CFG_WORDS,
  localparam int unsigned DEPTH      = CTX_BASE + CTX_ENTRIES * CTX_WORDS,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // supervisor memory port
  input  logic             sup_mem_en,
  input  logic             sup_mem_we,
  input  logic [AW-1:0]    sup_mem_addr,
  input  logic [BUS_W-1:0] sup_mem_wdata,
  output logic [BUS_W-1:0] sup_mem_rdata,
  // supervisor command port
  input  logic             sup_cmd_valid,
  input  sup_cmd_t         sup_cmd,
  output logic             sup_cmd_ready,
  output logic             sup_done,
  output logic [BUS_W-1:0] sup_rdata,
  // control bus master
  output bus_req_t         bus_req,
  input  bus_rsp_t         bus_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_L0, S_L0_TAG, S_L0P, S_REG_WR, S_REG_RD, S_RD_WAIT}
    state_e;

  state_e      state;
  sup_cmd_t    cmd;
  logic [15:0] cnt;
  logic [15:0] n_items;

  logic [BUS_W-1:0] mem [DEPTH];

  // ------------------------------------------------------------ item mapping
  logic [15:0] cfg_items;
  assign cfg_items = cmd.with_cfg ? 16'(CFG_WORDS) : 16'd0;
  assign n_items   = cfg_items + (cmd.with_ctx ? 16'(CTX_WORDS) : 16'd0);

  function automatic logic [AW-1:0] item_ccr_addr(sup_cmd_t c, logic [15:0] cfg_n,
                                                  logic [15:0] item);
    if (item < cfg_n) return AW'(32'(c.cfg_idx) * CFG_WORDS + 32'(item));
    return AW'(CTX_BASE + 32'(c.ctx_idx) * CTX_WORDS + 32'(item - cfg_n));
  endfunction

  function automatic logic [ADDR_W-1:0] item_bus_addr(sup_cmd_t c, logic [15:0] cfg_n,
                                                      logic [15:0] item);
    if (item < cfg_n) return {REGION_CFG, 2'b00, c.slot, item[11:0]};
    return {REGION_CTX, 18'(32'(c.slot) * CTX_WORDS + 32'(item - cfg_n))};
  endfunction

  // ------------------------------------------------------------ memory
  logic             eng_re, eng_we;
  logic [AW-1:0]    eng_raddr, eng_waddr;
  logic [BUS_W-1:0] eng_rdata;

  always_ff @(posedge clk) begin
    if (sup_mem_en && sup_mem_we) mem[sup_mem_addr] <= sup_mem_wdata;
    if (eng_we)                   mem[eng_waddr]    <= bus_rsp.rdata;
    if (sup_mem_en && !sup_mem_we) sup_mem_rdata <= mem[sup_mem_addr];
    if (eng_re)                   eng_rdata <= mem[eng_raddr];
  end

  assign eng_re    = state == S_L0 && cnt < n_items;
  assign eng_raddr = item_ccr_addr(cmd, cfg_items, cnt);
  assign eng_we    = state == S_L0P && bus_rsp.rvalid;
  assign eng_waddr = AW'(CTX_BASE + 32'(cmd.ctx_idx) * CTX_WORDS + 32'(cnt) - 1);

  // ------------------------------------------------------------ bus requests
  always_comb begin
    bus_req          = '0;
    bus_req.col_mask = cmd.col_mask;
    unique case (state)
      S_L0: if (cnt != 0) begin
        bus_req.valid = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = item_bus_addr(cmd, cfg_items, cnt - 1'b1);
        bus_req.wdata = eng_rdata;
      end
      S_L0_TAG: begin
        bus_req.valid = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = reg_addr(REG_TAG0 + cmd.slot);
        bus_req.wdata = cmd.data & ~BUS_W'(2);  // a fresh copy is clean
      end
      S_L0P: begin
        bus_req.valid = 1'b1;
        if (cnt < 16'(CTX_WORDS)) begin
          bus_req.addr = {REGION_CTX, 18'(32'(cmd.slot) * CTX_WORDS + 32'(cnt))};
        end else begin
          bus_req.we   = 1'b1;
          bus_req.addr = reg_addr(REG_CLEAN0 + cmd.slot);
        end
      end
      S_REG_WR: begin
        bus_req.valid = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = reg_addr(cmd.reg_idx);
        bus_req.wdata = cmd.data;
      end
      S_REG_RD: begin
        bus_req.valid = 1'b1;
        bus_req.addr  = reg_addr(cmd.reg_idx);
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ sequencing
  assign sup_cmd_ready = state == S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd       <= '0;
      cnt       <= '0;
      sup_done  <= 1'b0;
      sup_rdata <= '0;
    end else begin
      sup_done <= 1'b0;
      unique case (state)
        S_IDLE: if (sup_cmd_valid) begin
          cmd <= sup_cmd;
          cnt <= '0;
          unique case (sup_cmd.op)
            OP_L0:     state <= S_L0;
            OP_L0P:    state <= S_L0P;
            OP_REG_WR: state <= S_REG_WR;
            default:   state <= S_REG_RD;
          endcase
        end
        S_L0: begin
          cnt <= cnt + 1'b1;
          if (cnt == n_items) begin
            if (cmd.with_ctx) state <= S_L0_TAG;
            else begin
              state    <= S_IDLE;
              sup_done <= 1'b1;
            end
          end
        end
        S_L0P: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(CTX_WORDS)) begin
            state    <= S_IDLE;
            sup_done <= 1'b1;
          end
        end
        S_L0_TAG, S_REG_WR: begin
          state    <= S_IDLE;
          sup_done <= 1'b1;
        end
        S_REG_RD: state <= S_RD_WAIT;
        S_RD_WAIT: begin
          state     <= S_IDLE;
          sup_done  <= 1'b1;
          sup_rdata <= bus_rsp.rdata;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
