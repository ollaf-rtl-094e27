// local_context_memory: a column's local cache of task contexts (the context
// half of the LCM), with a version tag per slot.
//
// Storage is SLOTS contexts of N_LE bits, kept as 32-bit words: context bit j
// (the flip-flop of LE j) is bit j%32 of word j/32 of its slot, and word w of
// slot s is at address s*CTX_WORDS + w. Three ports work in the same cycle:
//   - the control-bus port (read or write one word; read data one clock later),
//     used by the L0 (repository to LCM) and L0' (LCM to repository) transfers;
//   - the CMU read port (data one clock later) used to restore a context;
//   - the CMU write port used to save one.
// Each slot has a tag {valid, dirty, task_id, version}. The supervisor writes a
// tag after an L0 transfer, the CMU writes one after each save (dirty set, see
// cmu), and CLEAN clears dirty once the context has been copied back to the
// repository. A bus write of context words into a dirty slot is refused and
// flagged on wr_refused, because that context exists nowhere else yet: it must
// first be copied back. A supervisor tag write to a dirty slot is refused the
// same way (this guard is this design's choice).
//
// Word width, port set, the tag layout and the guard are this design's own
// choices; the slot count and context size follow the reference platform.
module local_context_memory
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE  = ollaf_pkg::DEF_N_LE,
  parameter int unsigned SLOTS = ollaf_pkg::DEF_LCM_SLOTS,
  localparam int unsigned CTX_WORDS = N_LE / BUS_W,
  localparam int unsigned DEPTH     = SLOTS * CTX_WORDS,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control-bus port
  input  logic             bus_en,
  input  logic             bus_we,
  input  logic [AW-1:0]    bus_addr,
  input  logic [BUS_W-1:0] bus_wdata,
  output logic [BUS_W-1:0] bus_rdata,
  output logic             wr_refused,
  // CMU ports
  input  logic             cmu_re,
  input  logic [AW-1:0]    cmu_raddr,
  output logic [BUS_W-1:0] cmu_rdata,
  input  logic             cmu_we,
  input  logic [AW-1:0]    cmu_waddr,
  input  logic [BUS_W-1:0] cmu_wdata,
  // tags
  input  logic             tag_we,       // supervisor writes a whole tag
  input  logic [3:0]       tag_slot,
  input  ctx_tag_t         tag_wdata,
  input  logic             clean_we,     // supervisor clears dirty
  input  logic [3:0]       clean_slot,
  input  logic             cmu_tag_we,   // CMU tags a saved context
  input  logic [3:0]       cmu_tag_slot,
  input  ctx_tag_t         cmu_tag,
  output ctx_tag_t         tags [SLOTS]
);

  logic [BUS_W-1:0] mem [DEPTH];

  logic bus_slot_dirty;
  logic bus_write;
  assign bus_slot_dirty = tags[32'(bus_addr) / CTX_WORDS].dirty;
  assign bus_write      = bus_en && bus_we && !bus_slot_dirty;
  logic tag_write;
  assign tag_write      = tag_we && 32'(tag_slot) < SLOTS && !tags[tag_slot].dirty;
  assign wr_refused     = (bus_en && bus_we && bus_slot_dirty) ||
                          (tag_we && !tag_write);

  always_ff @(posedge clk) begin
    if (bus_write) mem[bus_addr] <= bus_wdata;
    if (cmu_we)    mem[cmu_waddr] <= cmu_wdata;  // CMU wins a same-word clash
    if (bus_en && !bus_we) bus_rdata <= mem[bus_addr];
    if (cmu_re)    cmu_rdata <= mem[cmu_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) tags[s] <= '0;
    end else begin
      for (int s = 0; s < SLOTS; s++) begin
        if (tag_write && tag_slot == 4'(s))         tags[s] <= tag_wdata;
        if (clean_we && clean_slot == 4'(s))     tags[s].dirty <= 1'b0;
        if (cmu_tag_we && cmu_tag_slot == 4'(s)) tags[s] <= cmu_tag;
      end
    end
  end

  // The supervisor and the CMU must not use the same word in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(bus_write && cmu_we && bus_addr == cmu_waddr));

endmodule
