// cmu: Context Management Unit of one column. It moves task contexts between
// the local context memory and the scan plane of the column's context
// scanpath, and tags every context it saves with a version number.
//
// One operation is one pass of N_LE shifts on the scan plane. It can restore a
// context (slot rst_slot is shifted in, the L1 transfer), save one (the scan
// plane is shifted out into slot save_slot, the L1' transfer), or both at once:
// the context of a preempted task leaves while the next one enters. At shift k
// the unit feeds context bit N_LE-1-k and receives the old bit N_LE-1-k (see
// dual_plane_scanpath), so it reads the slot's words from the last to the
// first, bit 31 down to bit 0, and assembles saved words the same way.
//
// Versioning: the unit keeps the tag of the context in each plane. A restore
// gives the scan plane the tag of its source slot; a swap exchanges run and
// scan tags. A save writes its slot's tag as {valid, dirty, task of the saved
// context, its version + 1}: the supervisor counts saves too, so comparing its
// count with a slot's version tells whether that copy is the latest. A
// restore from a slot whose tag is not valid, or a slot number past the last
// slot, is refused (error pulse).
//
// Timing: start is sampled in the command cycle, which also issues the first
// memory read; the N_LE shifts follow in the next N_LE cycles (busy high),
// one bit per clock. done pulses in the last shift cycle. Save-only passes
// shift zeros in. The shift order, tag rule and refusal are this design's
// choices; the one-bit-per-clock rate follows the architecture.
module cmu
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE  = ollaf_pkg::DEF_N_LE,
  parameter int unsigned SLOTS = ollaf_pkg::DEF_LCM_SLOTS,
  localparam int unsigned CTX_WORDS = N_LE / BUS_W,
  localparam int unsigned AW        = $clog2(SLOTS * CTX_WORDS),
  localparam int unsigned KW        = $clog2(N_LE)
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start,
  input  logic             restore_en,
  input  logic [3:0]       rst_slot,
  input  logic             save_en,
  input  logic [3:0]       save_slot,
  input  logic             swap,       // planes exchanged this cycle
  output logic             busy,
  output logic             done,
  output logic             error,
  output ctx_tag_t         run_tag,    // context now in the run plane
  output ctx_tag_t         scan_tag,   // context now in the scan plane
  // local context memory
  input  ctx_tag_t         tags [SLOTS],
  output logic             mem_re,
  output logic [AW-1:0]    mem_raddr,
  input  logic [BUS_W-1:0] mem_rdata,
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [BUS_W-1:0] mem_wdata,
  output logic             tag_we,
  output logic [3:0]       tag_slot,
  output ctx_tag_t         tag_wdata,
  // scan plane
  output logic             scan_en,
  output logic             scan_in,
  input  logic             scan_out
);

  logic          do_restore, do_save;
  logic [3:0]    r_slot, s_slot;
  ctx_tag_t      next_scan_tag;
  logic [KW-1:0] k;
  logic [KW-1:0] j;            // LE whose bit moves at this shift
  logic [4:0]    bit_idx;
  logic [AW-1:0] word_idx;
  logic [BUS_W-1:0] acc;
  logic          accept, refuse;

  assign refuse = start && !busy &&
                  ((restore_en && (32'(rst_slot) >= SLOTS || !tags[rst_slot].valid)) ||
                   (save_en && 32'(save_slot) >= SLOTS));
  assign accept = start && !busy && (restore_en || save_en) && !refuse;
  assign error  = refuse;

  assign j        = KW'(N_LE - 1) - k;
  assign bit_idx  = j[4:0];
  assign word_idx = AW'(j >> 5);

  assign scan_en = busy;
  assign scan_in = busy && do_restore && mem_rdata[bit_idx];
  assign done    = busy && (k == KW'(N_LE - 1));

  // Reads: the last word at the command cycle, then the next lower word in
  // the cycle that uses bit 0 of the current one.
  always_comb begin
    mem_re    = 1'b0;
    mem_raddr = '0;
    if (accept && restore_en) begin
      mem_re    = 1'b1;
      mem_raddr = AW'(rst_slot) * AW'(CTX_WORDS) + AW'(CTX_WORDS - 1);
    end else if (busy && do_restore && bit_idx == 5'd0 && j != '0) begin
      mem_re    = 1'b1;
      mem_raddr = AW'(r_slot) * AW'(CTX_WORDS) + word_idx - 1'b1;
    end
  end

  assign mem_we    = busy && do_save && bit_idx == 5'd0;
  assign mem_waddr = AW'(s_slot) * AW'(CTX_WORDS) + word_idx;
  assign mem_wdata = {acc[BUS_W-1:1], scan_out};

  assign tag_we    = done && do_save;
  assign tag_slot  = s_slot;
  always_comb begin
    tag_wdata         = scan_tag;
    tag_wdata.valid   = 1'b1;
    tag_wdata.dirty   = 1'b1;
    tag_wdata.version = scan_tag.version + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      do_restore    <= 1'b0;
      do_save       <= 1'b0;
      r_slot        <= '0;
      s_slot        <= '0;
      k             <= '0;
      acc           <= '0;
      run_tag       <= '0;
      scan_tag      <= '0;
      next_scan_tag <= '0;
    end else begin
      if (accept) begin
        busy          <= 1'b1;
        do_restore    <= restore_en;
        do_save       <= save_en;
        r_slot        <= rst_slot;
        s_slot        <= save_slot;
        k             <= '0;
        next_scan_tag <= restore_en ? tags[rst_slot] : '0;
      end else if (busy) begin
        acc[bit_idx] <= scan_out;
        k            <= k + 1'b1;
        if (done) begin
          busy     <= 1'b0;
          scan_tag <= next_scan_tag;
        end
      end
      if (swap && !busy) begin
        run_tag  <= scan_tag;
        scan_tag <= run_tag;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(swap && busy));

endmodule
