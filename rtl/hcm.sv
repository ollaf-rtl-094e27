// hcm: Hardware Configuration Manager of one column, the configuration
// counterpart of the CMU without a save path (a configuration does not change
// while a task runs, so it never has to be shifted back out or versioned).
//
// On start it shifts configuration slot cfg_slot of the local configuration
// memory into the scan plane of the column's configuration scanpath, one LE row
// (CFG_PER_LE bits, as parallel chains) per clock: at shift k it feeds the row
// of LE N_LE-1-k, so after N_LE shifts every row sits in its own LE.
//
// Timing: the command cycle issues the read of row N_LE-1; the N_LE shifts
// follow (busy high), each cycle also reading the row needed at the next one.
// done pulses in the last shift. A start while busy is ignored here and
// reported by the column. The per-row organisation is this design's choice; the
// N_LE-clock L1 time follows the architecture.
module hcm
  import ollaf_pkg::*;
#(
  parameter int unsigned N_LE       = ollaf_pkg::DEF_N_LE,
  parameter int unsigned CFG_PER_LE = ollaf_pkg::DEF_CFG_PER_LE,
  localparam int unsigned KW        = $clog2(N_LE)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [3:0]            cfg_slot,
  output logic                  busy,
  output logic                  done,
  // local configuration memory
  output logic                  rd_en,
  output logic [3:0]            rd_slot,
  output logic [KW-1:0]         rd_row,
  input  logic [CFG_PER_LE-1:0] rd_data,
  // configuration scan plane
  output logic                  scan_en,
  output logic [CFG_PER_LE-1:0] scan_in
);

  logic [3:0]    slot;
  logic [KW-1:0] k, j;
  logic          accept;

  assign accept  = start && !busy;
  assign j       = KW'(N_LE - 1) - k;
  assign done    = busy && (k == KW'(N_LE - 1));
  assign scan_en = busy;
  assign scan_in = rd_data;

  always_comb begin
    rd_en   = 1'b0;
    rd_slot = slot;
    rd_row  = '0;
    if (accept) begin
      rd_en   = 1'b1;
      rd_slot = cfg_slot;
      rd_row  = KW'(N_LE - 1);
    end else if (busy && j != '0) begin
      rd_en   = 1'b1;
      rd_row  = j - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      slot <= '0;
      k    <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      slot <= cfg_slot;
      k    <= '0;
    end else if (busy) begin
      k <= k + 1'b1;
      if (done) busy <= 1'b0;
    end
  end

endmodule
