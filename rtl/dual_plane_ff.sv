// dual_plane_ff: the dual-plane flip-flop that replaces the single flip-flop
// of a logic element, for WIDTH bits that share one plane select.
//
// Each bit has two flip-flops, FF1 and FF2. The plane select csrs decides which
// one is the run plane (written from d, read on q) and which one is the scan
// plane (written from csin, read on csout): csrs = 0 makes FF1 the run plane
// and FF2 the scan plane, csrs = 1 the reverse. Changing csrs swaps the two
// planes at once, so a task's state can be shifted in or out on the hidden scan
// plane while another task runs on the run plane. The two-FF structure, the
// input and output multiplexers and the csrs control follow the architecture's
// dual-plane flip-flop.
//
// Timing: one clock. The architecture's separate task and scan clocks are modelled
// as two clock enables on a single synchronous clock, run_en for the run plane
// and scan_en for the scan plane (this design's choice). Both planes reset to 0.
module dual_plane_ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csrs,     // 0: FF1 runs, FF2 scans; 1: reverse
  input  logic             run_en,   // run-plane clock enable
  input  logic [WIDTH-1:0] d,        // run-plane data from the logic element
  input  logic             scan_en,  // scan-plane clock enable
  input  logic [WIDTH-1:0] csin,     // scan-plane data in
  output logic [WIDTH-1:0] q,        // run-plane output
  output logic [WIDTH-1:0] csout     // scan-plane output
);

  logic [WIDTH-1:0] ff1, ff2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1 <= '0;
      ff2 <= '0;
    end else begin
      if (!csrs ? run_en : scan_en) ff1 <= !csrs ? d : csin;
      if ( csrs ? run_en : scan_en) ff2 <=  csrs ? d : csin;
    end
  end

  assign q     = csrs ? ff2 : ff1;
  assign csout = csrs ? ff1 : ff2;

endmodule
