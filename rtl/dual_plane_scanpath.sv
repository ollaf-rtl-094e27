// dual_plane_scanpath: one column's chain of dual-plane flip-flops, one stage
// per logic element (LE), WIDTH bits per stage.
//
// The same structure serves the column's context (WIDTH = 1: the LE's
// flip-flop) and its configuration (WIDTH = 87: the LE's configuration bits,
// shifted as 87 parallel chains). The run plane of stage i is loaded from d[i]
// and drives q[i]. The scan plane is a shift register: on scan_en every stage
// takes the scan-plane value of the stage before it, stage 0 takes scan_in,
// and scan_out is the scan plane of the last stage. After N_LE shifts, the
// value shifted in first sits in stage N_LE-1; the value shifted out first
// came from stage N_LE-1. So feeding stage N_LE-1-k at shift k loads stage
// data in place while the old scan-plane content leaves in the same order.
//
// csrs is the plane select of all stages; toggling it swaps run and scan planes
// in one clock. For a configuration plane, run_en is held low so the running
// configuration never changes. A full transfer takes N_LE clocks (one clock
// per LE), which is the column-level L1/L1' time of the architecture.
module dual_plane_scanpath #(
  parameter int unsigned N_LE  = 1024,
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csrs,
  input  logic             run_en,
  input  logic [WIDTH-1:0] d       [N_LE],
  output logic [WIDTH-1:0] q       [N_LE],
  input  logic             scan_en,
  input  logic [WIDTH-1:0] scan_in,
  output logic [WIDTH-1:0] scan_out
);

  logic [WIDTH-1:0] chain [N_LE];  // scan-plane output of each stage

  for (genvar i = 0; i < N_LE; i++) begin : g_le
    logic [WIDTH-1:0] csin;
    if (i == 0) begin : g_first
      assign csin = scan_in;
    end else begin : g_next
      assign csin = chain[i-1];
    end
    dual_plane_ff #(.WIDTH(WIDTH)) u_ff (
      .clk, .rst_n, .csrs, .run_en,
      .d(d[i]), .scan_en, .csin,
      .q(q[i]), .csout(chain[i])
    );
  end

  assign scan_out = chain[N_LE-1];

endmodule
