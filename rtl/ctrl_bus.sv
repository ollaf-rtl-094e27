// ctrl_bus: the dedicated control bus linking the supervisor side (the central
// repository's transfer engine) to every column.
//
// A request is a 32-bit word access with a column mask: it is forwarded to
// each column whose mask bit is set, so one write can reach several columns in
// the same clock (all columns of a multi-column task swap planes together). A
// read addresses one column and its data comes back one clock later; the bus
// merges the columns' answers (only the addressed column answers).
//
// Timing: purely combinational, no stall. The width follows the reference
// platform's 32-bit control bus; the mask broadcast and the fixed one-clock
// read latency are this design's choices.
module ctrl_bus
  import ollaf_pkg::*;
#(
  parameter int unsigned N_COLS = ollaf_pkg::DEF_N_COLS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [N_COLS],
  input  bus_rsp_t s_rsp [N_COLS]
);

  always_comb begin
    m_rsp = '0;
    for (int c = 0; c < N_COLS; c++) begin
      s_req[c]       = m_req;
      s_req[c].valid = m_req.valid && m_req.col_mask[c];
      if (s_rsp[c].rvalid) begin
        m_rsp.rvalid = 1'b1;
        m_rsp.rdata  = m_rsp.rdata | s_rsp[c].rdata;
      end
    end
  end

  // A read must address exactly one existing column.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_req.valid && !m_req.we) |->
                   $onehot(m_req.col_mask[N_COLS-1:0]) &&
                   (m_req.col_mask >> N_COLS) == '0);

endmodule
