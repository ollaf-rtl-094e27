// tb_ctrl_bus: four columns behind the control bus. Random writes with random
// column masks must reach exactly the masked columns (broadcast included);
// a read must reach only its column and the answer of that column must come
// back to the master.
module tb_ctrl_bus;
  import ollaf_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req = '0;
  bus_rsp_t m_rsp;
  bus_req_t s_req [NC];
  bus_rsp_t s_rsp [NC];
  int checks = 0, failures = 0, broadcasts = 0;

  ctrl_bus #(.N_COLS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (s_rsp[c]) s_rsp[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      m_req.valid = 1;
      m_req.addr  = ADDR_W'($urandom);
      m_req.wdata = $urandom;
      m_req.we    = $urandom % 2;
      if (m_req.we) begin
        m_req.col_mask = MAX_COLS'($urandom % 16);
        if (m_req.col_mask[3:0] == 4'hf) broadcasts++;
      end else m_req.col_mask = MAX_COLS'(1 << ($urandom % NC));
      // one column answers a read
      foreach (s_rsp[c]) s_rsp[c] = '0;
      if (i % 3 == 0) begin
        int c = $urandom % NC;
        s_rsp[c].rvalid = 1;
        s_rsp[c].rdata  = $urandom;
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        chk(s_req[c].valid == m_req.col_mask[c], "valid follows the mask");
        chk(s_req[c].addr == m_req.addr && s_req[c].wdata == m_req.wdata &&
            s_req[c].we == m_req.we, "request forwarded");
      end
      begin
        logic any;
        logic [31:0] v;
        any = 0;
        v = 0;
        foreach (s_rsp[c]) if (s_rsp[c].rvalid) begin any = 1; v = s_rsp[c].rdata; end
        chk(m_rsp.rvalid == any && (!any || m_rsp.rdata == v), "answer returned");
      end
    end
    @(negedge clk); m_req = '0;
    chk(broadcasts > 0, "broadcast write seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
