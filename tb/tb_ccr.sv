// tb_ccr: the central repository and its transfer engine with 64-LE columns
// (174-word bitstreams, 2-word contexts) and a behavioural column on the bus.
// Checks: an L0 writes the bitstream words in order to the configuration
// region, then the context words, then the slot tag (clean), one word per
// clock; an L0' reads the context words one per clock, stores them in the
// repository and cleans the slot; register writes keep their column mask and
// register reads return the column's answer.
module tb_ccr;
  import ollaf_pkg::*;
  localparam int N = 64, C = 87, CFGW = N * C / 32, CTXW = N / 32;
  localparam int CFGE = 2, CTXE = 4, CTXB = CFGE * CFGW, AW = $clog2(CTXB + CTXE * CTXW);
  logic clk = 0, rst_n = 0;
  logic sup_mem_en = 0, sup_mem_we = 0;
  logic [AW-1:0] sup_mem_addr = 0;
  logic [31:0] sup_mem_wdata = 0, sup_mem_rdata, sup_rdata;
  logic sup_cmd_valid = 0, sup_cmd_ready, sup_done;
  sup_cmd_t sup_cmd = '0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp = '0;
  // behavioural column: records every write, answers reads with a pattern
  bus_req_t log_q [$];
  int checks = 0, failures = 0;

  ccr #(.N_LE(N), .CFG_PER_LE(C), .CFG_ENTRIES(CFGE), .CTX_ENTRIES(CTXE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    bus_rsp <= '0;
    if (bus_req.valid) begin
      log_q.push_back(bus_req);
      if (!bus_req.we) begin
        bus_rsp.rvalid <= 1'b1;
        bus_rsp.rdata  <= {12'hc0d, bus_req.addr} ^ 32'h0f0f_0000;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9e37_79b1 ^ 32'h5a5a_0000;
  endfunction

  task automatic mem_write(int a, logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 1; sup_mem_addr = AW'(a); sup_mem_wdata = v;
    @(posedge clk); #1 sup_mem_en = 0; sup_mem_we = 0;
  endtask

  task automatic mem_read(int a, output logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 0; sup_mem_addr = AW'(a);
    @(posedge clk); #1 sup_mem_en = 0; v = sup_mem_rdata;
  endtask

  task automatic issue(sup_cmd_t c, output int cycles);
    @(negedge clk);
    while (!sup_cmd_ready) @(negedge clk);
    sup_cmd_valid = 1; sup_cmd = c; cycles = 0;
    @(posedge clk); #1 sup_cmd_valid = 0;
    while (!sup_done) begin @(posedge clk); #1 cycles++; end
  endtask

  initial begin
    sup_cmd_t c;
    int cyc;
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < CTXB + CTXE * CTXW; a++) mem_write(a, pat(a));
    // L0: bitstream 1 and context 2 into slot 2 of column 1
    c = '0; c.op = OP_L0; c.col_mask = 16'b0010; c.slot = 4'd2;
    c.with_cfg = 1; c.with_ctx = 1; c.cfg_idx = 16'd1; c.ctx_idx = 16'd2;
    c.data = 32'h0009_0703;  // version 9, task 7, dirty and valid set
    log_q.delete();
    issue(c, cyc);
    chk(log_q.size() == CFGW + CTXW + 1, $sformatf("L0 bus beats %0d", log_q.size()));
    for (int i = 0; i < CFGW; i++)
      chk(log_q[i].we && log_q[i].col_mask == 16'b0010 &&
          log_q[i].addr == {REGION_CFG, 2'b00, 4'd2, 12'(i)} && log_q[i].wdata == pat(CFGW + i),
          $sformatf("L0 bitstream word %0d", i));
    for (int i = 0; i < CTXW; i++)
      chk(log_q[CFGW+i].we && log_q[CFGW+i].addr == {REGION_CTX, 18'(2 * CTXW + i)} &&
          log_q[CFGW+i].wdata == pat(CTXB + 2 * CTXW + i), $sformatf("L0 context word %0d", i));
    chk(log_q[CFGW+CTXW].addr == reg_addr(REG_TAG0 + 4'd2) &&
        log_q[CFGW+CTXW].wdata == 32'h0009_0701, "L0 tag write, dirty cleared");
    chk(cyc == CFGW + CTXW + 2, $sformatf("L0 took %0d cycles", cyc));
    // L0': context slot 1 of column 0 into context 3
    c = '0; c.op = OP_L0P; c.col_mask = 16'b0001; c.slot = 4'd1; c.ctx_idx = 16'd3;
    log_q.delete();
    issue(c, cyc);
    chk(log_q.size() == CTXW + 1, "L0' bus beats");
    for (int i = 0; i < CTXW; i++)
      chk(!log_q[i].we && log_q[i].addr == {REGION_CTX, 18'(CTXW + i)}, "L0' read address");
    chk(log_q[CTXW].we && log_q[CTXW].addr == reg_addr(REG_CLEAN0 + 4'd1), "L0' clean write");
    chk(cyc == CTXW + 1, $sformatf("L0' took %0d cycles", cyc));
    for (int i = 0; i < CTXW; i++) begin
      mem_read(CTXB + 3 * CTXW + i, v);
      chk(v == ({12'hc0d, REGION_CTX, 18'(CTXW + i)} ^ 32'h0f0f_0000), "L0' data stored");
    end
    // register write broadcast and register read
    c = '0; c.op = OP_REG_WR; c.col_mask = 16'b1111; c.reg_idx = REG_CMD; c.data = 32'h8;
    log_q.delete();
    issue(c, cyc);
    chk(log_q.size() == 1 && log_q[0].col_mask == 16'b1111 && log_q[0].wdata == 32'h8 &&
        log_q[0].addr == reg_addr(REG_CMD), "broadcast register write");
    c = '0; c.op = OP_REG_RD; c.col_mask = 16'b0100; c.reg_idx = REG_STATUS;
    issue(c, cyc);
    chk(sup_rdata == ({12'hc0d, reg_addr(REG_STATUS)} ^ 32'h0f0f_0000), "register read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
