// tb_ollaf_column: one 64-LE column driven directly through its control-bus
// port. A bitstream and a context are written into slot 0, loaded into the
// scan planes (64 cycles, HCM and CMU in parallel), and swapped in; the LEs
// must then run with that configuration and context. The task toggles its
// flip-flops, is swapped out and saved into slot 1; the saved words, the tag
// (version + 1, dirty), the status register and the error cases (swap while
// loading, write into a dirty slot, restore from an empty slot) are checked.
module tb_ollaf_column;
  import ollaf_pkg::*;
  localparam int N = 64, C = 87, CFGW = N * C / 32, CTXW = N / 32;
  logic clk = 0, rst_n = 0;
  bus_req_t bus_req = '0;
  bus_rsp_t bus_rsp;
  logic task_en = 0;
  logic [0:0] le_d [N], le_q [N];
  logic [C-1:0] cfg_q [N];
  logic plane, busy, error;
  logic [N*C-1:0] bits;
  logic [N-1:0] ctx, state;
  int checks = 0, failures = 0, busy_cycles = 0;

  ollaf_column #(.N_LE(N), .CFG_PER_LE(C), .SLOTS(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_cycles++;
  always_comb foreach (le_d[i]) le_d[i] = ~le_q[i];

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

  task automatic wr(logic [ADDR_W-1:0] a, logic [31:0] v);
    @(negedge clk); bus_req = '0; bus_req.valid = 1; bus_req.we = 1; bus_req.addr = a; bus_req.wdata = v;
    @(posedge clk); #1 bus_req = '0;
  endtask

  task automatic rd(logic [ADDR_W-1:0] a, output logic [31:0] v);
    @(negedge clk); bus_req = '0; bus_req.valid = 1; bus_req.addr = a;
    @(posedge clk); #1 bus_req = '0;
    chk(bus_rsp.rvalid, "read answered after one clock");
    v = bus_rsp.rdata;
  endtask

  function automatic logic [31:0] cmdw(bit cfg, bit rst, bit sav, bit swp, int cs, int rs, int ss);
    col_cmd_t c;
    c = '0;
    c.cfg_load = cfg; c.ctx_restore = rst; c.ctx_save = sav; c.swap = swp;
    c.cfg_slot = 4'(cs); c.rst_slot = 4'(rs); c.save_slot = 4'(ss);
    return 32'(c);
  endfunction

  function automatic logic [N-1:0] q_vec;
    logic [N-1:0] v;
    foreach (le_q[i]) v[i] = le_q[i][0];
    return v;
  endfunction

  initial begin
    logic [31:0] v;
    int c0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < N * C; b++) bits[b] = 1'($urandom);
    ctx = {$urandom, $urandom};
    for (int w = 0; w < CFGW; w++) wr({REGION_CFG, 6'd0, 12'(w)}, bits[w*32 +: 32]);
    for (int w = 0; w < CTXW; w++) wr({REGION_CTX, 18'(w)}, ctx[w*32 +: 32]);
    wr(reg_addr(REG_TAG0), 32'h0002_0b01);  // version 2, task 11, valid
    rd(reg_addr(REG_TAG0), v);
    chk(v == 32'h0002_0b01, "tag read back");
    // L1: configuration and context in parallel
    c0 = busy_cycles;
    wr(reg_addr(REG_CMD), cmdw(1, 1, 0, 0, 0, 0, 0));
    // a swap during the load is refused
    wr(reg_addr(REG_CMD), cmdw(0, 0, 0, 1, 0, 0, 0));
    chk(error && plane == 1'b0, "swap while loading refused");
    rd(reg_addr(REG_STATUS), v);
    chk(v[0] && v[1] && v[3], "status shows busy HCM, busy CMU, error");
    wait (!busy);
    @(negedge clk);
    chk(busy_cycles - c0 == N, $sformatf("L1 took %0d cycles", busy_cycles - c0));
    wr(reg_addr(REG_CMD), cmdw(0, 0, 0, 0, 0, 0, 0));
    chk(!error, "no-op command clears the error");
    // L2
    wr(reg_addr(REG_CMD), cmdw(0, 0, 0, 1, 0, 0, 0));
    chk(plane == 1'b1, "planes swapped in one clock");
    for (int i = 0; i < N; i++) chk(cfg_q[i] == bits[i*C +: C], $sformatf("LE %0d configuration", i));
    chk(q_vec() == ctx, "context runs");
    rd(reg_addr(REG_STATUS), v);
    chk(v[2] && v[15:8] == 8'd11 && v[23:16] == 8'd2, "status: plane and running task");
    // run 3 cycles: every flip-flop toggles 3 times
    @(negedge clk); task_en = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); task_en = 0;
    state = q_vec();
    chk(state == ~ctx, "task state advanced");
    wr(reg_addr(REG_CMD), cmdw(0, 0, 0, 1, 0, 0, 0));
    chk(plane == 1'b0, "swapped back");
    // L1': save into slot 1
    c0 = busy_cycles;
    wr(reg_addr(REG_CMD), cmdw(0, 0, 1, 0, 0, 0, 1));
    wait (!busy);
    @(negedge clk);
    chk(busy_cycles - c0 == N, "L1' took N_LE cycles");
    for (int w = 0; w < CTXW; w++) begin
      rd({REGION_CTX, 18'(CTXW + w)}, v);
      chk(v == state[w*32 +: 32], "saved context word");
    end
    rd(reg_addr(REG_TAG0 + 4'd1), v);
    chk(v == 32'h0003_0b03, "saved tag: task 11, version 3, dirty, valid");
    // a context write into the dirty slot is refused
    wr({REGION_CTX, 18'(CTXW)}, 32'hffff_ffff);
    chk(error, "dirty slot write flagged");
    rd({REGION_CTX, 18'(CTXW)}, v);
    chk(v == state[31:0], "dirty slot kept its data");
    wr(reg_addr(REG_CLEAN0 + 4'd1), 0);
    rd(reg_addr(REG_TAG0 + 4'd1), v);
    chk(v == 32'h0003_0b01, "clean cleared dirty");
    wr(reg_addr(REG_CMD), cmdw(0, 0, 0, 0, 0, 0, 0));
    // restore from an empty slot
    wr(reg_addr(REG_CMD), cmdw(0, 1, 0, 0, 0, 2, 0));
    chk(error && !busy, "restore from empty slot refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
