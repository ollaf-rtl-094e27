// tb_ollaf_top: end-to-end run of the whole fabric at its reference size
// (4 columns x 1024 LEs, 87 configuration bits per LE, 3-slot local memories,
// 32-bit control bus), following the typical preemption scenario:
//   1. L0: bitstream + context of T1 and T2 from the repository into column 0
//      (2816 bus words each);
//   2. L1 + L2: T1 loaded (1024 cycles) and swapped in;
//   3. T1 runs while T2 is shifted into the scan planes behind it;
//   4. L2: T2 replaces T1 in one clock; L1': T1's context is saved (version
//      + 1) while T2 runs; L0': it is copied back to the repository (32 words);
//   5. a 3-column task is loaded and swapped on all its columns at once.
// The task logic is modelled here: every LE flip-flop toggles each enabled
// clock. Refused operations (swap while loading, write into a dirty slot,
// restore from an empty slot) are exercised too. Every mechanism is counted
// and one that never happened is a failure.
module tb_ollaf_top;
  import ollaf_pkg::*;
  localparam int NC = DEF_N_COLS, N = DEF_N_LE, C = DEF_CFG_PER_LE;
  localparam int CFGW = N * C / 32, CTXW = N / 32, CFGE = 16, CTXB = CFGE * CFGW;
  localparam int AW = $clog2(CTXB + 128 * CTXW);

  logic clk = 0, rst_n = 0;
  logic sup_mem_en = 0, sup_mem_we = 0;
  logic [AW-1:0] sup_mem_addr = 0;
  logic [31:0] sup_mem_wdata = 0, sup_mem_rdata, sup_rdata;
  logic sup_cmd_valid = 0, sup_cmd_ready, sup_done;
  sup_cmd_t sup_cmd = '0;
  logic [NC-1:0] task_en = '0, plane, col_busy, col_error;
  logic [0:0] le_d [NC][N], le_q [NC][N];
  logic [C-1:0] cfg_q [NC][N];

  int checks = 0, failures = 0;
  int busy_cycles [NC];
  int data_beats = 0, bus_beats = 0;
  // mechanism counters
  int n_l0 = 0, n_l0p = 0, n_l1 = 0, n_l1p = 0, n_l2 = 0, n_overlap = 0, n_multi = 0;
  int n_swap_refused = 0, n_dirty_refused = 0, n_invalid_refused = 0, n_version = 0;

  ollaf_top dut (.*);

  always #5 clk = ~clk;
  always_comb foreach (le_d[c, i]) le_d[c][i] = ~le_q[c][i];
  always @(posedge clk) begin
    foreach (busy_cycles[c]) if (col_busy[c]) busy_cycles[c]++;
    if (dut.m_req.valid) begin
      bus_beats++;
      if (dut.m_req.addr[19:18] != REGION_REG) data_beats++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // repository contents: bitstream k word w, context k word w
  function automatic logic [31:0] cfg_word(int k, int w);
    return (32'(w) * 32'h9e37_79b1) ^ (32'(k) * 32'h85eb_ca77) ^ (32'(w) << 11);
  endfunction
  function automatic logic [31:0] ctx_word(int k, int w);
    return (32'(w + 1) * 32'hc2b2_ae3d) ^ (32'(k) * 32'h27d4_eb2f);
  endfunction
  function automatic logic [C-1:0] cfg_row(int k, int le);
    logic [C-1:0] r;
    for (int b = 0; b < C; b++) begin
      int idx = le * C + b;
      r[b] = cfg_word(k, idx / 32)[idx % 32];
    end
    return r;
  endfunction
  function automatic logic [N-1:0] ctx_vec(int k);
    logic [N-1:0] v;
    for (int w = 0; w < CTXW; w++) v[w*32 +: 32] = ctx_word(k, w);
    return v;
  endfunction
  function automatic logic [N-1:0] q_vec(int c);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = le_q[c][i][0];
    return v;
  endfunction
  function automatic bit cfg_matches(int c, int k);
    for (int i = 0; i < N; i++) if (cfg_q[c][i] != cfg_row(k, i)) return 0;
    return 1;
  endfunction

  task automatic mem_write(int a, logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 1; sup_mem_addr = AW'(a); sup_mem_wdata = v;
    @(posedge clk); #1 sup_mem_en = 0; sup_mem_we = 0;
  endtask
  task automatic mem_read(int a, output logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 0; sup_mem_addr = AW'(a);
    @(posedge clk); #1 sup_mem_en = 0; v = sup_mem_rdata;
  endtask

  task automatic issue(sup_cmd_t cm, output int cycles);
    @(negedge clk);
    while (!sup_cmd_ready) @(negedge clk);
    sup_cmd_valid = 1; sup_cmd = cm; cycles = 0;
    @(posedge clk); #1 sup_cmd_valid = 0;
    while (!sup_done) begin @(posedge clk); #1 cycles++; end
  endtask

  task automatic l0(int col, int slot, int cfg_k, int ctx_k, int task_id, int ver);
    sup_cmd_t cm;
    int cyc, db;
    cm = '0; cm.op = OP_L0; cm.col_mask = 16'(1 << col); cm.slot = 4'(slot);
    cm.with_cfg = 1; cm.with_ctx = 1; cm.cfg_idx = 16'(cfg_k); cm.ctx_idx = 16'(ctx_k);
    cm.data = {8'h0, 8'(ver), 8'(task_id), 8'h01};
    db = data_beats;
    issue(cm, cyc);
    chk(data_beats - db == 2816, $sformatf("L0 moved %0d words", data_beats - db));
    n_l0++;
  endtask

  task automatic reg_wr(logic [15:0] mask, logic [3:0] idx, logic [31:0] v);
    sup_cmd_t cm;
    int cyc;
    cm = '0; cm.op = OP_REG_WR; cm.col_mask = mask; cm.reg_idx = idx; cm.data = v;
    issue(cm, cyc);
  endtask
  task automatic reg_rd(int col, logic [3:0] idx, output logic [31:0] v);
    sup_cmd_t cm;
    int cyc;
    cm = '0; cm.op = OP_REG_RD; cm.col_mask = 16'(1 << col); cm.reg_idx = idx;
    issue(cm, cyc);
    v = sup_rdata;
  endtask

  function automatic logic [31:0] cmdw(bit cfg, bit rst, bit sav, bit swp, int cs, int rs, int ss);
    col_cmd_t cm;
    cm = '0;
    cm.cfg_load = cfg; cm.ctx_restore = rst; cm.ctx_save = sav; cm.swap = swp;
    cm.cfg_slot = 4'(cs); cm.rst_slot = 4'(rs); cm.save_slot = 4'(ss);
    return 32'(cm);
  endfunction

  task automatic wait_idle(logic [NC-1:0] mask);
    @(negedge clk);
    while ((col_busy & mask) != '0) @(negedge clk);
  endtask

  // a load (L1) on the columns of mask, checked for its 1024-cycle length
  task automatic l1(logic [NC-1:0] mask, logic [31:0] cmd);
    int b0 [NC];
    b0 = busy_cycles;
    reg_wr(16'(mask), REG_CMD, cmd);
    wait_idle(mask);
    for (int c = 0; c < NC; c++)
      if (mask[c]) chk(busy_cycles[c] - b0[c] == N, $sformatf("col %0d transfer took %0d cycles",
                                                             c, busy_cycles[c] - b0[c]));
  endtask

  // a swap (L2): the plane must change exactly one clock after the command
  task automatic l2(logic [NC-1:0] mask);
    logic [NC-1:0] p0;
    sup_cmd_t cm;
    p0 = plane;
    cm = '0; cm.op = OP_REG_WR; cm.col_mask = 16'(mask); cm.reg_idx = REG_CMD;
    cm.data = cmdw(0, 0, 0, 1, 0, 0, 0);
    @(negedge clk);
    while (!sup_cmd_ready) @(negedge clk);
    sup_cmd_valid = 1; sup_cmd = cm;
    @(posedge clk); #1 sup_cmd_valid = 0;
    chk(plane == p0, "no swap prev_q the command reaches the column");
    @(posedge clk); #1;  // the bus write happens in this clock
    chk(plane == (p0 ^ mask), "planes swapped after one clock");
    n_l2++;
    if ($countones(mask) > 1) n_multi++;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] v;
    logic [N-1:0] t1_state, prev_q;
    int cyc, db, bb;
    sup_cmd_t cm;
    foreach (busy_cycles[c]) busy_cycles[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // repository: 5 bitstreams and 5 contexts
    for (int k = 0; k < 5; k++) begin
      for (int w = 0; w < CFGW; w++) mem_write(k * CFGW + w, cfg_word(k, w));
      for (int w = 0; w < CTXW; w++) mem_write(CTXB + k * CTXW + w, ctx_word(k, w));
    end

    // 1. L0 of T1 (bitstream 0, context 0) and T2 (bitstream 1, context 1)
    l0(0, 0, 0, 0, 1, 0);
    l0(0, 1, 1, 1, 2, 5);
    reg_rd(0, REG_TAG0 + 4'd1, v);
    chk(v == 32'h0005_0201, "T2 tag in slot 1");

    // 2. T1 into the scan planes, then into the run planes
    l1(4'b0001, cmdw(1, 1, 0, 0, 0, 0, 0));
    n_l1++;
    l2(4'b0001);
    chk(q_vec(0) == ctx_vec(0), "T1 context runs");
    chk(cfg_matches(0, 0), "T1 configuration runs");

    // 3. T1 runs while T2 is loaded behind it
    @(negedge clk); task_en[0] = 1;
    reg_wr(16'b0001, REG_CMD, cmdw(1, 1, 0, 0, 1, 1, 0));
    prev_q = q_vec(0);
    @(posedge clk); #1;
    chk(col_busy[0] && q_vec(0) == ~prev_q, "T1 keeps running during the load");
    if (col_busy[0] && q_vec(0) == ~prev_q) n_overlap++;
    // a swap in the middle of the load is refused
    reg_wr(16'b0001, REG_CMD, cmdw(0, 0, 0, 1, 0, 0, 0));
    chk(col_error[0] && plane[0] == 1'b1, "swap during load refused");
    if (col_error[0]) n_swap_refused++;
    wait_idle(4'b0001);
    task_en[0] = 0;
    n_l1++;
    t1_state = q_vec(0);
    reg_wr(16'b0001, REG_CMD, cmdw(0, 0, 0, 0, 0, 0, 0));
    chk(!col_error[0], "error cleared");

    // 4. T2 replaces T1 in one clock
    l2(4'b0001);
    chk(q_vec(0) == ctx_vec(1), "T2 context runs");
    chk(cfg_matches(0, 1), "T2 configuration runs");
    reg_rd(0, REG_STATUS, v);
    chk(v[15:8] == 8'd2 && v[23:16] == 8'd5, "status names T2 as running");
    // L1': T1 saved into slot 2 while T2 runs
    @(negedge clk); task_en[0] = 1;
    l1(4'b0001, cmdw(0, 0, 1, 0, 0, 0, 2));
    task_en[0] = 0;
    n_l1p++;
    reg_rd(0, REG_TAG0 + 4'd2, v);
    chk(v == 32'h0001_0103, "T1 saved with version 1, dirty");
    if (v[23:16] == 8'd1) n_version++;
    // the dirty slot refuses a new context
    cm = '0; cm.op = OP_L0; cm.col_mask = 16'b0001; cm.slot = 4'd2; cm.with_ctx = 1;
    cm.ctx_idx = 16'd4; cm.data = 32'h0000_0901;
    issue(cm, cyc);
    chk(col_error[0], "context write into a dirty slot refused");
    if (col_error[0]) n_dirty_refused++;
    reg_wr(16'b0001, REG_CMD, cmdw(0, 0, 0, 0, 0, 0, 0));
    // L0': copy T1's context back to repository context 10
    cm = '0; cm.op = OP_L0P; cm.col_mask = 16'b0001; cm.slot = 4'd2; cm.ctx_idx = 16'd10;
    db = data_beats; bb = bus_beats;
    issue(cm, cyc);
    chk(data_beats - db == 32 && bus_beats - bb == 33, "L0' moved 32 words and cleaned the slot");
    n_l0p++;
    for (int w = 0; w < CTXW; w++) begin
      mem_read(CTXB + 10 * CTXW + w, v);
      chk(v == t1_state[w*32 +: 32], $sformatf("repository holds T1 word %0d", w));
    end
    reg_rd(0, REG_TAG0 + 4'd2, v);
    chk(v == 32'h0001_0101, "slot clean after L0'");

    // 5. a task on columns 1-3 (bitstreams 2-4, contexts 2-4), swapped at once
    for (int c = 1; c < 4; c++) l0(c, 0, c + 1, c + 1, 4, 0);
    l1(4'b1110, cmdw(1, 1, 0, 0, 0, 0, 0));
    l2(4'b1110);
    for (int c = 1; c < 4; c++) begin
      chk(q_vec(c) == ctx_vec(c + 1), $sformatf("column %0d context", c));
      chk(cfg_matches(c, c + 1), $sformatf("column %0d configuration", c));
    end
    chk(plane[0] == 1'b0, "column 0 not swapped by the broadcast");
    // restore from an empty slot
    reg_wr(16'b0010, REG_CMD, cmdw(0, 1, 0, 0, 0, 2, 0));
    chk(col_error[1] && !col_busy[1], "restore from an empty slot refused");
    if (col_error[1]) n_invalid_refused++;

    $display("mechanisms: L0=%0d L0'=%0d L1=%0d L1'=%0d L2=%0d overlap=%0d multi-column=%0d",
             n_l0, n_l0p, n_l1, n_l1p, n_l2, n_overlap, n_multi);
    $display("refusals: swap-busy=%0d dirty=%0d invalid=%0d versioned saves=%0d",
             n_swap_refused, n_dirty_refused, n_invalid_refused, n_version);
    chk(n_l0 > 0 && n_l0p > 0 && n_l1 > 0 && n_l1p > 0 && n_l2 > 0 && n_overlap > 0 &&
        n_multi > 0 && n_swap_refused > 0 && n_dirty_refused > 0 && n_invalid_refused > 0 &&
        n_version > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
