// tb_case_study: the reference task set run on the 4-column fabric with its
// schedule, ticks shortened to TICK clocks and columns to 64 LEs so that the
// whole schedule simulates quickly.
//
//   task  columns  start tick  duration    placement
//   T1    1        0           2.33        column 0
//   T1'   1        6           2           column 0 (same bitstream as T1)
//   T2    2        0           5           columns 1-2 for ticks 0-3, then 2-3
//   T3    1        2           3           column 3 for tick 2-3, then column 0
//   T4    4        3           1           columns 0-3
//   T5    1        7           2           column 3
//
// T4 preempts T2 and T3; both resume one tick later on other columns, so their
// contexts go out through the scan plane (L1'), back to the repository (L0')
// and into new columns (L0, L1). No prefetching: every start does L0, L1 and
// L2 at its tick, while the other columns keep running.
//
// The task logic is modelled: LE i of a running column takes the previous
// LE's flip-flop XOR bit 0 of its own configuration. The testbench keeps a
// reference state per task slice, stepped every clock that slice runs, and
// compares it with the fabric at every task end and with the repository after
// every context save, so a context lost, misplaced or mixed between columns
// is caught. Saved versions are checked too.
module tb_case_study;
  import ollaf_pkg::*;
  localparam int NC = 4, N = 64, C = DEF_CFG_PER_LE, SL = 3;
  localparam int CFGW = N * C / 32, CTXW = N / 32, CTXB = 16 * CFGW;
  localparam int AW = $clog2(CTXB + 128 * CTXW);
  localparam int TICK = 1500;
  localparam int NSLICE = 10;

  logic clk = 0, rst_n = 0;
  logic sup_mem_en = 0, sup_mem_we = 0;
  logic [AW-1:0] sup_mem_addr = 0;
  logic [31:0] sup_mem_wdata = 0, sup_mem_rdata, sup_rdata;
  logic sup_cmd_valid = 0, sup_cmd_ready, sup_done;
  sup_cmd_t sup_cmd = '0;
  logic [NC-1:0] task_en = '0, plane, col_busy, col_error;
  logic [0:0] le_d [NC][N], le_q [NC][N];
  logic [C-1:0] cfg_q [NC][N];

  // slices: 0 T1, 1 T1', 2-3 T2, 4 T3, 5-8 T4, 9 T5
  int slice_cfg  [NSLICE] = '{0, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int slice_task [NSLICE] = '{1, 2, 3, 3, 4, 5, 5, 5, 5, 6};
  logic [N-1:0] model [NSLICE];
  logic [N-1:0] cbit  [NSLICE];
  int slice_ver [NSLICE];
  int running [NC];   // slice in the run plane and still unfinished, or -1
  int slot_rr [NC];
  int cycle = 0;
  int checks = 0, failures = 0;
  int n_preempt = 0, n_reloc = 0, n_saves = 0, transfer_clocks = 0;

  ollaf_top #(.N_LE(N)) dut (.*);

  always #5 clk = ~clk;
  always_comb
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N; i++) le_d[c][i] = le_q[c][(i + N - 1) % N] ^ cfg_q[c][i][0];

  function automatic logic [N-1:0] step(logic [N-1:0] s, logic [N-1:0] cb);
    logic [N-1:0] n;
    for (int i = 0; i < N; i++) n[i] = s[(i + N - 1) % N] ^ cb[i];
    return n;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!sup_cmd_ready || col_busy != '0) transfer_clocks <= transfer_clocks + 1;
    for (int c = 0; c < NC; c++)
      if (task_en[c] && running[c] >= 0) model[running[c]] <= step(model[running[c]], cbit[running[c]]);
  end

  initial begin
    repeat (40 * TICK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] cfg_word(int k, int w);
    return (32'(w) * 32'h9e37_79b1) ^ (32'(k) * 32'h85eb_ca77) ^ (32'(w) << 11);
  endfunction
  function automatic logic [31:0] ctx_word(int k, int w);
    return (32'(w + 1) * 32'hc2b2_ae3d) ^ (32'(k) * 32'h27d4_eb2f);
  endfunction
  function automatic logic [N-1:0] q_vec(int c);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = le_q[c][i][0];
    return v;
  endfunction

  task automatic mem_write(int a, logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 1; sup_mem_addr = AW'(a); sup_mem_wdata = v;
    @(posedge clk); #1 sup_mem_en = 0; sup_mem_we = 0;
  endtask
  task automatic mem_read(int a, output logic [31:0] v);
    @(negedge clk); sup_mem_en = 1; sup_mem_we = 0; sup_mem_addr = AW'(a);
    @(posedge clk); #1 sup_mem_en = 0; v = sup_mem_rdata;
  endtask
  task automatic issue(sup_cmd_t cm);
    @(negedge clk);
    while (!sup_cmd_ready) @(negedge clk);
    sup_cmd_valid = 1; sup_cmd = cm;
    @(posedge clk); #1 sup_cmd_valid = 0;
    while (!sup_done) begin @(posedge clk); #1; end
  endtask
  task automatic reg_wr(logic [NC-1:0] mask, logic [3:0] idx, logic [31:0] v);
    sup_cmd_t cm;
    cm = '0; cm.op = OP_REG_WR; cm.col_mask = 16'(mask); cm.reg_idx = idx; cm.data = v;
    issue(cm);
  endtask
  task automatic reg_rd(int col, logic [3:0] idx, output logic [31:0] v);
    sup_cmd_t cm;
    cm = '0; cm.op = OP_REG_RD; cm.col_mask = 16'(1 << col); cm.reg_idx = idx;
    issue(cm);
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
  task automatic wait_tick(real t);
    while (real'(cycle) < t * TICK) @(negedge clk);
  endtask

  // A task ends: its columns stop and must hold the reference state.
  task automatic finish(int slices [$], int cols [$]);
    foreach (cols[i]) task_en[cols[i]] = 0;
    @(negedge clk);
    foreach (cols[i]) begin
      chk(q_vec(cols[i]) == model[slices[i]],
          $sformatf("slice %0d final state on column %0d", slices[i], cols[i]));
      running[cols[i]] = -1;
    end
  endtask

  // A task (its slices on the given columns) starts: L0, L1, then one L2 on
  // all its columns; the preempted slices are saved (L1') and copied back
  // to the repository (L0').
  task automatic start(int slices [$], int cols [$]);
    logic [NC-1:0] mask;
    int slot [NC];
    int old [NC];
    logic [31:0] v;
    sup_cmd_t cm;
    mask = '0;
    foreach (cols[i]) begin
      int c = cols[i];
      mask[c] = 1;
      slot[c] = slot_rr[c];
      slot_rr[c] = (slot_rr[c] + 1) % SL;
      cm = '0; cm.op = OP_L0; cm.col_mask = 16'(1 << c); cm.slot = 4'(slot[c]);
      cm.with_cfg = 1; cm.with_ctx = 1;
      cm.cfg_idx = 16'(slice_cfg[slices[i]]); cm.ctx_idx = 16'(slices[i]);
      cm.data = {8'h0, 8'(slice_ver[slices[i]]), 8'(slice_task[slices[i]]), 8'h01};
      issue(cm);
      reg_wr(4'(1 << c), REG_CMD, cmdw(1, 1, 0, 0, slot[c], slot[c], 0));
    end
    wait_idle(mask);
    foreach (cols[i]) begin
      old[cols[i]] = running[cols[i]];
      task_en[cols[i]] = 0;
    end
    reg_wr(mask, REG_CMD, cmdw(0, 0, 0, 1, 0, 0, 0));
    foreach (cols[i]) begin
      running[cols[i]] = slices[i];
      task_en[cols[i]] = 1;
    end
    foreach (cols[i]) begin
      int c = cols[i];
      if (old[c] >= 0) begin
        int s = slot_rr[c];
        slot_rr[c] = (slot_rr[c] + 1) % SL;
        n_preempt++;
        reg_wr(4'(1 << c), REG_CMD, cmdw(0, 0, 1, 0, 0, 0, s));
        wait_idle(4'(1 << c));
        slice_ver[old[c]]++;
        reg_rd(c, REG_TAG0 + 4'(s), v);
        chk(v[23:16] == 8'(slice_ver[old[c]]) && v[15:8] == 8'(slice_task[old[c]]) && v[1],
            $sformatf("slice %0d saved with version %0d", old[c], slice_ver[old[c]]));
        cm = '0; cm.op = OP_L0P; cm.col_mask = 16'(1 << c); cm.slot = 4'(s);
        cm.ctx_idx = 16'(old[c]);
        issue(cm);
        n_saves++;
        for (int w = 0; w < CTXW; w++) begin
          mem_read(CTXB + old[c] * CTXW + w, v);
          chk(v == model[old[c]][w*32 +: 32], $sformatf("slice %0d word %0d in repository", old[c], w));
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin running[c] = -1; slot_rr[c] = 0; end
    for (int s = 0; s < NSLICE; s++) begin
      slice_ver[s] = 0;
      for (int w = 0; w < CTXW; w++) model[s][w*32 +: 32] = ctx_word(s, w);
      for (int i = 0; i < N; i++) cbit[s][i] = cfg_word(slice_cfg[s], (i * C) / 32)[(i * C) % 32];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 9; k++) for (int w = 0; w < CFGW; w++) mem_write(k * CFGW + w, cfg_word(k, w));
    for (int s = 0; s < NSLICE; s++) for (int w = 0; w < CTXW; w++) mem_write(CTXB + s * CTXW + w, ctx_word(s, w));
    @(negedge clk);
    cycle = 0;
    transfer_clocks = 0;

    wait_tick(0);    start('{0}, '{0});             // T1
                     start('{2, 3}, '{1, 2});       // T2
    wait_tick(2);    start('{4}, '{3});             // T3
    wait_tick(2.33); finish('{0}, '{0});            // T1 done
    wait_tick(3);    start('{5, 6, 7, 8}, '{0, 1, 2, 3});  // T4 preempts T2, T3
    wait_tick(4);    finish('{5, 6, 7, 8}, '{0, 1, 2, 3});
                     start('{2, 3}, '{2, 3});       // T2 resumes, moved
                     start('{4}, '{0});             // T3 resumes, moved
                     n_reloc += 3;
    wait_tick(6);    finish('{2, 3}, '{2, 3});
                     finish('{4}, '{0});
                     start('{1}, '{0});             // T1'
    wait_tick(7);    start('{9}, '{3});             // T5
    wait_tick(8);    finish('{1}, '{0});
    wait_tick(9);    finish('{9}, '{3});

    chk(n_preempt == 3 && n_saves == 3, "T2 (2 columns) and T3 preempted and saved");
    chk(col_error == '0, "no refused operation");
    $display("schedule done at %0d clocks; %0d clocks with a transfer in progress; preemptions=%0d relocated slices=%0d",
             cycle, transfer_clocks, n_preempt, n_reloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
