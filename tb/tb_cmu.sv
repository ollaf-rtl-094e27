// tb_cmu: the CMU of a 64-LE column with its local context memory and context
// scanpath. A context is restored (64 shift cycles), the planes are swapped and
// the running flip-flops must hold it; the task then toggles its state, a
// second swap hands that state to the scan plane, and a combined
// save-and-restore pass must write it to another slot with version + 1 while
// the next context enters. A restore from an invalid slot must be refused.
module tb_cmu;
  import ollaf_pkg::*;
  localparam int N = 64, S = 3, WPS = N / 32;
  logic clk = 0, rst_n = 0;
  // command
  logic start = 0, restore_en = 0, save_en = 0, swap = 0;
  logic [3:0] rst_slot = 0, save_slot = 0;
  logic busy, done, error;
  ctx_tag_t run_tag, scan_tag;
  // memory
  logic bus_en = 0, bus_we = 0;
  logic [2:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic wr_refused;
  logic mem_re, mem_we, tag_we;
  logic [2:0] mem_raddr, mem_waddr;
  logic [31:0] mem_rdata, mem_wdata;
  logic [3:0] tag_slot;
  ctx_tag_t tag_wdata, tags [S];
  logic sup_tag_we = 0;
  logic [3:0] sup_tag_slot = 0;
  ctx_tag_t sup_tag = '0;
  // scanpath
  logic csrs = 0, run_en = 0, scan_en, scan_in;
  logic [0:0] d [N], q [N], scan_out;
  logic [N-1:0] ctx_a, ctx_b, state;
  int checks = 0, failures = 0, busy_cycles = 0, errors = 0;

  cmu #(.N_LE(N), .SLOTS(S)) dut (
    .clk, .rst_n, .start, .restore_en, .rst_slot, .save_en, .save_slot, .swap,
    .busy, .done, .error, .run_tag, .scan_tag, .tags,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .tag_we, .tag_slot, .tag_wdata, .scan_en, .scan_in, .scan_out(scan_out[0])
  );

  local_context_memory #(.N_LE(N), .SLOTS(S)) u_mem (
    .clk, .rst_n, .bus_en, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .wr_refused,
    .cmu_re(mem_re), .cmu_raddr(mem_raddr), .cmu_rdata(mem_rdata),
    .cmu_we(mem_we), .cmu_waddr(mem_waddr), .cmu_wdata(mem_wdata),
    .tag_we(sup_tag_we), .tag_slot(sup_tag_slot), .tag_wdata(sup_tag),
    .clean_we(1'b0), .clean_slot(4'd0),
    .cmu_tag_we(tag_we), .cmu_tag_slot(tag_slot), .cmu_tag(tag_wdata), .tags
  );

  dual_plane_scanpath #(.N_LE(N), .WIDTH(1)) u_plane (
    .clk, .rst_n, .csrs, .run_en, .d, .q, .scan_en, .scan_in, .scan_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (error) errors++;
  end
  // task logic model: every flip-flop toggles
  always_comb foreach (d[i]) d[i] = ~q[i];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(int a, logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 1; bus_addr = 3'(a); bus_wdata = v;
    @(posedge clk); #1 bus_en = 0; bus_we = 0;
  endtask

  task automatic bus_read(int a, output logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 0; bus_addr = 3'(a);
    @(posedge clk); #1 bus_en = 0; v = bus_rdata;
  endtask

  task automatic put_context(int s, logic [N-1:0] c, ctx_tag_t t);
    for (int w = 0; w < WPS; w++) bus_write(s * WPS + w, c[w*32 +: 32]);
    @(negedge clk); sup_tag_we = 1; sup_tag_slot = 4'(s); sup_tag = t;
    @(posedge clk); #1 sup_tag_we = 0;
  endtask

  task automatic run_op(bit rst, int rs, bit sav, int ss, int expect_cycles);
    int c0;
    @(negedge clk);
    start = 1; restore_en = rst; rst_slot = 4'(rs); save_en = sav; save_slot = 4'(ss);
    c0 = busy_cycles;
    @(posedge clk); #1 start = 0;
    wait (!busy);
    @(negedge clk);
    chk(busy_cycles - c0 == expect_cycles, $sformatf("transfer took %0d cycles", busy_cycles - c0));
  endtask

  task automatic do_swap;
    @(negedge clk); csrs = ~csrs; swap = 1;
    @(posedge clk); #1 swap = 0;
  endtask

  function automatic logic [N-1:0] plane_q;
    logic [N-1:0] v;
    foreach (q[i]) v[i] = q[i][0];
    return v;
  endfunction

  initial begin
    logic [31:0] v;
    ctx_tag_t ta, tb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ctx_a = {$urandom, $urandom};
    ctx_b = {$urandom, $urandom};
    ta = '{version: 8'd3, task_id: 8'd5, dirty: 1'b0, valid: 1'b1};
    tb = '{version: 8'd9, task_id: 8'd6, dirty: 1'b0, valid: 1'b1};
    put_context(0, ctx_a, ta);
    put_context(2, ctx_b, tb);
    // restore A (L1)
    run_op(1, 0, 0, 0, N);
    chk(scan_tag == ta, "scan tag after restore");
    do_swap();
    chk(plane_q() == ctx_a, "restored context runs");
    chk(run_tag == ta, "run tag after swap");
    // task A runs 5 cycles: its state toggles 5 times
    @(negedge clk); run_en = 1;
    repeat (5) @(posedge clk);
    @(negedge clk); run_en = 0;
    state = plane_q();
    chk(state == ~ctx_a, "task A state after 5 toggles");
    do_swap();  // A moves to the scan plane, an empty plane runs
    // save A to slot 1 (L1') while restoring B from slot 2, in one pass
    run_op(1, 2, 1, 1, N);
    for (int w = 0; w < WPS; w++) begin
      bus_read(WPS + w, v);
      chk(v == state[w*32 +: 32], $sformatf("saved word %0d", w));
    end
    chk(tags[1].valid && tags[1].dirty && tags[1].task_id == 8'd5 && tags[1].version == 8'd4,
        "saved context tagged with version + 1");
    chk(scan_tag == tb, "scan tag now B");
    do_swap();
    chk(plane_q() == ctx_b, "B runs after second swap");
    // invalid slot: nothing happens, error pulses
    @(negedge clk); start = 1; restore_en = 1; rst_slot = 4'd3; save_en = 0;
    #1 chk(error == 1'b1, "restore from invalid slot refused");
    @(posedge clk); #1 start = 0;
    @(negedge clk);
    chk(!busy && errors == 1, "refused restore did not start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
