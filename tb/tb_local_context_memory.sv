// tb_local_context_memory: 3 slots of 64-bit contexts (2 words each). Checks
// bus writes and reads, the CMU read and write ports against a reference
// array, the three tag writers (supervisor, CMU, CLEAN) and the refusal of a
// bus write or a supervisor tag write into a dirty slot.
module tb_local_context_memory;
  import ollaf_pkg::*;
  localparam int N = 64, S = 3, WPS = N / 32, D = S * WPS;
  logic clk = 0, rst_n = 0;
  logic bus_en = 0, bus_we = 0, cmu_re = 0, cmu_we = 0;
  logic [2:0] bus_addr = 0, cmu_raddr = 0, cmu_waddr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata, cmu_rdata, cmu_wdata = 0;
  logic wr_refused;
  logic tag_we = 0, clean_we = 0, cmu_tag_we = 0;
  logic [3:0] tag_slot = 0, clean_slot = 0, cmu_tag_slot = 0;
  ctx_tag_t tag_wdata = '0, cmu_tag = '0;
  ctx_tag_t tags [S];
  logic [31:0] model [D];
  int checks = 0, failures = 0, refusals = 0;

  local_context_memory #(.N_LE(N), .SLOTS(S)) dut (.*);

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

  task automatic bus_write(int a, logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 1; bus_addr = 3'(a); bus_wdata = v;
    #1 if (wr_refused) refusals++;
    @(posedge clk); #1 bus_en = 0; bus_we = 0;
  endtask

  task automatic bus_read(int a, output logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 0; bus_addr = 3'(a);
    @(posedge clk); #1 bus_en = 0; v = bus_rdata;
  endtask

  initial begin
    logic [31:0] v;
    ctx_tag_t t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (tags[s]) chk(tags[s] == '0, "tags reset");
    for (int a = 0; a < D; a++) begin model[a] = $urandom; bus_write(a, model[a]); end
    for (int a = D - 1; a >= 0; a--) begin bus_read(a, v); chk(v == model[a], "bus read back"); end
    // CMU ports: read slot 2 while writing slot 0, in the same cycle as a bus read
    for (int w = 0; w < WPS; w++) begin
      @(negedge clk);
      cmu_re = 1; cmu_raddr = 3'(2 * WPS + w);
      cmu_we = 1; cmu_waddr = 3'(w); cmu_wdata = $urandom;
      bus_en = 1; bus_we = 0; bus_addr = 3'(WPS + w);
      @(posedge clk); #1;
      chk(cmu_rdata == model[2 * WPS + w], "cmu read port");
      chk(bus_rdata == model[WPS + w], "parallel bus read");
      model[w] = cmu_wdata;
      cmu_re = 0; cmu_we = 0; bus_en = 0;
    end
    for (int w = 0; w < WPS; w++) begin bus_read(w, v); chk(v == model[w], "cmu write seen on bus"); end
    // tags
    t = '{version: 8'd7, task_id: 8'd3, dirty: 1'b0, valid: 1'b1};
    @(negedge clk); tag_we = 1; tag_slot = 1; tag_wdata = t;
    @(posedge clk); #1 tag_we = 0;
    chk(tags[1] == t && tags[0] == '0 && tags[2] == '0, "supervisor tag write");
    t.dirty = 1; t.version = 8'd8;
    @(negedge clk); cmu_tag_we = 1; cmu_tag_slot = 1; cmu_tag = t;
    @(posedge clk); #1 cmu_tag_we = 0;
    chk(tags[1] == t, "cmu tag write");
    // a dirty slot refuses bus writes
    bus_write(WPS, 32'hdead_beef);
    bus_read(WPS, v);
    chk(v == model[WPS] && refusals == 1, "dirty slot write refused");
    // ... and supervisor tag writes, so a stale load cannot take over the slot
    @(negedge clk); tag_we = 1; tag_slot = 1; tag_wdata = '{version: 8'd2, task_id: 8'd9, dirty: 1'b0, valid: 1'b1};
    #1 chk(wr_refused, "dirty slot tag write flagged");
    @(posedge clk); #1 tag_we = 0;
    chk(tags[1] == t, "dirty slot tag write refused");
    @(negedge clk); clean_we = 1; clean_slot = 1;
    @(posedge clk); #1 clean_we = 0;
    chk(!tags[1].dirty && tags[1].version == 8'd8, "clean clears dirty only");
    bus_write(WPS, 32'h1234_5678);
    bus_read(WPS, v);
    chk(v == 32'h1234_5678 && refusals == 1, "clean slot write accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
