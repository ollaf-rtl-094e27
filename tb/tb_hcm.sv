// tb_hcm: the HCM of a 32-LE column with 87 configuration bits per LE, its
// local configuration memory and the configuration scanpath. Two random
// bitstreams are stored; loading one must take 32 shift cycles and, after a
// plane swap, every LE must hold its own 87-bit row of that bitstream.
module tb_hcm;
  localparam int N = 32, C = 87, S = 3, WORDS = N * C / 32;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [3:0] cfg_slot = 0;
  logic rd_en, scan_en;
  logic [3:0] rd_slot;
  logic [4:0] rd_row;
  logic [C-1:0] rd_data, scan_in, scan_out;
  logic wr_en = 0, row_done;
  logic [3:0] wr_slot = 0;
  logic [11:0] wr_word = 0;
  logic [31:0] wr_data = 0;
  logic csrs = 0;
  logic [C-1:0] d [N], q [N];
  logic [N*C-1:0] bits [S];
  int checks = 0, failures = 0, busy_cycles = 0, dones = 0;

  hcm #(.N_LE(N), .CFG_PER_LE(C)) dut (.*);

  local_config_memory #(.N_LE(N), .CFG_PER_LE(C), .SLOTS(S)) u_mem (
    .clk, .rst_n, .wr_en, .wr_slot, .wr_word, .wr_data, .row_done,
    .rd_en, .rd_slot, .rd_row, .rd_data
  );

  dual_plane_scanpath #(.N_LE(N), .WIDTH(C)) u_plane (
    .clk, .rst_n, .csrs, .run_en(1'b0), .d, .q, .scan_en, .scan_in, .scan_out
  );

  always_comb foreach (d[i]) d[i] = q[i];
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (done) dones++;
  end

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

  task automatic store(int s);
    for (int b = 0; b < N * C; b++) bits[s][b] = 1'($urandom);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = 4'(s); wr_word = 12'(w); wr_data = bits[s][w*32 +: 32];
      @(posedge clk);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic load_and_check(int s);
    int c0;
    @(negedge clk); start = 1; cfg_slot = 4'(s); c0 = busy_cycles;
    @(posedge clk); #1 start = 0;
    wait (!busy);
    @(negedge clk);
    chk(busy_cycles - c0 == N, $sformatf("load took %0d cycles", busy_cycles - c0));
    csrs = ~csrs;
    #1;
    for (int r = 0; r < N; r++) chk(q[r] == bits[s][r*C +: C], $sformatf("LE %0d row", r));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    store(1);
    store(2);
    load_and_check(2);
    load_and_check(1);
    load_and_check(2);
    chk(dones == 3, "three done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
