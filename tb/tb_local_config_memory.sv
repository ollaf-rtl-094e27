// tb_local_config_memory: 32 LEs of 87 configuration bits, 2 slots. A random
// 2784-bit bitstream per slot is streamed in as 87 32-bit words; every row
// read back must equal bits [87*r +: 87] of its bitstream. Also checks that
// exactly one row is completed per 87 bits received and that restarting at
// word 0 overwrites a slot.
module tb_local_config_memory;
  localparam int N = 32, C = 87, S = 2, WORDS = N * C / 32;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, row_done;
  logic [3:0] wr_slot = 0, rd_slot = 0;
  logic [11:0] wr_word = 0;
  logic [31:0] wr_data = 0;
  logic [4:0] rd_row = 0;
  logic [C-1:0] rd_data;
  logic [N*C-1:0] bits [S];
  int checks = 0, failures = 0, rows = 0;

  local_config_memory #(.N_LE(N), .CFG_PER_LE(C), .SLOTS(S)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (row_done) rows++;

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

  task automatic load(int s);
    for (int b = 0; b < N * C; b++) bits[s][b] = 1'($urandom);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = 4'(s); wr_word = 12'(w); wr_data = bits[s][w*32 +: 32];
      @(posedge clk);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic verify(int s);
    for (int r = 0; r < N; r++) begin
      @(negedge clk); rd_en = 1; rd_slot = 4'(s); rd_row = 5'(r);
      @(posedge clk); #1;
      chk(rd_data == bits[s][r*C +: C], $sformatf("slot %0d row %0d", s, r));
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(0);
    chk(rows == N, "one row per 87 bits");
    load(1);
    verify(0);
    verify(1);
    load(0);
    verify(0);
    verify(1);
    chk(rows == 3 * N, "row count after three loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
