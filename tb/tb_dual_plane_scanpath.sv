// tb_dual_plane_scanpath: a 16-stage, 3-bit-wide scanpath. A pattern is
// shifted into the scan plane while the run plane keeps loading random task
// state; after N_LE shifts a plane swap must put the pattern on q in place,
// and the next N_LE shifts must return the previous run-plane state on
// scan_out, last stage first.
module tb_dual_plane_scanpath;
  localparam int N = 16, W = 3;
  logic clk = 0, rst_n = 0;
  logic csrs = 0, run_en = 0, scan_en = 0;
  logic [W-1:0] d [N];
  logic [W-1:0] q [N];
  logic [W-1:0] scan_in = 0, scan_out;
  logic [W-1:0] pat [N];
  logic [W-1:0] run_state [N];
  int checks = 0, failures = 0;

  dual_plane_scanpath #(.N_LE(N), .WIDTH(W)) dut (.*);

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
    foreach (d[i]) d[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      foreach (pat[i]) pat[i] = W'($urandom);
      // shift the pattern in while the run plane keeps working
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        scan_en = 1; run_en = 1;
        scan_in = pat[N-1-k];
        foreach (d[i]) d[i] = W'($urandom);
        @(posedge clk); #1;
        foreach (d[i]) chk(q[i] == d[i], "run plane follows d");
      end
      @(negedge clk);
      scan_en = 0; run_en = 0;
      foreach (run_state[i]) run_state[i] = q[i];
      csrs = ~csrs;  // swap
      #1;
      foreach (q[i]) chk(q[i] == pat[i], $sformatf("pattern in place at LE %0d", i));
      // shift the old run state out
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        chk(scan_out == run_state[N-1-k], $sformatf("scan_out shift %0d", k));
        scan_en = 1; scan_in = 0;
        @(posedge clk);
      end
      @(negedge clk);
      scan_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
