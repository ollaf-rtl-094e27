// tb_dual_plane_ff: random stimulus on a 4-bit dual-plane flip-flop bank,
// compared every clock with a reference model of the two flip-flops: the run
// plane follows d when run_en, the scan plane follows csin when scan_en, and
// csrs decides which flip-flop plays which role.
module tb_dual_plane_ff;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic csrs, run_en, scan_en;
  logic [W-1:0] d, csin, q, csout;
  logic [W-1:0] m1, m2;
  int checks = 0, failures = 0, swaps = 0;

  dual_plane_ff #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csrs = 0; run_en = 0; scan_en = 0; d = 0; csin = 0; m1 = 0; m2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (($urandom % 8) == 0) begin csrs = ~csrs; swaps++; end
      run_en  = $urandom % 2;
      scan_en = $urandom % 2;
      d       = W'($urandom);
      csin    = W'($urandom);
      #1;
      checks++;
      if (q !== (csrs ? m2 : m1) || csout !== (csrs ? m1 : m2)) begin
        failures++;
        $display("mismatch at %0d: q=%h csout=%h model %h/%h", i, q, csout, m1, m2);
      end
      @(posedge clk);
      if (!csrs) begin
        if (run_en)  m1 = d;
        if (scan_en) m2 = csin;
      end else begin
        if (run_en)  m2 = d;
        if (scan_en) m1 = csin;
      end
    end
    checks++;
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
