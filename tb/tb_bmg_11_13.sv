// tb_bmg_11_13: self-checking test of the (11,13) branch metric generator.
// Random soft code-bit values and puncture flags are applied; all sixteen
// branch metrics are compared one cycle later with the metric computed in
// the testbench from the code equations c0 = u^u(n-3), c1 = u^u(n-2)^u(n-3).
module tb_bmg_11_13;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  soft_t [1:0] llr;
  logic [1:0] erased;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  bmg_11_13 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_erased = 0;
    llr = '0; erased = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int e;
      llr = 14'($urandom);
      erased = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b00;
      if (erased != 0) n_erased++;
      @(negedge clk);
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          e = c1113_bm(llr[0].hard, llr[0].mag, erased[0], llr[1].hard, llr[1].mag, erased[1], s, u);
          checks++;
          if (bm[s][u] !== bm_t'(e)) begin
            failures++;
            if (failures < 10) $display("s=%0d u=%0d bm=%0d expected %0d", s, u, bm[s][u], e);
          end
        end
    end
    checks++;
    if (n_erased == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
