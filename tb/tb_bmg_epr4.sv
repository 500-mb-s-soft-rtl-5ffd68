// tb_bmg_epr4: self-checking test of the EPR4 branch metric generator.
// Random samples over the whole input range and random a-priori values are
// applied; all sixteen branch metrics are compared one cycle later with the
// squared-error formula evaluated with integers in the testbench.
module tb_bmg_epr4;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [Y_W-1:0] y;
  soft_t apriori;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  bmg_epr4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sat = 0, n_zero = 0;
    y = '0; apriori = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int yi, e;
      yi = $urandom_range(0, 63) - 32;
      y = Y_W'(yi);
      apriori.hard = 1'($urandom);
      apriori.mag  = (n % 3 == 0) ? '0 : mag_t'($urandom);
      @(negedge clk);
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          e = epr4_bm(yi, apriori.hard, apriori.mag, s, u, 4, 2);
          if (e == 127) n_sat++;
          if (e == 0) n_zero++;
          checks++;
          if (bm[s][u] !== bm_t'(e)) begin
            failures++;
            if (failures < 10) $display("y=%0d s=%0d u=%0d bm=%0d expected %0d", yi, s, u, bm[s][u], e);
          end
        end
    end
    checks++;
    if (n_sat == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
