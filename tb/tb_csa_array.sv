// tb_csa_array: self-checking test of the eight CSA units with their trellis
// wiring. Random branch metrics are applied every cycle and the decisions
// and metric differences of all eight states are compared each cycle with
// the add-compare-select recursion of the behavioural reference, which uses
// unbounded integer path metrics; the run is long enough for the hardware's
// partial sums to wrap around several times.
module tb_csa_array;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int NCYC = 3000;
  logic clk = 0, rst_n = 0;
  bm_vec_t bm;
  logic [NS-1:0] dec;
  mag_t [NS-1:0] delta;
  int checks = 0, failures = 0;

  csa_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref #(15, 15, NCYC + 4) ref_m = new();
    int bmi [8][2];
    int wraps = 0;
    bm = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (dec[s] !== ref_m.dec[c][s]) failures++;
        if (delta[s] !== mag_t'(ref_m.dlt[c][s])) failures++;
      end
      if (dut.p[0][0] < 100 && c > 10) wraps++;
      foreach (bmi[s, u]) begin
        bmi[s][u] = $urandom_range(0, 40);
        bm[s][u] = bm_t'(bmi[s][u]);
      end
      ref_m.step(bmi);
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("partial sums never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
