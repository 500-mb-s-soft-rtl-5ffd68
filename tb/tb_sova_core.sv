// tb_sova_core: self-checking test of the shared SOVA datapath.
//
// Drives random branch metrics (mostly small, with some large and saturated
// values so that metric differences saturate and the partial sums wrap) and
// compares every output, hard bit and reliability, cycle by cycle with the
// behavioural reference of sova_ref_pkg. Also checks that out_valid follows
// in_valid by L+M+7 cycles.
module tb_sova_core;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 15, M = 15, NCYC = 3000;
  localparam int LAT = L + M + 7;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  bm_vec_t bm;
  soft_t out;
  int checks = 0, failures = 0;

  sova_core #(.L(L), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref #(L, M, NCYC + 8) ref_m = new();
    int bmi [8][2];
    int first_valid_in = 20, first_valid_out = -1;
    int n_soft = 0;
    int r;
    soft_t e;
    bm = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      // outputs of cycle c
      if (c >= L + M + 2 + L + 4) begin
        e = ref_m.out_at(c);
        checks++;
        if (out !== e) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: out=%b/%0d expected %b/%0d", c, out.hard, out.mag, e.hard, e.mag);
        end
        if (e.mag != 63) n_soft++;
      end
      if (out_valid && first_valid_out < 0) first_valid_out = c;
      // inputs for cycle c
      in_valid = (c >= first_valid_in);
      foreach (bmi[s, u]) begin
        r = $urandom_range(0, 99);
        bmi[s][u] = (r < 80) ? $urandom_range(0, 12) : (r < 95 ? $urandom_range(0, 127) : 127);
        bm[s][u] = bm_t'(bmi[s][u]);
      end
      ref_m.step(bmi);
      @(negedge clk);
    end
    checks++;
    if (first_valid_out != first_valid_in + LAT) begin
      failures++;
      $display("latency: first out_valid in cycle %0d, expected %0d", first_valid_out, first_valid_in + LAT);
    end
    checks++;
    if (n_soft == 0 || ref_m.n_eq_skip == 0 || ref_m.n_min_taken == 0) begin
      failures++;
      $display("coverage: soft=%0d eq_skip=%0d min_taken=%0d", n_soft, ref_m.n_eq_skip, ref_m.n_min_taken);
    end
    $display("soft outputs below max: %0d, EQ skips: %0d, min updates: %0d", n_soft, ref_m.n_eq_skip, ref_m.n_min_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
