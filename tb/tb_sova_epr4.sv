// tb_sova_epr4: end-to-end test of the inner decoder on a simulated EPR4
// channel. Random channel bits are sent through 1 + D - D^2 - D^3 (levels
// 0, +-8, +-16), noise is added, and the samples are decoded together with
// a-priori values that are mostly right, sometimes wrong and sometimes
// absent. Every output (hard bit and reliability) is compared cycle by cycle
// with the behavioural reference; the hard bits are also compared with the
// bits that were sent, LAT = L+M+8 cycles earlier, and wrong decisions must
// carry a lower average reliability than right ones.
module tb_sova_epr4;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 15, M = 15, NCYC = 3000;
  localparam int LAT = L + M + 8;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [Y_W-1:0] y;
  soft_t apriori, out;
  int checks = 0, failures = 0;

  sova_epr4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref #(L, M, NCYC + 8) ref_m = new();
    int bmi [8][2];
    bit sent [NCYC];
    int yi, prev_y, prev_h, prev_m, noise, lvl;
    int nerr = 0, nright = 0, sum_err = 0, sum_right = 0, first_out = -1;
    soft_t e;
    y = '0; apriori = '0;
    prev_y = 0; prev_h = 0; prev_m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      if (c >= 2 * L + M + 10) begin
        e = ref_m.out_at(c);
        checks++;
        if (out !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: %b/%0d expected %b/%0d", c, out.hard, out.mag, e.hard, e.mag);
        end
        if (c - LAT >= 8) begin
          if (out.hard == sent[c - LAT]) begin nright++; sum_right += out.mag; end
          else begin nerr++; sum_err += out.mag; end
        end
      end
      if (out_valid && first_out < 0) first_out = c;
      // the datapath sees the metrics of last cycle's sample
      foreach (bmi[s, u]) bmi[s][u] = (c == 0) ? 0 : epr4_bm(prev_y, prev_h, prev_m, s, u, 4, 2);
      ref_m.step(bmi);
      // new channel bit and sample
      sent[c] = 1'($urandom);
      lvl = 0;
      for (int k = 0; k < 4; k++) begin
        int a;
        a = (c - k >= 0) ? (sent[c - k] ? 1 : -1) : -1;
        lvl += (k < 2) ? a : -a;
      end
      noise = 0;
      for (int k = 0; k < 4; k++) noise += $urandom_range(0, 4) - 2;
      yi = 4 * lvl + noise;
      if (yi > 31) yi = 31;
      if (yi < -32) yi = -32;
      y = Y_W'(yi);
      case ($urandom_range(0, 9))
        0, 1, 2, 3: apriori = '{hard: sent[c], mag: mag_t'($urandom_range(0, 8))};
        4:          apriori = '{hard: !sent[c], mag: mag_t'($urandom_range(0, 8))};
        default:    apriori = '0;
      endcase
      in_valid = (c >= 5);
      prev_y = yi; prev_h = apriori.hard; prev_m = apriori.mag;
      @(negedge clk);
    end
    checks++;
    if (first_out != 5 + LAT) begin failures++; $display("first valid output in cycle %0d, expected %0d", first_out, 5 + LAT); end
    checks++;
    if (nerr * 20 > nright) begin failures++; $display("too many bit errors: %0d of %0d", nerr, nerr + nright); end
    checks++;
    if (nerr > 0 && sum_err * nright >= sum_right * nerr) begin failures++; $display("wrong bits not less reliable"); end
    $display("bit errors %0d of %0d; mean reliability right %0d, wrong %0d", nerr, nerr + nright,
             nright ? sum_right / nright : 0, nerr ? sum_err / nerr : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
