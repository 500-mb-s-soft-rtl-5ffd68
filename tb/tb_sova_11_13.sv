// tb_sova_11_13: end-to-end test of the outer decoder. Random information
// bits are encoded with the (11,13) code, the second code bit is punctured
// in seven of every eight steps (9 code bits per 8 information bits, rate
// 8/9), and each kept code bit is delivered as a 7-bit sign-magnitude soft
// value, sometimes flipped with a low reliability. Every output is compared
// cycle by cycle with the behavioural reference; hard bits are compared with
// the information bits sent LAT = L+M+8 cycles earlier, and wrong decisions
// must carry a lower average reliability than right ones.
module tb_sova_11_13;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 15, M = 15, NCYC = 3000;
  localparam int LAT = L + M + 8;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  soft_t [1:0] llr;
  logic [1:0] erased;
  soft_t out;
  int checks = 0, failures = 0;

  sova_11_13 dut (.*);

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
    soft_t prev_llr [2];
    bit prev_er [2];
    int nerr = 0, nright = 0, sum_err = 0, sum_right = 0, first_out = -1;
    soft_t e;
    llr = '0; erased = '0;
    prev_llr[0] = '0; prev_llr[1] = '0; prev_er[0] = 0; prev_er[1] = 0;
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
      foreach (bmi[s, u])
        bmi[s][u] = (c == 0) ? 0 : c1113_bm(prev_llr[0].hard, prev_llr[0].mag, prev_er[0],
                                            prev_llr[1].hard, prev_llr[1].mag, prev_er[1], s, u);
      ref_m.step(bmi);
      // encode one information bit
      sent[c] = 1'($urandom);
      begin
        bit u1, u2, u3;
        bit [1:0] cb;
        u1 = (c >= 1) ? sent[c-1] : 0;
        u2 = (c >= 2) ? sent[c-2] : 0;
        u3 = (c >= 3) ? sent[c-3] : 0;
        cb[0] = sent[c] ^ u3;
        cb[1] = sent[c] ^ u2 ^ u3;
        for (int k = 0; k < 2; k++) begin
          if ($urandom_range(0, 99) < 2) llr[k] = '{hard: !cb[k], mag: mag_t'($urandom_range(0, 12))};
          else                           llr[k] = '{hard: cb[k], mag: mag_t'($urandom_range(8, 63))};
        end
      end
      erased = {(c % 8 != 0), 1'b0};
      in_valid = (c >= 5);
      prev_llr[0] = llr[0]; prev_llr[1] = llr[1]; prev_er[0] = erased[0]; prev_er[1] = erased[1];
      @(negedge clk);
    end
    checks++;
    if (first_out != 5 + LAT) begin failures++; $display("first valid output in cycle %0d, expected %0d", first_out, 5 + LAT); end
    checks++;
    if (nerr * 100 > 15 * (nerr + nright)) begin failures++; $display("too many bit errors: %0d of %0d", nerr, nerr + nright); end
    checks++;
    if (nerr > 0 && sum_err * nright >= sum_right * nerr) begin failures++; $display("wrong bits not less reliable"); end
    $display("bit errors %0d of %0d; mean reliability right %0d, wrong %0d", nerr, nerr + nright,
             nright ? sum_right / nright : 0, nerr ? sum_err / nerr : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
