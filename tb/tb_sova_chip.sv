// tb_sova_chip: end-to-end test of the chip with both decoders at their
// default sizes (L = M = 15), running at the same time.
//
// Inner decoder: random channel bits through the EPR4 channel with noise,
// plus a-priori values that are mostly right, sometimes wrong, sometimes
// absent. Outer decoder: random information bits through the (11,13)
// encoder, punctured to rate 8/9, delivered as soft values with occasional
// flipped bits. Every output of both decoders is compared cycle by cycle
// with the behavioural reference, the hard bits with the bits sent
// L+M+8 cycles earlier, and the first valid output must come exactly
// L+M+8 cycles after the first valid input (one bit per clock, no gaps).
//
// It also counts how often each mechanism of the design occurred and fails
// if one never did: the CSA choosing the second predecessor, wrap-around of
// the modulo partial sums, saturated metric differences, reliability updates
// taken (competing path disagrees) and skipped (EQ = 1), outputs below the
// maximum reliability, a-priori penalties and punctured code bits.
module tb_sova_chip;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 15, M = 15, NCYC = 3000;
  localparam int LAT = L + M + 8;

  logic clk = 0, rst_n = 0;
  logic epr4_in_valid = 0, epr4_out_valid;
  logic signed [Y_W-1:0] epr4_y;
  soft_t epr4_apriori, epr4_out;
  logic c1113_in_valid = 0, c1113_out_valid;
  soft_t [1:0] c1113_llr;
  logic [1:0] c1113_erased;
  soft_t c1113_out;
  int checks = 0, failures = 0;

  sova_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_sel_b = 0, n_wrap = 0, n_sat = 0, n_soft = 0, n_apriori = 0, n_punct = 0;
  logic [PM_W-1:0] last_p;

  always @(posedge clk) if (rst_n) begin
    n_sel_b += $countones(dut.u_sova_epr4.u_core.dec_c) + $countones(dut.u_sova_11_13.u_core.dec_c);
    if (int'(last_p) - int'(dut.u_sova_epr4.u_core.u_csa.p[0][0]) > (1 << (PM_W - 1))) n_wrap++;
    last_p = dut.u_sova_epr4.u_core.u_csa.p[0][0];
    if (dut.u_sova_epr4.u_core.delta_sel == MAG_MAX) n_sat++;
    if (dut.u_sova_11_13.u_core.delta_sel == MAG_MAX) n_sat++;
  end

  task automatic check_out(string name, int c, soft_t got, soft_t e, bit sent_bit, bit use_sent,
                           ref int nerr, ref int nright);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("%s cycle %0d: %b/%0d expected %b/%0d", name, c, got.hard, got.mag, e.hard, e.mag);
    end
    if (e.mag != MAG_MAX) n_soft++;
    if (use_sent) begin
      if (got.hard == sent_bit) nright++;
      else nerr++;
    end
  endtask

  initial begin
    sova_ref #(L, M, NCYC + 8) ref_a = new();   // inner
    sova_ref #(L, M, NCYC + 8) ref_b = new();   // outer
    int bma [8][2];
    int bmb [8][2];
    bit sa [NCYC];
    bit sb [NCYC];
    int py, ph, pm_, yi, lvl, noise;
    soft_t pl [2];
    bit pe [2];
    int erra = 0, righta = 0, errb = 0, rightb = 0, first_a = -1, first_b = -1;
    epr4_y = '0; epr4_apriori = '0; c1113_llr = '0; c1113_erased = '0;
    py = 0; ph = 0; pm_ = 0; pl[0] = '0; pl[1] = '0; pe[0] = 0; pe[1] = 0;
    last_p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      if (c >= 2 * L + M + 10) begin
        bit use_s;
        use_s = (c - LAT >= 8);
        check_out("epr4", c, epr4_out, ref_a.out_at(c), use_s ? sa[c - LAT] : 0, use_s, erra, righta);
        check_out("11_13", c, c1113_out, ref_b.out_at(c), use_s ? sb[c - LAT] : 0, use_s, errb, rightb);
      end
      if (epr4_out_valid && first_a < 0) first_a = c;
      if (c1113_out_valid && first_b < 0) first_b = c;
      foreach (bma[s, u]) begin
        bma[s][u] = (c == 0) ? 0 : epr4_bm(py, ph, pm_, s, u, 4, 2);
        bmb[s][u] = (c == 0) ? 0 : c1113_bm(pl[0].hard, pl[0].mag, pe[0], pl[1].hard, pl[1].mag, pe[1], s, u);
      end
      ref_a.step(bma);
      ref_b.step(bmb);
      // inner: EPR4 channel
      sa[c] = 1'($urandom);
      lvl = 0;
      for (int k = 0; k < 4; k++) begin
        int a;
        a = (c - k >= 0) ? (sa[c - k] ? 1 : -1) : -1;
        lvl += (k < 2) ? a : -a;
      end
      noise = 0;
      for (int k = 0; k < 4; k++) noise += $urandom_range(0, 4) - 2;
      yi = 4 * lvl + noise;
      if (yi > 31) yi = 31;
      if (yi < -32) yi = -32;
      epr4_y = Y_W'(yi);
      case ($urandom_range(0, 9))
        0, 1, 2, 3: epr4_apriori = '{hard: sa[c], mag: mag_t'($urandom_range(0, 8))};
        4:          epr4_apriori = '{hard: !sa[c], mag: mag_t'($urandom_range(0, 8))};
        default:    epr4_apriori = '0;
      endcase
      if (epr4_apriori.mag != 0) n_apriori++;
      // outer: (11,13) code punctured to rate 8/9
      sb[c] = 1'($urandom);
      begin
        bit u1, u2, u3;
        bit [1:0] cb;
        u2 = (c >= 2) ? sb[c-2] : 0;
        u3 = (c >= 3) ? sb[c-3] : 0;
        cb[0] = sb[c] ^ u3;
        cb[1] = sb[c] ^ u2 ^ u3;
        for (int k = 0; k < 2; k++) begin
          if ($urandom_range(0, 99) < 2) c1113_llr[k] = '{hard: !cb[k], mag: mag_t'($urandom_range(0, 12))};
          else                           c1113_llr[k] = '{hard: cb[k], mag: mag_t'($urandom_range(8, 63))};
        end
      end
      c1113_erased = {(c % 8 != 0), 1'b0};
      if (c1113_erased != 0) n_punct++;
      epr4_in_valid = (c >= 5);
      c1113_in_valid = (c >= 7);
      py = yi; ph = epr4_apriori.hard; pm_ = epr4_apriori.mag;
      pl[0] = c1113_llr[0]; pl[1] = c1113_llr[1]; pe[0] = c1113_erased[0]; pe[1] = c1113_erased[1];
      @(negedge clk);
    end
    checks += 2;
    if (first_a != 5 + LAT) begin failures++; $display("epr4 latency: first output %0d expected %0d", first_a, 5 + LAT); end
    if (first_b != 7 + LAT) begin failures++; $display("11_13 latency: first output %0d expected %0d", first_b, 7 + LAT); end
    checks += 2;
    if (erra * 20 > righta) begin failures++; $display("epr4: too many bit errors %0d", erra); end
    if (errb * 100 > 15 * (errb + rightb)) begin failures++; $display("11_13: too many bit errors %0d", errb); end
    $display("bit errors: epr4 %0d of %0d, 11_13 %0d of %0d", erra, erra + righta, errb, errb + rightb);
    $display("mechanisms: second-predecessor selects %0d, partial-sum wraps %0d, saturated deltas %0d",
             n_sel_b, n_wrap, n_sat);
    $display("            reliability updates taken %0d / skipped by EQ %0d, soft outputs %0d, a-priori %0d, punctured %0d",
             ref_a.n_min_taken + ref_b.n_min_taken, ref_a.n_eq_skip + ref_b.n_eq_skip, n_soft, n_apriori, n_punct);
    checks += 8;
    if (n_sel_b == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_sat == 0) failures++;
    if (ref_a.n_min_taken == 0 || ref_b.n_min_taken == 0) failures++;
    if (ref_a.n_eq_skip == 0 || ref_b.n_eq_skip == 0) failures++;
    if (n_soft == 0) failures++;
    if (n_apriori == 0) failures++;
    if (n_punct == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
