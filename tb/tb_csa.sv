// tb_csa: self-checking test of one transformed compare-select-add unit.
// Random partial sums (including pairs that straddle the wrap-around point
// of the modulo arithmetic) and branch metrics are applied; the expected
// decision, saturated metric difference and new partial sums are computed
// with plain integers and compared one cycle later.
module tb_csa;
  import sova_pkg::*;

  logic clk = 0, rst_n = 0;
  pm_t  pa, pb, p_out0, p_out1;
  bm_t  bm0, bm1;
  logic dec;
  mag_t delta;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_sel_b = 0, n_sat = 0;

  csa dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, da, db, mn, e0, e1, ed, edl, full;
    full = 1 << PM_W;
    pa = '0; pb = '0; bm0 = '0; bm1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      base = $urandom_range(0, full - 1);
      da = $urandom_range(0, 300);
      db = $urandom_range(0, 300);
      if (n % 7 == 0) db = da;   // ties keep pa
      pa = pm_t'(base + da);
      pb = pm_t'(base + db);
      bm0 = bm_t'($urandom_range(0, 127));
      bm1 = bm_t'($urandom_range(0, 127));
      if (base + 300 >= full) n_wrap++;
      mn  = (db < da) ? db : da;
      ed  = (db < da);
      edl = (da > db) ? da - db : db - da;
      if (edl > 63) begin edl = 63; n_sat++; end
      e0 = (base + mn + int'(bm0)) % full;
      e1 = (base + mn + int'(bm1)) % full;
      @(negedge clk);
      checks += 4;
      if (dec !== 1'(ed))            begin failures++; $display("dec %0d exp %0d", dec, ed); end
      if (delta !== mag_t'(edl))     begin failures++; $display("delta %0d exp %0d", delta, edl); end
      if (p_out0 !== pm_t'(e0))      begin failures++; $display("p0 %0d exp %0d", p_out0, e0); end
      if (p_out1 !== pm_t'(e1))      begin failures++; $display("p1 %0d exp %0d", p_out1, e1); end
      if (ed) n_sel_b++;
    end
    checks++;
    if (n_wrap == 0 || n_sel_b == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
