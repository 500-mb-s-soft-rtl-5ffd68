// tb_ped: self-checking test of the path-equivalence detector. Random
// decision vectors are applied every cycle; for every state i and depth j
// the expected EQ(i,j) is found by tracing the two paths that compete for
// state i (through its two predecessors) back through the stored decisions
// and comparing their decisions j-1 steps before the merge. EQ(i,1) must be
// 0 (the merge branches always differ).
module tb_ped;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int M = 15, NCYC = 1000;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] dec;
  logic [NS-1:0][M-1:0] eq;
  int checks = 0, failures = 0;

  ped #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref #(15, M, NCYC + 4) ref_m = new();
    int n_eq1 = 0;
    dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      // decisions of step c go in now; eq belongs to them
      dec = (c % 50 < 25) ? NS'($urandom) : NS'($urandom) & NS'($urandom);
      for (int s = 0; s < 8; s++) ref_m.dec[c][s] = dec[s];
      #1;
      if (c >= M + 3) begin
        for (int i = 0; i < 8; i++) begin
          for (int j = 1; j <= M; j++) begin
            bit e;
            if (j == 1) e = 0;
            else e = (ref_m.trace_dec(sova_ref#(15, M, NCYC + 4)::pred(i, 0), c - 1, c - j + 1) ==
                      ref_m.trace_dec(sova_ref#(15, M, NCYC + 4)::pred(i, 1), c - 1, c - j + 1));
            checks++;
            if (e) n_eq1++;
            if (eq[i][j-1] !== e) begin
              failures++;
              if (failures < 10) $display("cycle %0d EQ(%0d,%0d)=%0d expected %0d", c, i, j, eq[i][j-1], e);
            end
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_eq1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
