// tb_smu: self-checking test of the register-exchange survivor memory.
// Random decision vectors are applied every cycle; the expected most-likely
// state is found by an explicit L-step traceback from state 0 through the
// stored decisions (behavioural reference), and must appear two cycles
// after the newest decision it depends on.
module tb_smu;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 15, NCYC = 1000;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] dec;
  state_t ml_state;
  int checks = 0, failures = 0;

  smu #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref #(L, 15, NCYC + 4) ref_m = new();
    int seen [8];
    dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      if (c >= L + 4) begin
        int e;
        e = ref_m.ml_state(c - L - 2);
        checks++;
        seen[e]++;
        if (ml_state !== state_t'(e)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: ml %0d expected %0d", c, ml_state, e);
        end
      end
      dec = NS'($urandom);
      for (int s = 0; s < 8; s++) ref_m.dec[c][s] = dec[s];
      @(negedge clk);
    end
    foreach (seen[s]) begin checks++; if (seen[s] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
