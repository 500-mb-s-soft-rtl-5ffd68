// tb_rmu: self-checking test of the pipelined reliability measure unit.
// Random metric differences, most-likely states and EQ vectors are applied
// every cycle. The expected output in cycle c is the reliability of the word
// that entered M cycles earlier: starting from 63, in its j-th cycle it
// becomes min(delta, r) unless EQ(ml_state, j) of that cycle is 1.
module tb_rmu;
  import sova_pkg::*;

  localparam int M = 15, NCYC = 2000;
  logic clk = 0, rst_n = 0;
  mag_t delta, rel;
  state_t ml_state;
  logic [NS-1:0][M-1:0] eq;
  int checks = 0, failures = 0;

  rmu #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h_delta [NCYC];
    int h_ml [NCYC];
    logic [NS-1:0][M-1:0] h_eq [NCYC];
    int n_upd = 0, n_skip = 0;
    delta = '0; ml_state = '0; eq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      if (c >= M) begin
        int r;
        r = 63;
        for (int j = 1; j <= M; j++) begin
          int cy;
          cy = c - M + j - 1;
          if (!h_eq[cy][h_ml[cy]][j-1] && h_delta[cy] < r) begin r = h_delta[cy]; n_upd++; end
          else if (h_delta[cy] < r) n_skip++;
        end
        checks++;
        if (rel !== mag_t'(r)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: rel %0d expected %0d", c, rel, r);
        end
      end
      delta    = mag_t'($urandom_range(0, 63));
      ml_state = state_t'($urandom);
      for (int i = 0; i < NS; i++) eq[i] = M'($urandom) | M'($urandom);
      h_delta[c] = int'(delta); h_ml[c] = int'(ml_state); h_eq[c] = eq;
      @(negedge clk);
    end
    checks++;
    if (n_upd == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
