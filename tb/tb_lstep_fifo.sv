// tb_lstep_fifo: self-checking test of the fixed-delay FIFO: random words
// go in every cycle and each must come out exactly DEPTH cycles later.
module tb_lstep_fifo;
  localparam int W = 7, D = 17;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  lstep_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      if (c >= D) begin
        checks++;
        if (dout !== hist[c - D]) begin
          failures++;
          $display("cycle %0d: %h expected %h", c, dout, hist[c - D]);
        end
      end else begin
        checks++;
        if (dout !== '0) failures++;   // reset contents
      end
      din = W'($urandom);
      hist.push_back(din);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
