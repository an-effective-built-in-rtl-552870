// tb_clk_div_n: checks the 1/N divider against an edge-count reference.
//
// Two instances, N = 4 (the design's ratio) and N = 5 (odd), are clocked by a
// free-running clock. After the k-th input edge since reset the output must
// equal (k mod N) >= N/2, so it has exactly one rising edge per N input
// edges. A reset in the middle must bring both back to the start.
`timescale 1ns / 1ps
module tb_clk_div_n;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic out4, out5;
  int   checks = 0, failures = 0;
  int   k = 0;       // input edges since reset
  int   rises4 = 0;
  logic out4_d = 1'b0;

  always #5 clk = ~clk;

  clk_div_n u_div4 (.clk_in(clk), .rst_n(rst_n), .clk_out(out4));
  clk_div_n #(.N(5)) u_div5 (.clk_in(clk), .rst_n(rst_n), .clk_out(out5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!out4 && !out5, "outputs low in reset");
    rst_n = 1'b1;
    for (int phase = 0; phase < 2; phase++) begin
      k = 0;
      rises4 = 0;
      out4_d = out4;
      repeat (40) begin
        @(posedge clk);
        k++;
        #1;
        check(out4 == ((k % 4) >= 2), $sformatf("N=4 edge %0d out=%0d", k, out4));
        check(out5 == ((k % 5) >= 2), $sformatf("N=5 edge %0d out=%0d", k, out5));
        if (out4 && !out4_d) rises4++;
        out4_d = out4;
      end
      check(rises4 == 10, $sformatf("N=4 gives %0d rising edges in 40", rises4));
      // Reset in the middle of a period.
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b0;
      #1 check(!out4 && !out5, "asynchronous reset clears outputs");
      @(negedge clk) rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
