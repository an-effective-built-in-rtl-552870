// tb_fb_mux: checks the feedback multiplexer for every input combination.
`timescale 1ns / 1ps
module tb_fb_mux;

  logic fvco, fvco_div, sel, ffb;
  int   checks = 0, failures = 0;

  fb_mux dut (.fvco(fvco), .fvco_div(fvco_div), .sel(sel), .ffb(ffb));

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {sel, fvco_div, fvco} = 3'(v);
        #1;
        checks++;
        if (ffb !== (sel ? fvco_div : fvco)) begin
          failures++;
          $display("FAIL: sel=%0d fvco=%0d fvco_div=%0d ffb=%0d", sel, fvco, fvco_div, ffb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
