// tb_clk_div2: checks that the internal clock toggles on every rising edge of the
// external clock, giving half its frequency and a 50% duty cycle even when the external
// clock itself is asymmetric (here 30% high).
module tb_clk_div2;
  logic cki = 1'b0, clk_out;
  int checks = 0, failures = 0;
  time t_rise [3];
  int nr = 0;

  clk_div2 dut (.cki, .clk_out);

  // 33.33 MHz external clock (30 ns period), 9 ns high / 21 ns low
  initial forever begin
    #21 cki = 1'b1;
    #9  cki = 1'b0;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev;
  initial begin
    @(posedge cki); #1;
    for (int n = 0; n < 40; n++) begin
      prev = clk_out;
      @(posedge cki); #1;
      checks++;
      if (clk_out === prev) begin
        failures++;
        $display("FAIL clk_out did not toggle");
      end
    end
    // period and duty cycle of the internal clock
    @(posedge clk_out); t_rise[0] = $time;
    @(negedge clk_out); t_rise[1] = $time;
    @(posedge clk_out); t_rise[2] = $time;
    checks++;
    if (t_rise[2] - t_rise[0] != 60) begin
      failures++; $display("FAIL period %0t", t_rise[2] - t_rise[0]);
    end
    checks++;
    if (t_rise[1] - t_rise[0] != 30) begin
      failures++; $display("FAIL high time %0t", t_rise[1] - t_rise[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
