// tb_tick_divider - self-checking test of the programmable time base.
//
// Every clock edge is numbered and the edges at which `tick` is high are
// recorded. For several divisor values: no tick while disabled, the first
// tick div clocks after the first enabled edge, then one every div+1 clocks.
module tb_tick_divider;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] div = '0;
  logic tick;
  int checks = 0, failures = 0;
  int cyc = 0;
  int tq [$];

  tick_divider #(.DIV_W(16)) dut (.*);
  always #5 clk = ~clk;

  // edge numbering; tick is read before the edge's updates land
  always @(posedge clk) begin
    if (tick) tq.push_back(cyc);
    cyc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int divs [5] = '{0, 1, 2, 7, 100};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (divs[k]) begin
      int first_en_edge;
      @(posedge clk); #1;
      en = 0; div = 16'(divs[k]);
      repeat (4) @(posedge clk);
      #1;
      check(tq.size() == 0, "no tick while disabled");
      tq.delete();
      first_en_edge = cyc;         // next edge sees en = 1
      en = 1;
      repeat ((divs[k] + 1) * 5 + 2) @(posedge clk);
      #1;
      check(tq.size() >= 5, $sformatf("ticks seen for div=%0d", divs[k]));
      if (tq.size() > 0)
        check(tq[0] == first_en_edge + divs[k], $sformatf("first tick div=%0d", divs[k]));
      for (int i = 1; i < tq.size(); i++)
        check(tq[i] - tq[i-1] == divs[k] + 1, $sformatf("period div=%0d", divs[k]));
      en = 0;
      @(posedge clk); #1;
      tq.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
