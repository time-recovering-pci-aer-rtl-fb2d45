// tb_aer_fifo - self-checking test of the event FIFO.
//
// Random pushes and pops (never into a full or out of an empty FIFO) are
// checked against a queue model: head data, empty, full and level after
// every clock. A small depth is used so that full and wrap-around happen
// often; a final phase fills the FIFO completely and drains it.
module tb_aer_fifo;
  localparam int unsigned W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0;

  aer_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare();
    check(empty == (model.size() == 0), "empty");
    check(full  == (model.size() == D), "full");
    check(level == model.size(), "level");
    if (model.size() > 0) check(rd_data == model[0], "head data");
  endtask

  task automatic step(input bit w, input bit r);
    wr_en = w && (model.size() < D) && !full;
    rd_en = r && (model.size() > 0);
    wr_data = $urandom;
    @(posedge clk); #1;
    if (rd_en) void'(model.pop_front());
    if (wr_en) model.push_back(wr_data);
    wr_en = 0; rd_en = 0;
    if (model.size() == D) n_full++;
    compare();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    compare();
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45);
    while (model.size() < D) step(1, 0);
    step(1, 0);                          // push attempt while full is blocked
    while (model.size() > 0) step(0, 1);
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
