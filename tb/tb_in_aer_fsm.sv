// tb_in_aer_fsm - self-checking test of the AER-IN monitor.
//
// An AER sender model raises REQ with a random address after a random gap,
// waits for ACK, releases REQ and waits for ACK to drop. The IFIFO is a model
// whose `full` the testbench controls. Every clock edge is numbered and the
// ticks of the time base are counted; each stored word must hold the sent
// address and the number of ticks between its storing edge and the previous
// one (saturated at 2^16-1). Also checked: the store latency after REQ, that a
// full IFIFO holds the event back without ACK (stall) and loses nothing, a
// divided time base, and timestamp saturation.
module tb_in_aer_fsm;
  import pci_aer_pkg::*;
  localparam int unsigned SYNC = 2;

  logic clk = 0, rst_n = 0, en = 0, tick = 0;
  logic [ADDR_W-1:0] aer_addr = '0;
  logic aer_req = 0, aer_ack;
  logic fifo_full = 0, fifo_wr;
  aer_word_t fifo_data;
  logic stall, ts_sat;

  in_aer_fsm #(.SYNC_STAGES(SYNC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_sat = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0;
  longint ntick = 0;           // ticks at edges before the current one
  int tick_div = 1;
  int  wr_edge [$], req_edge [$];
  longint wr_ntick [$];
  aer_word_t words [$];
  logic [ADDR_W-1:0] sent_addr [$];

  always @(posedge clk) begin
    if (rst_n && fifo_wr) begin
      wr_edge.push_back(cyc);
      wr_ntick.push_back(ntick);
      words.push_back(fifo_data);
    end
    if (stall) n_stall++;
    if (ts_sat) n_sat++;
    if (rst_n && en && tick) ntick++;
    tick <= ((cyc + 1) % tick_div) == 0;
    cyc++;
  end

  // one four-phase transfer; REQ changes right after a clock edge
  task automatic send(input logic [ADDR_W-1:0] a);
    @(posedge clk);
    aer_addr <= a;
    aer_req  <= 1;
    req_edge.push_back(cyc);   // cyc already advanced: this is the next edge's number minus 0
    sent_addr.push_back(a);
    do @(posedge clk); while (!aer_ack);
    aer_req <= 0;
    do @(posedge clk); while (aer_ack);
  endtask

  task automatic verify();
    check(words.size() == sent_addr.size(), "every event stored once");
    for (int i = 0; i < words.size() && i < sent_addr.size(); i++) begin
      longint exp_ts;
      check(words[i].addr == sent_addr[i], $sformatf("event %0d address", i));
      if (i > 0) begin
        exp_ts = wr_ntick[i] - wr_ntick[i-1];
        if (exp_ts > 65535) exp_ts = 65535;
        check(longint'(words[i].dt) == exp_ts,
              $sformatf("event %0d time %0d expected %0d", i, words[i].dt, exp_ts));
      end
    end
  endtask

  task automatic restart();
    rst_n = 0; en = 0;
    wr_edge.delete(); wr_ntick.delete(); words.delete(); sent_addr.delete(); req_edge.delete();
    repeat (3) @(posedge clk);
    #1 rst_n = 1; en = 1;
  endtask

  initial begin
    // A: random gaps, tick every clock; check store latency
    restart();
    for (int i = 0; i < 40; i++) begin
      repeat ($urandom_range(0, 30)) @(posedge clk);
      send(16'($urandom));
    end
    verify();
    for (int i = 0; i < wr_edge.size() && i < req_edge.size(); i++)
      check(wr_edge[i] == req_edge[i] + SYNC + 1, $sformatf("event %0d store latency", i));
    // with one tick per clock the time is the distance between storing edges
    for (int i = 1; i < words.size(); i++)
      check(int'(words[i].dt) == wr_edge[i] - wr_edge[i-1], "time equals clocks between events");

    // B: full IFIFO holds the event: no store, no ACK, stall high
    restart();
    send(16'h0A0A);
    fifo_full = 1;
    fork
      send(16'h0B0B);
      begin
        repeat (40) begin
          @(posedge clk); #1;
          check(!fifo_wr && !aer_ack, "full: event held back");
        end
        check(stall, "full: stall reported");
        fifo_full = 0;
      end
    join
    send(16'h0C0C);
    verify();

    // C: divided time base (tick every 4 clocks)
    restart();
    tick_div = 4;
    for (int i = 0; i < 20; i++) begin
      repeat ($urandom_range(0, 40)) @(posedge clk);
      send(16'($urandom));
    end
    verify();
    tick_div = 1;

    // D: a gap longer than the 16-bit counter: saturation
    restart();
    send(16'h1111);
    repeat (70000) @(posedge clk);
    send(16'h2222);
    verify();
    check(words.size() == 2 && words[1].dt == 16'hFFFF, "saturated time value");

    check(n_stall > 0, "mechanism: stall on full IFIFO");
    check(n_sat > 0, "mechanism: timestamp saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
