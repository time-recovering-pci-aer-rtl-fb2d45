// tb_out_aer_fsm - self-checking test of the OUT-AER sequencer.
//
// The OFIFO is a queue in the testbench and the AER receiver is a model that
// answers REQ after a programmable number of clocks. Every clock edge is
// numbered; the testbench records at which edges words are popped, REQ rises
// and ACK is released. It then rebuilds the schedule on its own: with
// delays d0, d1, ... event 0 is due d0 clocks after its pop and event i is
// due d_i clocks after event i-1 was *due* (not after it was sent). Each event
// must be sent at the later of its due edge and the edge after its pop, must
// carry the right address and must raise `late` exactly when it missed its
// due edge. Phases: on-time traffic with no late ACKs; random late ACKs
// (time recovery with carried deficits); one very late ACK whose deficit
// spans several events; back-to-back words at peak rate; a divided time
// base; ENOF held low.
module tb_out_aer_fsm;
  import pci_aer_pkg::*;
  localparam int unsigned SYNC = 2;

  logic clk = 0, rst_n = 0;
  logic enof = 0, tick = 1;
  logic fifo_empty = 1, fifo_rd;
  aer_word_t fifo_data = '0;
  logic [ADDR_W-1:0] aer_addr;
  logic aer_req, aer_ack = 0;
  logic busy, sent, late;

  out_aer_fsm #(.TIMER_W(24), .SYNC_STAGES(SYNC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wait = 0, n_late = 0, n_carry = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- models and recorders -----------------------------------
  aer_word_t q [$];        // OFIFO contents
  int  cyc = 0;
  int  fetchq [$], emitq [$], ackfallq [$];
  logic [ADDR_W-1:0] addrq [$];
  bit  lateq [$];
  bit  req_prev = 0;
  int  ack_delay = 0, ack_cnt = 0;
  int  tick_div = 1;       // tick on every tick_div-th clock

  always @(posedge clk) begin
    // OFIFO model (show-ahead): pop on fifo_rd
    if (rst_n && fifo_rd) begin
      fetchq.push_back(cyc);
      void'(q.pop_front());
    end
    fifo_empty <= (q.size() == 0);
    fifo_data  <= (q.size() > 0) ? q[0] : '0;
    // REQ rose at the previous edge
    if (rst_n && aer_req && !req_prev) begin
      emitq.push_back(cyc - 1);
      addrq.push_back(aer_addr);
      lateq.push_back(late);
    end
    req_prev = aer_req;
    // receiver model
    if (!rst_n) begin
      aer_ack <= 0; ack_cnt = 0;
    end else if (aer_req && !aer_ack) begin
      if (ack_cnt >= ack_delay) begin aer_ack <= 1; ack_cnt = 0; end
      else ack_cnt++;
    end else if (rst_n && !aer_req && aer_ack) begin
      aer_ack <= 0;
      ackfallq.push_back(cyc);
    end
    tick <= ((cyc + 1) % tick_div) == 0;
    cyc++;
  end

  task automatic restart();
    rst_n = 0; enof = 0;
    q.delete(); fetchq.delete(); emitq.delete(); ackfallq.delete();
    addrq.delete(); lateq.delete();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
  endtask

  // Load n words, let them run, and wait until the last handshake is over.
  task automatic run(input int n, input int dmin, input int dmax,
                     input int amin, input int amax, output int d [$],
                     output aer_word_t src [$]);
    d.delete(); src.delete();
    for (int i = 0; i < n; i++) begin
      aer_word_t w;
      w.dt   = 16'($urandom_range(dmin, dmax));
      w.addr = 16'($urandom);
      d.push_back(int'(w.dt));
      src.push_back(w);
      q.push_back(w);
    end
    @(posedge clk); #1;
    enof = 1;
    while (emitq.size() < n || aer_req || aer_ack || busy) begin
      ack_delay = $urandom_range(amin, amax);
      @(posedge clk); #1;
    end
  endtask

  // Check the recorded run against the independently rebuilt schedule.
  task automatic check_schedule(input int d [$], input aer_word_t words [$]);
    longint due;
    check(emitq.size() == d.size(), "all events sent");
    check(fetchq.size() == d.size(), "all words popped");
    for (int i = 0; i < d.size() && i < emitq.size() && i < fetchq.size(); i++) begin
      int expect_emit;
      due = (i == 0) ? fetchq[0] + d[0] : due + d[i];
      expect_emit = (due > fetchq[i] + 1) ? int'(due) : fetchq[i] + 1;
      check(emitq[i] == expect_emit,
            $sformatf("event %0d sent at %0d, expected %0d", i, emitq[i], expect_emit));
      check(addrq[i] == words[i].addr, $sformatf("event %0d address", i));
      check(lateq[i] == (emitq[i] > due), $sformatf("event %0d late flag", i));
      if (i > 0 && i - 1 < ackfallq.size())
        check(fetchq[i] == ackfallq[i-1] + SYNC + 1, $sformatf("event %0d pop latency", i));
      if (emitq[i] == due && d[i] > 0) n_wait++;
      if (emitq[i] > due) n_late++;
      if (i > 0 && emitq[i] > due && emitq[i-1] > due - d[i]) n_carry++;
    end
  endtask

  initial begin
    int d [$];
    aer_word_t words [$];

    // A: on-time traffic, ACK at once, delays longer than a handshake
    restart();
    run(40, 12, 40, 0, 0, d, words);
    check_schedule(d, words);
    foreach (lateq[i]) check(!lateq[i], "phase A never late");
    for (int i = 1; i < emitq.size(); i++)
      check(emitq[i] - emitq[i-1] == d[i], "phase A inter-event interval equals delay");

    // B: random late ACKs, short delays: deficits are made up later
    restart();
    begin
      aer_word_t src [$];
      for (int i = 0; i < 60; i++) begin
        aer_word_t w; w.dt = 16'($urandom_range(0, 25)); w.addr = 16'($urandom);
        src.push_back(w);
      end
      foreach (src[i]) q.push_back(src[i]);
      d.delete(); foreach (src[i]) d.push_back(int'(src[i].dt));
      @(posedge clk); #1; enof = 1;
      while (emitq.size() < 60 || aer_req || aer_ack || busy) begin
        ack_delay = $urandom_range(0, 14);
        @(posedge clk); #1;
      end
      check_schedule(d, src);
    end

    // C: one very late ACK, then events 20 clocks apart: the deficit of
    //    ~70 clocks makes several events go out without waiting
    restart();
    begin
      aer_word_t src [$];
      for (int i = 0; i < 12; i++) begin
        aer_word_t w; w.dt = (i == 0) ? 16'd5 : 16'd20; w.addr = 16'(100 + i);
        src.push_back(w);
      end
      foreach (src[i]) q.push_back(src[i]);
      d.delete(); foreach (src[i]) d.push_back(int'(src[i].dt));
      @(posedge clk); #1; enof = 1;
      ack_delay = 80;
      while (emitq.size() < 1) begin @(posedge clk); #1; end
      while (!aer_ack) begin @(posedge clk); #1; end
      ack_delay = 0;
      while (emitq.size() < 12 || aer_req || aer_ack || busy) begin @(posedge clk); #1; end
      check_schedule(d, src);
      check(lateq[1] && lateq[2] && lateq[3], "deficit carried over several events");
      check(!lateq[11], "schedule recovered by the last event");
    end

    // D: back-to-back words with zero delay: peak rate
    restart();
    begin
      aer_word_t src [$];
      for (int i = 0; i < 10; i++) begin
        aer_word_t w; w.dt = 16'd0; w.addr = 16'($urandom); src.push_back(w);
      end
      foreach (src[i]) q.push_back(src[i]);
      d.delete(); foreach (src[i]) d.push_back(0);
      @(posedge clk); #1; enof = 1; ack_delay = 0;
      while (emitq.size() < 10 || aer_req || aer_ack || busy) begin @(posedge clk); #1; end
      check_schedule(d, src);
      for (int i = 1; i < emitq.size(); i++)
        check(emitq[i] - emitq[i-1] == 2 * (SYNC + 1) + 3, "peak-rate event period");
    end

    // E: time base divided by 3: intervals are 3 clocks per delay unit
    restart();
    tick_div = 3;
    begin
      aer_word_t src [$];
      for (int i = 0; i < 10; i++) begin
        aer_word_t w; w.dt = 16'($urandom_range(6, 20)); w.addr = 16'($urandom); src.push_back(w);
      end
      foreach (src[i]) q.push_back(src[i]);
      @(posedge clk); #1; enof = 1; ack_delay = 0;
      while (emitq.size() < 10 || aer_req || aer_ack || busy) begin @(posedge clk); #1; end
      check(emitq.size() == 10, "divided: all sent");
      for (int i = 1; i < emitq.size(); i++)
        check(emitq[i] - emitq[i-1] == 3 * int'(src[i].dt), "divided time base interval");
    end
    tick_div = 1;

    // F: ENOF low holds words in the OFIFO
    restart();
    begin
      aer_word_t w; w.dt = 16'd3; w.addr = 16'h1234;
      q.push_back(w);
      repeat (50) begin @(posedge clk); #1; check(!aer_req && !fifo_rd, "ENOF low: nothing sent"); end
      enof = 1;
      while (emitq.size() < 1) begin @(posedge clk); #1; end
      check(addrq[0] == 16'h1234, "ENOF high: word sent");
      check(emitq[0] == fetchq[0] + 3, "ENOF high: first delay");
    end

    check(n_wait > 0,  "mechanism: wait state");
    check(n_late > 0,  "mechanism: late ACK deducted");
    check(n_carry > 0, "mechanism: deficit carried past an event");
    $display("waits=%0d late=%0d carried=%0d", n_wait, n_late, n_carry);
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
