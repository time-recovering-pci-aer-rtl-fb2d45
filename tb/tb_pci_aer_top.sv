// tb_pci_aer_top - end-to-end test of the PCI-AER interface, default sizes.
//
// The AER output port is looped back into the AER input port, as in the
// board's loopback test. A bus-functional model of the PCI bridge's local
// side writes event words into the OFIFO and reads timestamped words back
// from the IFIFO. Because the input monitor stores each event a fixed number
// of clocks after the output raised REQ, the timestamp read back for an event
// equals the clocks between its REQ and the previous one, which lets the
// testbench check the output timing from the host side. Phases:
//   1 on-time sequence: every timestamp equals the requested delay
//   2 peak rate: zero delays give the handshake-limited period
//   3 IFIFO overflow pressure: the host stops reading, the IFIFO fills, the
//     input holds back ACK, the output falls behind; the interrupt fires, the
//     host drains, and the output catches up so that the total time over the
//     whole sequence equals the sum of the delays (time recovery)
//   4 divided time bases, 5 ENOF pause, 6 OFIFO overflow flag, 7 timestamp
//     saturation.
// Each mechanism is counted and a failure is counted for any that never
// happened. The first word of each phase has a long delay so that a deficit
// left over from the previous phase is used up before the phase is measured.
module tb_pci_aer_top;
  import pci_aer_pkg::*;
  localparam int unsigned SYNC  = 2;
  localparam int unsigned DEPTH = 512;          // default FIFO depth
  localparam int unsigned PEAK  = 4 * (SYNC + 1) + 1;  // loopback period, clocks

  logic clk = 0, rst_n = 0;
  logic [REG_AW-1:0] lb_addr = '0;
  logic lb_wr = 0, lb_rd = 0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_rvalid, irq;
  logic [ADDR_W-1:0] aer_out_addr, aer_in_addr;
  logic aer_out_req, aer_out_ack, aer_in_req, aer_in_ack;

  pci_aer_top dut (.*);

  // loopback cable
  assign aer_in_addr = aer_out_addr;
  assign aer_in_req  = aer_out_req;
  assign aer_out_ack = aer_in_ack;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int m_wait = 0, m_peak = 0, m_stall = 0, m_irq = 0, m_late = 0,
      m_recover = 0, m_div = 0, m_pause = 0, m_ovf = 0, m_sat = 0;

  always @(posedge clk) if (irq) m_irq++;

  // ---------------- local-bus model of the PCI bridge ----------------------
  // Strobes change 1 time unit after a clock edge and last one clock, so
  // back-to-back calls make a burst of one access per clock.
  task automatic bus_write(input reg_addr_e a, input logic [31:0] d);
    lb_addr = a; lb_wdata = d; lb_wr = 1;
    @(posedge clk);
    #1 lb_wr = 0;
  endtask

  task automatic bus_read(input reg_addr_e a, output logic [31:0] d);
    lb_addr = a; lb_rd = 1;
    @(posedge clk);
    #1 lb_rd = 0;
    d = lb_rdata;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  aer_word_t rx [$];

  // read everything the IFIFO holds now
  task automatic drain();
    logic [31:0] lv, w;
    bus_read(REG_LEVELS, lv);
    for (int i = 0; i < int'(lv[31:16]); i++) begin
      bus_read(REG_IFIFO, w);
      rx.push_back(aer_word_t'(w));
    end
  endtask

  // push words, never more than the OFIFO has room for
  task automatic send(input aer_word_t w [$]);
    int i = 0;
    logic [31:0] lv;
    while (i < w.size()) begin
      int room;
      bus_read(REG_LEVELS, lv);
      room = DEPTH - int'(lv[15:0]);
      for (int k = 0; k < room && i < w.size(); k++) begin
        bus_write(REG_OFIFO, 32'(w[i]));
        i++;
      end
      if (i < w.size()) idle(50);
    end
  endtask

  task automatic wait_rx(input int n, input int limit);
    int t = 0;
    while (rx.size() < n && t < limit) begin drain(); idle(20); t++; end
  endtask

  function automatic aer_word_t mk(input int dt, input int addr);
    aer_word_t w; w.dt = 16'(dt); w.addr = 16'(addr); return w;
  endfunction

  initial begin
    aer_word_t w [$];
    logic [31:0] r;
    longint sum_d, sum_ts;
    int base;

    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;

    // ---- 1: on-time sequence ----
    bus_write(REG_CTRL, 32'b011);         // ENOF, input enable
    w.delete(); rx.delete();
    w.push_back(mk(1000, 16'h0100));
    for (int i = 1; i < 60; i++) w.push_back(mk($urandom_range(PEAK, 80), $urandom));
    send(w);
    wait_rx(60, 1000);
    check(rx.size() == 60, "phase 1: all events looped back");
    for (int i = 0; i < rx.size(); i++) begin
      check(rx[i].addr == w[i].addr, $sformatf("phase 1 address %0d", i));
      if (i > 0) begin
        check(rx[i].dt == w[i].dt, $sformatf("phase 1 interval %0d: %0d vs %0d", i, rx[i].dt, w[i].dt));
        if (rx[i].dt == w[i].dt) m_wait++;
      end
    end

    // ---- 2: peak rate ----
    w.delete(); rx.delete();
    w.push_back(mk(1000, 16'h0200));
    for (int i = 1; i < 30; i++) w.push_back(mk(0, 16'h0200 + i));
    send(w);
    wait_rx(30, 1000);
    check(rx.size() == 30, "phase 2: all events");
    for (int i = 1; i < rx.size(); i++) begin
      check(rx[i].dt == 16'(PEAK), $sformatf("phase 2 peak period %0d", rx[i].dt));
      if (rx[i].dt == 16'(PEAK)) m_peak++;
    end

    // ---- 3: IFIFO fills, output falls behind, then recovers ----
    w.delete(); rx.delete();
    bus_write(REG_IRQ_THR, 32'(DEPTH - 12));
    bus_write(REG_CTRL, 32'b111);         // + interrupt enable
    w.push_back(mk(1000, 16'h0300));
    for (int i = 1; i < 700; i++) w.push_back(mk(40, 16'h0300 + i));
    fork
      send(w);
      begin
        // the host ignores the IFIFO until the interrupt, and a while after
        while (!irq) @(posedge clk);
        idle(3000);
        bus_read(REG_FLAGS, r);
        check(r[FLAG_IFIFO_FULL] && r[FLAG_IN_STALL], "phase 3: IFIFO full and input stalled");
        if (r[FLAG_IN_STALL]) m_stall++;
      end
    join
    wait_rx(700, 5000);
    check(rx.size() == 700, "phase 3: no event lost");
    sum_d = 0; sum_ts = 0;
    for (int i = 0; i < rx.size(); i++) begin
      check(rx[i].addr == w[i].addr, $sformatf("phase 3 address %0d", i));
      if (i > 0) begin sum_d += w[i].dt; sum_ts += rx[i].dt; end
    end
    check(sum_ts == sum_d, $sformatf("phase 3: total time %0d equals scheduled %0d", sum_ts, sum_d));
    if (sum_ts == sum_d) m_recover++;
    bus_read(REG_LATE, r);
    check(r > 100, $sformatf("phase 3: late events counted (%0d)", r));
    m_late = int'(r);
    check(rx[699].dt == 16'd40, "phase 3: back on schedule at the end");
    bus_write(REG_CTRL, 32'b011);

    // ---- 4: divided time bases (both by 3) ----
    w.delete(); rx.delete();
    bus_write(REG_OUT_DIV, 2);
    bus_write(REG_IN_DIV, 2);
    w.push_back(mk(1000, 16'h0400));
    for (int i = 1; i < 20; i++) w.push_back(mk($urandom_range(6, 30), 16'h0400 + i));
    send(w);
    wait_rx(20, 2000);
    check(rx.size() == 20, "phase 4: all events");
    for (int i = 1; i < rx.size(); i++) begin
      check(rx[i].dt == w[i].dt, $sformatf("phase 4 divided interval %0d", i));
      if (rx[i].dt == w[i].dt) m_div++;
    end
    bus_write(REG_OUT_DIV, 0);
    bus_write(REG_IN_DIV, 0);

    // ---- 5: ENOF low pauses the output ----
    w.delete(); rx.delete();
    bus_write(REG_CTRL, 32'b010);
    for (int i = 0; i < 10; i++) w.push_back(mk(20, 16'h0500 + i));
    send(w);
    base = 0;
    repeat (500) begin @(posedge clk); if (aer_out_req) base++; end
    check(base == 0, "phase 5: no event while ENOF is low");
    if (base == 0) m_pause++;
    bus_read(REG_LEVELS, r);
    check(r[15:0] == 16'd10, "phase 5: words wait in the OFIFO");
    bus_write(REG_CTRL, 32'b011);
    wait_rx(10, 1000);
    check(rx.size() == 10, "phase 5: events sent after ENOF");

    // ---- 6: OFIFO overflow ----
    bus_write(REG_CTRL, 32'b010);
    for (int i = 0; i < DEPTH + 3; i++) bus_write(REG_OFIFO, 32'(mk(PEAK, i)));
    bus_read(REG_FLAGS, r);
    check(r[FLAG_OFIFO_FULL] && r[FLAG_OFIFO_OVF], "phase 6: OFIFO overflow flagged");
    if (r[FLAG_OFIFO_OVF]) m_ovf++;
    bus_read(REG_LEVELS, r);
    check(r[15:0] == 16'(DEPTH), "phase 6: OFIFO holds its depth");
    bus_write(REG_FLAGS, 32'h1FF);
    rx.delete();
    bus_write(REG_CTRL, 32'b011);
    wait_rx(DEPTH, 5000);
    check(rx.size() == DEPTH, "phase 6: the accepted words are sent");

    // ---- 7: timestamp saturation (output ticks 4x slower than input) ----
    w.delete(); rx.delete();
    bus_write(REG_OUT_DIV, 3);
    w.push_back(mk(10, 16'h0700));
    w.push_back(mk(20000, 16'h0701));
    send(w);
    wait_rx(2, 10000);
    check(rx.size() == 2 && rx[1].dt == 16'hFFFF, "phase 7: saturated timestamp");
    bus_read(REG_FLAGS, r);
    check(r[FLAG_TS_SAT], "phase 7: saturation flag");
    if (r[FLAG_TS_SAT]) m_sat++;

    $display("mechanisms: wait=%0d peak=%0d stall=%0d irq=%0d late=%0d recover=%0d div=%0d pause=%0d ovf=%0d sat=%0d",
             m_wait, m_peak, m_stall, m_irq, m_late, m_recover, m_div, m_pause, m_ovf, m_sat);
    check(m_wait > 0,    "mechanism: wait states");
    check(m_peak > 0,    "mechanism: peak-rate transfer");
    check(m_stall > 0,   "mechanism: input stall on full IFIFO");
    check(m_irq > 0,     "mechanism: interrupt");
    check(m_late > 0,    "mechanism: late acknowledge deducted");
    check(m_recover > 0, "mechanism: schedule recovered");
    check(m_div > 0,     "mechanism: divided time base");
    check(m_pause > 0,   "mechanism: ENOF pause");
    check(m_ovf > 0,     "mechanism: OFIFO overflow flag");
    check(m_sat > 0,     "mechanism: timestamp saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
