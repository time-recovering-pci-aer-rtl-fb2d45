// tb_tis_workload - loopback run of a set of synthetic test images.
//
// Nine 8x8 images whose grey levels follow Gaussian histograms with growing
// mean are turned into AER streams the way an ideal frame-to-AER converter
// would: a pixel of grey level g emits g events spread evenly over the frame
// period, with a random phase per pixel. The merged, time-sorted stream of
// each image is written to the OFIFO as {delay, address} words while the
// host keeps the IFIFO drained; the AER output is looped back to the input.
//
// The loopback can carry one event every PEAK clocks. With time recovery an
// event is therefore received at max(its scheduled time, previous reception +
// PEAK), which the testbench predicts and compares exactly, event by event.
// It also prints, per image, the mean delay against the schedule with time
// recovery and the mean delay that a sequencer timing each event from the
// previous one would give, for comparison. Later images load the channel
// close to saturation, so deficits and their recovery happen often.
module tb_tis_workload;
  import pci_aer_pkg::*;
  localparam int unsigned SYNC   = 2;
  localparam int unsigned PEAK   = 4 * (SYNC + 1) + 1;
  localparam int unsigned DEPTH  = 512;
  localparam int unsigned TFRAME = 20000;     // frame period, clocks
  localparam int unsigned NPIX   = 64;

  logic clk = 0, rst_n = 0;
  logic [REG_AW-1:0] lb_addr = '0;
  logic lb_wr = 0, lb_rd = 0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_rvalid, irq;
  logic [ADDR_W-1:0] aer_out_addr, aer_in_addr;
  logic aer_out_req, aer_out_ack, aer_in_req, aer_in_ack;

  pci_aer_top dut (.*);
  assign aer_in_addr = aer_out_addr;
  assign aer_in_req  = aer_out_req;
  assign aer_out_ack = aer_in_ack;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_recovered = 0, n_late_ev = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  typedef struct { longint t; int addr; } ev_t;

  // one image: grey levels from a Gaussian-like histogram (sum of uniforms)
  task automatic make_stream(input int img, output aer_word_t w [$], output longint t [$]);
    ev_t ev [$];
    real mean = 2.5 * img, sd = 0.6 * img;
    longint prev;
    w.delete(); t.delete();
    for (int p = 0; p < NPIX; p++) begin
      real u = 0.0;
      int g;
      real ph = real'($urandom_range(0, 999)) / 1000.0;
      for (int k = 0; k < 4; k++) u += real'($urandom_range(0, 1000)) / 1000.0;
      g = int'(mean + sd * (u - 2.0) * 1.732);
      if (g < 0) g = 0;
      if (g > 63) g = 63;
      for (int k = 0; k < g; k++) begin
        ev_t e;
        e.t = longint'((real'(k) + ph) * real'(TFRAME) / real'(g));
        e.addr = p;
        ev.push_back(e);
      end
    end
    ev.sort() with (item.t);
    prev = 0;
    foreach (ev[i]) begin
      aer_word_t x;
      longint d = (i == 0) ? 1000 : ev[i].t - prev;   // long first delay: absorbs any earlier deficit
      x.dt = 16'(d); x.addr = 16'(ev[i].addr);
      w.push_back(x);
      t.push_back((i == 0) ? 0 : t[i-1] + d);
      prev = ev[i].t;
    end
  endtask

  initial begin
    logic [31:0] r;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    bus_write(REG_CTRL, 32'b011);
    for (int img = 1; img <= 9; img++) begin
      aer_word_t w [$], rx [$];
      longint sched [$];
      longint pred, prev_pred, got, naive, err_rec, err_naive;
      int i;
      i = 0;
      rx.delete();
      make_stream(img, w, sched);
      // single host loop: refill the OFIFO, drain the IFIFO
      while (rx.size() < w.size()) begin
        bus_read(REG_LEVELS, r);
        for (int k = int'(r[15:0]); k < DEPTH && i < w.size(); k++) begin
          bus_write(REG_OFIFO, 32'(w[i])); i++;
        end
        bus_read(REG_LEVELS, r);
        for (int k = 0; k < int'(r[31:16]); k++) begin
          logic [31:0] x;
          bus_read(REG_IFIFO, x);
          rx.push_back(aer_word_t'(x));
        end
        repeat (10) @(posedge clk);
        #1;
      end
      check(rx.size() == w.size(), $sformatf("image %0d: every event received", img));
      got = 0; prev_pred = 0; naive = 0; err_rec = 0; err_naive = 0;
      for (int k = 0; k < rx.size(); k++) begin
        check(rx[k].addr == w[k].addr, $sformatf("image %0d event %0d address", img, k));
        if (k > 0) begin
          got  += rx[k].dt;
          pred  = (sched[k] > prev_pred + PEAK) ? sched[k] : prev_pred + PEAK;
          naive += (w[k].dt > PEAK) ? w[k].dt : PEAK;
          check(got == pred, $sformatf("image %0d event %0d received at %0d, predicted %0d", img, k, got, pred));
          if (pred > sched[k]) n_late_ev++;
          if (k > 1 && prev_pred > sched[k-1] && pred == sched[k]) n_recovered++;
          err_rec   += pred - sched[k];
          err_naive += naive - sched[k];
          prev_pred = pred;
        end
      end
      $display("image %0d: %0d events, mean delay %0.1f clocks with recovery, %0.1f without",
               img, w.size(), real'(err_rec) / real'(w.size()), real'(err_naive) / real'(w.size()));
    end
    check(n_late_ev > 0, "mechanism: events behind schedule");
    check(n_recovered > 0, "mechanism: schedule recovered after a deficit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
