// tb_host_if - self-checking test of the host register block.
//
// Drives the local bus as the PCI bridge would (one-cycle strobes, read
// data one clock later) with the two FIFOs replaced by simple models: an
// OFIFO queue with a controllable capacity and an IFIFO queue preloaded with
// known words. Checks register write/read-back, burst writes into the OFIFO
// and burst reads from the IFIFO, the overflow and underflow sticky flags and
// their clearing, the interrupt threshold and the late-event counter.
module tb_host_if;
  import pci_aer_pkg::*;
  localparam int unsigned LW = 10;

  logic clk = 0, rst_n = 0;
  logic [REG_AW-1:0] lb_addr = '0;
  logic lb_wr = 0, lb_rd = 0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_rvalid, irq;
  logic ofifo_wr; logic [WORD_W-1:0] ofifo_wdata;
  logic ofifo_full, ofifo_empty; logic [LW-1:0] ofifo_level;
  logic ififo_rd; logic [WORD_W-1:0] ififo_rdata;
  logic ififo_full, ififo_empty; logic [LW-1:0] ififo_level;
  logic enof, in_en; logic [15:0] out_div, in_div;
  logic out_late = 0, in_stall = 0, in_ts_sat = 0;

  host_if #(.LEVEL_W(LW), .DIV_W(16)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO models
  logic [31:0] oq [$], iq [$];
  int ocap = 8, icap = 16;
  always_comb begin
    ofifo_full  = (oq.size() >= ocap);
    ofifo_empty = (oq.size() == 0);
    ofifo_level = LW'(oq.size());
    ififo_full  = (iq.size() >= icap);
    ififo_empty = (iq.size() == 0);
    ififo_level = LW'(iq.size());
    ififo_rdata = (iq.size() > 0) ? iq[0] : 32'hDEAD_BEEF;
  end
  // sample the strobes at the edge, update the queues just after it
  always @(posedge clk) begin
    automatic bit w = ofifo_wr, p = ififo_rd;
    automatic logic [31:0] wd = ofifo_wdata;
    #1;
    if (w) oq.push_back(wd);
    if (p) void'(iq.pop_front());
  end

  task automatic bus_write(input reg_addr_e a, input logic [31:0] d);
    lb_addr <= a; lb_wdata <= d; lb_wr <= 1;
    @(posedge clk);
    lb_wr <= 0;
  endtask

  task automatic bus_read(input reg_addr_e a, output logic [31:0] d);
    lb_addr <= a; lb_rd <= 1;
    @(posedge clk);
    #1;
    lb_rd <= 0;
    check(lb_rvalid, "read data valid one clock after strobe");
    d = lb_rdata;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // configuration registers
    bus_write(REG_CTRL, 32'h3);
    bus_write(REG_OUT_DIV, 32'd7);
    bus_write(REG_IN_DIV, 32'd12);
    bus_write(REG_IRQ_THR, 32'd5);
    @(negedge clk);
    check(enof && in_en, "ENOF and input enable set");
    check(out_div == 16'd7 && in_div == 16'd12, "dividers");
    bus_read(REG_CTRL, r);    check(r == 32'h3, "CTRL read-back");
    bus_read(REG_OUT_DIV, r); check(r == 32'd7, "OUT_DIV read-back");
    bus_read(REG_IN_DIV, r);  check(r == 32'd12, "IN_DIV read-back");
    bus_read(REG_IRQ_THR, r); check(r == 32'd5, "IRQ_THR read-back");

    // burst write of 10 words into an OFIFO with room for 8
    for (int i = 0; i < 10; i++) begin
      lb_addr <= REG_OFIFO; lb_wdata <= 32'h1000_0000 + i; lb_wr <= 1;
      @(posedge clk);
    end
    lb_wr <= 0;
    @(negedge clk);
    check(oq.size() == 8, "OFIFO holds the 8 words that fit");
    for (int i = 0; i < oq.size(); i++) check(oq[i] == 32'h1000_0000 + i, "OFIFO word order");
    bus_read(REG_FLAGS, r);
    check(r[FLAG_OFIFO_OVF] && r[FLAG_OFIFO_FULL], "overflow flag set");
    bus_read(REG_LEVELS, r);  check(r[15:0] == 16'd8, "OFIFO level");
    bus_write(REG_FLAGS, 32'(1 << FLAG_OFIFO_OVF));
    bus_read(REG_FLAGS, r);   check(!r[FLAG_OFIFO_OVF], "overflow flag cleared");

    // interrupt: threshold 5, enable irq
    for (int i = 0; i < 4; i++) iq.push_back(32'hA000_0000 + i);
    bus_write(REG_CTRL, 32'h7);
    @(negedge clk); check(!irq, "no irq below threshold");
    iq.push_back(32'hA000_0004);
    #1 check(irq, "irq at threshold");
    iq.push_back(32'hA000_0005);
    #1 check(irq, "irq above threshold");
    bus_read(REG_FLAGS, r); check(r[FLAG_IRQ], "irq flag");
    bus_read(REG_LEVELS, r); check(r[31:16] == 16'd6, "IFIFO level");

    // burst read of the IFIFO: strobes on consecutive clocks
    begin
      logic [31:0] got [$];
      for (int i = 0; i < 6; i++) begin
        lb_addr <= REG_IFIFO; lb_rd <= 1;
        @(posedge clk);
        #1; check(lb_rvalid, "burst rvalid"); got.push_back(lb_rdata);
      end
      lb_rd <= 0;
      for (int i = 0; i < 6; i++) check(got[i] == 32'hA000_0000 + i, $sformatf("IFIFO burst word %0d = %h", i, got[i]));
    end
    @(negedge clk);
    check(!irq, "irq cleared when IFIFO drained");
    bus_read(REG_IFIFO, r);
    check(r == 32'd0, "empty IFIFO reads zero");
    bus_read(REG_FLAGS, r); check(r[FLAG_IFIFO_UNF], "underflow flag set");

    // status inputs: late counter, stall and saturation flags
    repeat (5) begin out_late <= 1; @(posedge clk); out_late <= 0; @(posedge clk); end
    in_stall <= 1; in_ts_sat <= 1; @(posedge clk); in_stall <= 0; in_ts_sat <= 0;
    @(negedge clk);
    bus_read(REG_LATE, r);  check(r == 32'd5, "late counter");
    bus_read(REG_FLAGS, r); check(r[FLAG_IN_STALL] && r[FLAG_TS_SAT], "stall and saturation flags");
    bus_write(REG_FLAGS, 32'h1FF);
    bus_read(REG_FLAGS, r);
    check(!r[FLAG_IN_STALL] && !r[FLAG_TS_SAT] && !r[FLAG_IFIFO_UNF], "sticky flags cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
