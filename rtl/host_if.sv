// host_if - local-bus side of the PCI bridge: registers, FIFO ports, interrupt.
//
// The PCI protocol itself (configuration space, base-address decoding, burst
// transfers) is handled by a separate bridge core. That core presents each
// decoded access to this block as a one-cycle strobe on a simple synchronous
// local bus: `lb_wr` with address and write data, or `lb_rd` with address;
// read data comes back on `lb_rdata` with `lb_rvalid` one clock later. A
// burst is a run of strobes on consecutive clocks to the same data register.
//
// What this block does follows the published design: the host fills the OFIFO with
// event words and empties the IFIFO, sets ENOF, configures the two time
// bases, and receives an interrupt meant to prevent IFIFO overflow. The
// register map (see pci_aer_pkg) and the interrupt rule are this design's:
// `irq` is high while interrupts are enabled and the IFIFO holds at least
// IRQ_THR words. A write to the OFIFO while it is full is dropped and sets a
// sticky overflow flag; a read of the empty IFIFO returns 0 and sets a sticky
// underflow flag. Writing 1 to a sticky flag clears it.
module host_if
  import pci_aer_pkg::*;
#(
  parameter int unsigned LEVEL_W = 10,  // width of the FIFO level inputs
  parameter int unsigned DIV_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // local bus from the PCI bridge
  input  logic [REG_AW-1:0]  lb_addr,
  input  logic               lb_wr,
  input  logic [31:0]        lb_wdata,
  input  logic               lb_rd,
  output logic [31:0]        lb_rdata,
  output logic               lb_rvalid,
  output logic               irq,
  // OFIFO write side
  output logic               ofifo_wr,
  output logic [WORD_W-1:0]  ofifo_wdata,
  input  logic               ofifo_full,
  input  logic               ofifo_empty,
  input  logic [LEVEL_W-1:0] ofifo_level,
  // IFIFO read side
  output logic               ififo_rd,
  input  logic [WORD_W-1:0]  ififo_rdata,
  input  logic               ififo_full,
  input  logic               ififo_empty,
  input  logic [LEVEL_W-1:0] ififo_level,
  // configuration
  output logic               enof,
  output logic               in_en,
  output logic [DIV_W-1:0]   out_div,
  output logic [DIV_W-1:0]   in_div,
  // status from the state machines
  input  logic               out_late,   // pulse per late output event
  input  logic               in_stall,
  input  logic               in_ts_sat
);
  logic               irq_en;
  logic [LEVEL_W-1:0] irq_thr;
  logic               ovf, unf, stall_seen, sat_seen;
  logic [31:0]        late_cnt;
  logic [31:0]        flags;
  logic               wr_ofifo, rd_ififo, w1c;

  assign wr_ofifo = lb_wr && (lb_addr == REG_OFIFO);
  assign rd_ififo = lb_rd && (lb_addr == REG_IFIFO);
  assign w1c      = lb_wr && (lb_addr == REG_FLAGS);

  assign ofifo_wr    = wr_ofifo && !ofifo_full;
  assign ofifo_wdata = lb_wdata;
  assign ififo_rd    = rd_ififo && !ififo_empty;

  assign irq = irq_en && (ififo_level >= irq_thr);

  always_comb begin
    flags = '0;
    flags[FLAG_OFIFO_EMPTY] = ofifo_empty;
    flags[FLAG_OFIFO_FULL]  = ofifo_full;
    flags[FLAG_IFIFO_EMPTY] = ififo_empty;
    flags[FLAG_IFIFO_FULL]  = ififo_full;
    flags[FLAG_IRQ]         = irq;
    flags[FLAG_OFIFO_OVF]   = ovf;
    flags[FLAG_IFIFO_UNF]   = unf;
    flags[FLAG_IN_STALL]    = stall_seen;
    flags[FLAG_TS_SAT]      = sat_seen;
  end

  // configuration registers and sticky flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enof       <= 1'b0;
      in_en      <= 1'b0;
      irq_en     <= 1'b0;
      out_div    <= '0;
      in_div     <= '0;
      irq_thr    <= '0;
      ovf        <= 1'b0;
      unf        <= 1'b0;
      stall_seen <= 1'b0;
      sat_seen   <= 1'b0;
      late_cnt   <= '0;
    end else begin
      if (lb_wr) begin
        unique case (lb_addr)
          REG_CTRL:    {irq_en, in_en, enof} <= lb_wdata[2:0];
          REG_OUT_DIV: out_div <= lb_wdata[DIV_W-1:0];
          REG_IN_DIV:  in_div  <= lb_wdata[DIV_W-1:0];
          REG_IRQ_THR: irq_thr <= lb_wdata[LEVEL_W-1:0];
          default: ;
        endcase
      end
      // sticky flags: set by the event, cleared by writing 1 (set wins)
      ovf        <= (wr_ofifo && ofifo_full) || (ovf        && !(w1c && lb_wdata[FLAG_OFIFO_OVF]));
      unf        <= (rd_ififo && ififo_empty) || (unf       && !(w1c && lb_wdata[FLAG_IFIFO_UNF]));
      stall_seen <= in_stall                  || (stall_seen && !(w1c && lb_wdata[FLAG_IN_STALL]));
      sat_seen   <= in_ts_sat                 || (sat_seen  && !(w1c && lb_wdata[FLAG_TS_SAT]));
      if (out_late) late_cnt <= late_cnt + 1'b1;
    end
  end

  // read port, one clock of latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_rdata  <= '0;
      lb_rvalid <= 1'b0;
    end else begin
      lb_rvalid <= lb_rd;
      if (lb_rd) begin
        unique case (lb_addr)
          REG_CTRL:    lb_rdata <= {29'd0, irq_en, in_en, enof};
          REG_OUT_DIV: lb_rdata <= 32'(out_div);
          REG_IN_DIV:  lb_rdata <= 32'(in_div);
          REG_IRQ_THR: lb_rdata <= 32'(irq_thr);
          REG_LEVELS:  lb_rdata <= {16'(ififo_level), 16'(ofifo_level)};
          REG_FLAGS:   lb_rdata <= flags;
          REG_IFIFO:   lb_rdata <= ififo_empty ? 32'd0 : ififo_rdata;
          REG_LATE:    lb_rdata <= late_cnt;
          default:     lb_rdata <= 32'd0;
        endcase
      end
    end
  end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(lb_wr && lb_rd))
    else $error("host_if: read and write strobes in the same cycle");
endmodule
