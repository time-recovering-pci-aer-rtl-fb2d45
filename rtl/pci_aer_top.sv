// pci_aer_top - FPGA logic of the PCI-AER interface board.
//
// Two independent paths that run in parallel:
//   PCI to AER: the host writes event words {delay, address} into the OFIFO;
//     the OUT-AER sequencer pops them while ENOF is set, waits each delay on
//     the output time base and sends the address on the AER output port,
//     recovering time lost to slow acknowledges (see out_aer_fsm).
//   AER to PCI: the AER-IN monitor accepts events from the AER input port
//     and writes {ticks since previous event, address} into the IFIFO, which
//     the host reads; an interrupt warns the host before the IFIFO overflows.
// Both time bases come from programmable dividers of the system clock.
//
// The host side is the local bus of a PCI bridge core, which is not part of
// this RTL (see host_if for the bus timing and pci_aer_pkg for the register
// map). Everything runs on one clock `clk`; the AER handshake inputs are
// asynchronous and synchronized inside the state machines. The block
// structure follows the published architecture; FIFO depths, the register
// map, the local bus and the handshake polarity are this design's choices.
module pci_aer_top
  import pci_aer_pkg::*;
#(
  parameter int unsigned OFIFO_DEPTH = 512,
  parameter int unsigned IFIFO_DEPTH = 512,
  parameter int unsigned TIMER_W     = 24,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned DIV_W       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // local bus from the PCI bridge core
  input  logic [REG_AW-1:0] lb_addr,
  input  logic              lb_wr,
  input  logic [31:0]       lb_wdata,
  input  logic              lb_rd,
  output logic [31:0]       lb_rdata,
  output logic              lb_rvalid,
  output logic              irq,
  // AER output port
  output logic [ADDR_W-1:0] aer_out_addr,
  output logic              aer_out_req,
  input  logic              aer_out_ack,
  // AER input port
  input  logic [ADDR_W-1:0] aer_in_addr,
  input  logic              aer_in_req,
  output logic              aer_in_ack
);
  localparam int unsigned OLW = $clog2(OFIFO_DEPTH) + 1;
  localparam int unsigned ILW = $clog2(IFIFO_DEPTH) + 1;
  localparam int unsigned LEVEL_W = (OLW > ILW) ? OLW : ILW;

  // OFIFO
  logic              of_wr, of_rd, of_full, of_empty;
  logic [WORD_W-1:0] of_wdata;
  aer_word_t         of_rdata;
  logic [OLW-1:0]    of_level;
  // IFIFO
  logic              if_wr, if_rd, if_full, if_empty;
  aer_word_t         if_wdata;
  logic [WORD_W-1:0] if_rdata;
  logic [ILW-1:0]    if_level;
  // configuration and status
  logic              enof, in_en;
  logic [DIV_W-1:0]  out_div, in_div;
  logic              out_tick, in_tick;
  logic              out_late;
  logic              in_stall, in_ts_sat;

  host_if #(.LEVEL_W(LEVEL_W), .DIV_W(DIV_W)) u_host (
    .clk, .rst_n,
    .lb_addr, .lb_wr, .lb_wdata, .lb_rd, .lb_rdata, .lb_rvalid, .irq,
    .ofifo_wr(of_wr), .ofifo_wdata(of_wdata), .ofifo_full(of_full),
    .ofifo_empty(of_empty), .ofifo_level(LEVEL_W'(of_level)),
    .ififo_rd(if_rd), .ififo_rdata(if_rdata), .ififo_full(if_full),
    .ififo_empty(if_empty), .ififo_level(LEVEL_W'(if_level)),
    .enof, .in_en, .out_div, .in_div,
    .out_late, .in_stall, .in_ts_sat);

  aer_fifo #(.WIDTH(WORD_W), .DEPTH(OFIFO_DEPTH)) u_ofifo (
    .clk, .rst_n,
    .wr_en(of_wr), .wr_data(of_wdata),
    .rd_en(of_rd), .rd_data(of_rdata),
    .full(of_full), .empty(of_empty), .level(of_level));

  tick_divider #(.DIV_W(DIV_W)) u_out_tick (
    .clk, .rst_n, .en(enof), .div(out_div), .tick(out_tick));

  out_aer_fsm #(.TIMER_W(TIMER_W), .SYNC_STAGES(SYNC_STAGES)) u_out (
    .clk, .rst_n, .enof, .tick(out_tick),
    .fifo_empty(of_empty), .fifo_data(of_rdata), .fifo_rd(of_rd),
    .aer_addr(aer_out_addr), .aer_req(aer_out_req), .aer_ack(aer_out_ack),
    .busy(), .sent(), .late(out_late));

  tick_divider #(.DIV_W(DIV_W)) u_in_tick (
    .clk, .rst_n, .en(in_en), .div(in_div), .tick(in_tick));

  in_aer_fsm #(.SYNC_STAGES(SYNC_STAGES)) u_in (
    .clk, .rst_n, .en(in_en), .tick(in_tick),
    .aer_addr(aer_in_addr), .aer_req(aer_in_req), .aer_ack(aer_in_ack),
    .fifo_full(if_full), .fifo_wr(if_wr), .fifo_data(if_wdata),
    .stall(in_stall), .ts_sat(in_ts_sat));

  aer_fifo #(.WIDTH(WORD_W), .DEPTH(IFIFO_DEPTH)) u_ififo (
    .clk, .rst_n,
    .wr_en(if_wr), .wr_data(if_wdata),
    .rd_en(if_rd), .rd_data(if_rdata),
    .full(if_full), .empty(if_empty), .level(if_level));
endmodule
