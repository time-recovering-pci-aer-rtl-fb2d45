// in_aer_fsm - AER-IN monitor: timestamps incoming events into the IFIFO.
//
// Receives events on the input AER port with a four-phase REQ/ACK handshake.
// A counter advances on every tick of the input time base; when an event is
// accepted, the word {counter, address} is written into the IFIFO (counter in
// the high 16 bits, address in the low 16 bits, as in the published design) and the
// counter is cleared, so each stored time is the number of ticks since the
// previous stored event (with a tick on every clock: the number of clocks
// between the two storing edges).
//
// Design choices where the published design is silent: REQ and ACK are active high;
// REQ passes a SYNC_STAGES flip-flop synchronizer and the address is taken
// from the pins once the synchronized REQ is high (bundled data: the sender
// keeps the address stable while REQ is high). When the IFIFO is full the
// event is not acknowledged until space appears, which holds the sender back
// instead of losing the event (`stall` is high meanwhile). The counter
// saturates at 2^16-1 instead of wrapping (`ts_sat` pulses when a saturated
// value is stored). With `en` low no event is accepted and the counter holds.
//
// Timing: an event is stored and ACK raised SYNC_STAGES+1 edges after REQ
// reaches the pin (IFIFO not full); ACK is released SYNC_STAGES+1 edges after
// REQ is released.
module in_aer_fsm
  import pci_aer_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              tick,       // input time base
  // AER input port
  input  logic [ADDR_W-1:0] aer_addr,
  input  logic              aer_req,    // asynchronous
  output logic              aer_ack,
  // IFIFO write side
  input  logic              fifo_full,
  output logic              fifo_wr,
  output aer_word_t         fifo_data,
  // status
  output logic              stall,      // event waiting for IFIFO space
  output logic              ts_sat      // pulse: stored time was saturated
);
  typedef enum logic {S_IDLE, S_ACK} state_e;
  state_e state;

  logic              req_s;
  logic [TIME_W-1:0] ts;
  logic              take;

  aer_sync #(.STAGES(SYNC_STAGES)) u_req_sync (
    .clk(clk), .rst_n(rst_n), .d(aer_req), .q(req_s));

  assign take    = (state == S_IDLE) && en && req_s && !fifo_full;
  assign stall   = (state == S_IDLE) && en && req_s && fifo_full;
  assign fifo_wr = take;
  assign fifo_data = '{dt: ts, addr: aer_addr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      aer_ack <= 1'b0;
      ts      <= '0;
      ts_sat  <= 1'b0;
    end else begin
      ts_sat <= take && (ts == '1);
      // elapsed-time counter: cleared by a stored event, else counts ticks
      // (the tick of the storing edge itself counts toward the next event)
      if (take)                        ts <= TIME_W'(tick);
      else if (en && tick && ts != '1) ts <= ts + 1'b1;
      unique case (state)
        S_IDLE: if (take) begin
          aer_ack <= 1'b1;
          state   <= S_ACK;
        end
        S_ACK: if (!req_s) begin
          aer_ack <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ack_only_after_req: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(aer_ack) |-> $past(req_s));
endmodule
