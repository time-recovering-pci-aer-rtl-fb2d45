// out_aer_fsm - OUT-AER sequencer with time recovery.
//
// Reads event words from the OFIFO while ENOF is high. Each word carries a
// 16-bit delay (high half) and a 16-bit address (low half). The sequencer
// waits the delay, counted in ticks of the output time base, then puts the
// address on the AER output bus and runs a four-phase REQ/ACK handshake.
//
// Time recovery (as the published design describes it): the delay timer is a signed
// register that keeps counting down while the handshake is in progress. A
// slow acknowledge therefore leaves the timer negative, and that deficit is
// deducted from the wait of the next event; when the deficit exceeds the next
// delay, that event is sent without waiting and the remaining deficit is
// carried to the one after. Event i is thus sent at T0 + d1 + ... + di
// (the schedule built by the host) whenever the channel allows it, instead of
// each late ACK pushing every later event back.
//
// Precisely: fetching a word adds its delay to the timer; every tick while
// the sequencer holds or sends an event subtracts one; a REQ is raised at the
// first clock edge at which the timer is <= 0. The timer saturates at its most
// negative value. Design choices where the published design is silent: the timer
// is frozen while the sequencer is idle because the OFIFO is empty or ENOF is
// low (a gap in the host's supply is not a late ACK); REQ and ACK are active
// high; ACK passes a SYNC_STAGES flip-flop synchronizer; `late` pulses for
// each event whose REQ came after its scheduled time.
//
// Timing with the timer already expired and ACK arriving at once: REQ rises,
// ACK is seen SYNC_STAGES+1 edges after it reaches the pin, REQ falls, the
// release of ACK is seen the same way, the next word is popped on that edge
// and its REQ rises one edge later.
module out_aer_fsm
  import pci_aer_pkg::*;
#(
  parameter int unsigned TIMER_W     = 24,  // signed delay timer width
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enof,       // enable reading from the OFIFO
  input  logic              tick,       // output time base
  // OFIFO read side (show-ahead)
  input  logic              fifo_empty,
  input  aer_word_t         fifo_data,
  output logic              fifo_rd,
  // AER output port
  output logic [ADDR_W-1:0] aer_addr,
  output logic              aer_req,
  input  logic              aer_ack,    // asynchronous
  // status
  output logic              busy,       // an event is held or being sent
  output logic              sent,       // pulse: REQ raised for an event
  output logic              late        // pulse: that event was behind schedule
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_REQ, S_REL} state_e;
  state_e state;

  logic signed [TIMER_W-1:0] timer;
  logic signed [TIMER_W-1:0] timer_dec, timer_load;
  logic                      ack_s;
  logic                      fetch;
  logic [ADDR_W-1:0]         addr_q;

  localparam logic signed [TIMER_W-1:0] TMIN = {1'b1, {(TIMER_W-1){1'b0}}};

  aer_sync #(.STAGES(SYNC_STAGES)) u_ack_sync (
    .clk(clk), .rst_n(rst_n), .d(aer_ack), .q(ack_s));

  // A word is popped from IDLE, or straight from the release phase of the
  // previous handshake, whenever one is available and ENOF is set.
  assign fetch = enof && !fifo_empty &&
                 ((state == S_IDLE) || (state == S_REL && !ack_s));
  assign fifo_rd = fetch;

  // Timer minus one tick, saturating at the most negative value.
  always_comb begin
    timer_dec = timer;
    if (tick && timer != TMIN) timer_dec = timer - 1'b1;
  end
  always_comb begin
    timer_load = timer_dec + $signed({{(TIMER_W-TIME_W){1'b0}}, fifo_data.dt});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      timer   <= '0;
      addr_q  <= '0;
      aer_req <= 1'b0;
      sent    <= 1'b0;
      late    <= 1'b0;
    end else begin
      sent <= 1'b0;
      late <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (fetch) begin
            timer  <= timer_load;
            addr_q <= fifo_data.addr;
            state  <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (timer <= 0) begin
            aer_req <= 1'b1;
            sent    <= 1'b1;
            late    <= (timer < 0);
            state   <= S_REQ;
          end
          timer <= timer_dec;
        end
        S_REQ: begin
          if (ack_s) begin
            aer_req <= 1'b0;
            state   <= S_REL;
          end
          timer <= timer_dec;
        end
        S_REL: begin
          if (!ack_s) begin
            if (fetch) begin
              timer  <= timer_load;
              addr_q <= fifo_data.addr;
              state  <= S_WAIT;
            end else begin
              timer <= timer_dec;
              state <= S_IDLE;
            end
          end else begin
            timer <= timer_dec;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign aer_addr = addr_q;
  assign busy     = (state != S_IDLE);

  // Four-phase rules: the address is stable while REQ is high, and REQ is
  // not raised again before the previous ACK has been released.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aer_req && $past(aer_req) |-> $stable(aer_addr));
  a_req_after_release: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(aer_req) |-> !ack_s);
endmodule
