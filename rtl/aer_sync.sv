// aer_sync - multi-flop synchronizer for the asynchronous AER handshake
// lines (REQ on the input port, ACK on the output port).
//
// The signal is sampled by STAGES flip-flops in series, so the output follows
// the input STAGES clock edges later. The published design does not describe how the
// asynchronous lines are brought into the FPGA clock domain; two stages is
// this design's choice. Reset value is 0 (line inactive).
module aer_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,   // asynchronous input
  output logic q    // synchronized copy
);
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[STAGES-2:0], d};
  end

  assign q = sr[STAGES-1];

  initial assert (STAGES >= 2) else $error("aer_sync: STAGES must be at least 2");
endmodule
