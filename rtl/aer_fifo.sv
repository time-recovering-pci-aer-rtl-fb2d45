// aer_fifo - synchronous first-word-fall-through FIFO for event words.
//
// Used twice in the interface: as the OFIFO, which the host fills with
// event words for the OUT-AER sequencer, and as the IFIFO, which the AER-IN
// monitor fills with timestamped events for the host. The published design names
// both buffers but gives neither their depth nor their structure; this is a
// plain circular buffer in a memory array with separate read and write
// pointers and an occupancy counter. The default depth of 512 words of 32
// bits is this design's choice (four 4-kbit block RAMs of a Spartan-II per
// FIFO).
//
// Interface and timing: the head word is always present on rd_data while
// empty is low (show-ahead). rd_en pops it at the clock edge; wr_en pushes
// wr_data at the clock edge. Both may happen in the same cycle. A push while
// full or a pop while empty is ignored (and flagged by an assertion);
// `level` is the number of stored words.
module aer_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (level == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (level == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [PW-1:0] ptr_inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_wr) wr_ptr <= ptr_inc(wr_ptr);
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  // A writer must not push into a full FIFO, a reader must not pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("aer_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("aer_fifo: read while empty");
endmodule
