// nbr_fifo: small register-based FIFO that buffers right neighbours.
//
// When a cell is processed, its right neighbour is the next cell to be updated, so
// that value is exactly the "old" value the error module needs once the next cell's
// average leaves the 29-cycle averaging pipeline. Buffering it here removes a fifth
// memory read per cycle. The depth of 32 registers (enough for the 29-cycle latency)
// follows the design; the show-ahead interface and the overflow/underflow assertions
// are this implementation's choice.
//
// Interface: push writes din at the tail; pop removes the head. dout always shows the
// head (valid while !empty). Push and pop may happen in the same cycle; a push while
// full or a pop while empty is a protocol error. flush empties the FIFO.
module nbr_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem_q [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign count = cnt_q;
  assign dout  = mem_q[rd_q];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      case ({push, pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_q] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst || flush) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || flush) !(pop && empty));

endmodule
