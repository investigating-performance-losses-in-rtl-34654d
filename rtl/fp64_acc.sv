// fp64_acc: double-precision accumulator, one addend per cycle.
//
// The PE's error for a timestep is the sum of one addend per cell. Because the sum is
// only used for the convergence test, the accumulator is built for minimum resources
// rather than speed: one combinational adder (fp64_add) closes a one-cycle loop around
// the running-sum register, so a new addend is accepted every cycle and the result is
// the exact left-to-right rounded sum 0 + x0 + x1 + ... (round to nearest even).
// The single-adder loop is this design's choice; only the accumulator's purpose and
// its minimal-resource configuration are given.
//
// Interface: in_valid qualifies in_data; in_first marks the first addend of a sum
// (the running sum restarts from +0), in_last the final one. out_valid pulses for one
// cycle, the cycle after the last addend, with the completed sum on out_sum; out_sum
// holds until the next sum completes. flush drops a sum in progress.
module fp64_acc
  import laplace_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  flush,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  fp64_t in_data,
  output logic  out_valid,
  output fp64_t out_sum
);

  fp64_t acc_q, base, nxt;

  assign base = in_first ? FP64_POS_ZERO : acc_q;

  fp64_add u_add (.a(base), .b(in_data), .sub(1'b0), .y(nxt));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= FP64_POS_ZERO;
      out_sum   <= FP64_POS_ZERO;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (flush) begin
        acc_q <= FP64_POS_ZERO;
      end else if (in_valid) begin
        acc_q <= nxt;
        if (in_last) begin
          out_sum   <= nxt;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
