// pipe_delay: a fixed-latency register pipeline with a valid bit.
//
// Models the internal pipeline registers of a multi-cycle arithmetic core: data and
// valid enter together and leave LAT cycles later. flush clears every valid bit
// (used when a timestep is aborted); data registers are not reset. LAT = 0 is a
// plain wire.
module pipe_delay #(
  parameter int unsigned W   = 64,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  if (LAT == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [W-1:0] d_q [LAT];
    logic [LAT-1:0] v_q;

    always_ff @(posedge clk) begin
      if (rst || flush) begin
        v_q <= '0;
      end else begin
        v_q[0] <= in_valid;
        for (int i = 1; i < LAT; i++) v_q[i] <= v_q[i-1];
      end
    end

    always_ff @(posedge clk) begin
      d_q[0] <= in_data;
      for (int i = 1; i < LAT; i++) d_q[i] <= d_q[i-1];
    end

    assign out_valid = v_q[LAT-1];
    assign out_data  = d_q[LAT-1];
  end

endmodule
