// tb_laplace_engine: end-to-end test of the engine at a reduced size (3 PEs of
// 4 x 16 cells); the sequence and checks are in laplace_check.
module tb_laplace_engine;
  laplace_check #(.PES(3), .ROWS(4), .COLS(16), .DEFAULTS(1'b0)) u_check ();
endmodule
