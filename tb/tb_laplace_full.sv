// tb_laplace_full: end-to-end test of the engine at its default size (8 PEs of
// 16 x 256 cells, a 128 x 256 grid); the sequence and checks are in laplace_check.
module tb_laplace_full;
  laplace_check #(.PES(8), .ROWS(16), .COLS(256), .DEFAULTS(1'b1)) u_check ();
endmodule
