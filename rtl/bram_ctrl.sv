// bram_ctrl: BRAM controller holding one ROWS x COLS binary64 matrix of a PE.
//
// The five-point stencil needs four neighbours per cell per cycle, but a block RAM
// has only two ports. The matrix is therefore split by column parity into two
// dual-port banks: the cell (r, c) lives in bank c[0] at word r*(COLS/2) + c/2. For a
// target cell (r, c) the upper and lower neighbours (same column) are in bank c[0]
// and the left and right neighbours (adjacent columns) are in the other bank, so all
// four reads take one port each and never collide. The partition by parity and the
// use of the spare port for halos follow the design; the exact port assignment,
// wrap-around addressing and host port are this design's choices.
//
// Halo service: the upper/lower reads use row (r-1) mod ROWS and (r+1) mod ROWS. On
// the top row the "upper" read therefore returns row ROWS-1, which is the top halo of
// the PE below (halo_dn); on the bottom row the "lower" read returns row 0, the bottom
// halo of the PE above (halo_up). Border cells use only three local reads, and the
// fourth port serves the neighbouring PE at the same address, in lockstep.
//
// Ports (read data one cycle after rd_en):
//   rd_en/rd_row/rd_col  read the neighbours of (rd_row, rd_col) when used as the
//                        input matrix; nb_a = left, nb_b = right, nb_up = row above
//                        (or halo_dn at the top row), nb_dn = row below (or halo_up
//                        at the bottom row).
//   wr_en/wr_row/wr_col  write one cell per cycle when used as the output matrix.
//   host_*               load/unload port, used while the engine is idle.
// Reading and writing in the same cycle is not allowed (asserted); the host port is
// served only when neither is active.
module bram_ctrl
  import laplace_pkg::*;
#(
  parameter int unsigned ROWS = PE_ROWS_DEF,
  parameter int unsigned COLS = PE_COLS_DEF,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // neighbour reads (input role)
  input  logic          rd_en,
  input  logic [RW-1:0] rd_row,
  input  logic [CW-1:0] rd_col,
  output fp64_t         nb_a,
  output fp64_t         nb_b,
  output fp64_t         nb_up,
  output fp64_t         nb_dn,
  // result writes (output role)
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  logic [CW-1:0] wr_col,
  input  fp64_t         wr_data,
  // host access
  input  logic          host_en,
  input  logic          host_we,
  input  logic [RW-1:0] host_row,
  input  logic [CW-1:0] host_col,
  input  fp64_t         host_wdata,
  output fp64_t         host_rdata
);

  localparam int unsigned HALF = COLS / 2;
  localparam int unsigned DEPTH = ROWS * HALF;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  function automatic logic [AW-1:0] word(input logic [RW-1:0] r, input logic [CW-1:0] c);
    return AW'(int'(r) * HALF + (int'(c) >> 1));
  endfunction

  logic [RW-1:0] r_up, r_dn;
  logic [CW-1:0] c_lt, c_rt;
  assign r_up = (rd_row == '0) ? RW'(ROWS - 1) : rd_row - 1'b1;
  assign r_dn = (rd_row == RW'(ROWS - 1)) ? '0 : rd_row + 1'b1;
  assign c_lt = (rd_col == '0) ? CW'(COLS - 1) : rd_col - 1'b1;
  assign c_rt = (rd_col == CW'(COLS - 1)) ? '0 : rd_col + 1'b1;

  logic          a_en [2], a_we [2], b_en [2];
  logic [AW-1:0] a_addr [2], b_addr [2];
  fp64_t         a_rd [2], b_rd [2];

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      a_en[k]   = 1'b0;
      a_we[k]   = 1'b0;
      a_addr[k] = '0;
      b_en[k]   = rd_en;
      if (rd_col[0] == k[0]) begin
        // same column as the target: upper and lower neighbours
        b_addr[k] = word(r_dn, rd_col);
      end else begin
        // adjacent columns: left and right neighbours
        b_addr[k] = word(rd_row, c_rt);
      end
      if (wr_en) begin
        a_en[k]   = (wr_col[0] == k[0]);
        a_we[k]   = 1'b1;
        a_addr[k] = word(wr_row, wr_col);
      end else if (rd_en) begin
        a_en[k]   = 1'b1;
        a_addr[k] = (rd_col[0] == k[0]) ? word(r_up, rd_col) : word(rd_row, c_lt);
      end else if (host_en) begin
        a_en[k]   = (host_col[0] == k[0]);
        a_we[k]   = host_we;
        a_addr[k] = word(host_row, host_col);
      end
    end
  end

  fp64_t wdata;
  assign wdata = wr_en ? wr_data : host_wdata;

  for (genvar k = 0; k < 2; k++) begin : g_bank
    bram_bank #(.W(64), .DEPTH(DEPTH)) u_bank (
      .clk,
      .a_en(a_en[k]), .a_we(a_we[k]), .a_addr(a_addr[k]), .a_wdata(wdata), .a_rdata(a_rd[k]),
      .b_en(b_en[k]), .b_addr(b_addr[k]), .b_rdata(b_rd[k]));
  end

  logic par_q, hpar_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      par_q  <= 1'b0;
      hpar_q <= 1'b0;
    end else begin
      if (rd_en)   par_q  <= rd_col[0];
      if (host_en) hpar_q <= host_col[0];
    end
  end

  assign nb_up      = par_q ? a_rd[1] : a_rd[0];
  assign nb_dn      = par_q ? b_rd[1] : b_rd[0];
  assign nb_a       = par_q ? a_rd[0] : a_rd[1];
  assign nb_b       = par_q ? b_rd[0] : b_rd[1];
  assign host_rdata = hpar_q ? a_rd[1] : a_rd[0];

  a_no_rd_wr: assert property (@(posedge clk) disable iff (rst) !(rd_en && wr_en));

endmodule
