// bram_bank: one dual-port block RAM bank (synchronous read, one cycle latency).
//
// Port A reads or writes, port B only reads; this is the usual FPGA block-RAM
// configuration and maps onto one BRAM primitive group per bank. Read data appears
// the cycle after the enable. Contents are not reset.
module bram_bank #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic                     b_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [W-1:0]             b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
