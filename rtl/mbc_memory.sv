// mbc_memory: codeword storage array with an upset-injection port.
//
// Holds DEPTH words of WIDTH bits (46 = 32 data + 14 check bits by default),
// one codeword per address, laid out as {M9..M0, V3..V0, D31..D0}. One
// synchronous write port and one synchronous read port (read data appear the
// cycle after rd_en; a read of the address being written returns the old
// word). A third port, upset_en/upset_addr/upset_mask, XORs a mask into a
// stored word to model a particle strike that flips one or several adjacent
// cells; a write to the same address in the same cycle takes precedence.
// The array, its depth, its ports and the upset port are this design's own
// choices: the code only states that codewords are kept in memory. The array
// has no reset; read only addresses that were written.
module mbc_memory #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 46,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             upset_en,
  input  logic [AW-1:0]    upset_addr,
  input  logic [WIDTH-1:0] upset_mask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset_en && !(wr_en && wr_addr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (wr_en)
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= mem[rd_addr];
  end

endmodule
