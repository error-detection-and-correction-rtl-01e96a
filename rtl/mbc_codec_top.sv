// mbc_codec_top: memory protected by the minimal-parity matrix code.
//
// Write path: the 32-bit word is encoded into a 46-bit codeword (mbc_encoder)
// and stored in the codeword array (mbc_memory). Read path: the stored
// codeword is read with one cycle of latency and decoded combinationally
// (mbc_decoder), which returns the corrected word together with the syndrome
// and three status flags. The upset port flips chosen bits of a stored
// codeword, so single and multiple cell upsets can be applied in place.
//
// Timing: a read issued with rd_en in cycle t returns rd_valid, rd_data and
// the flags in cycle t+1, all valid while rd_valid is high. rd_valid is the
// only register with a reset (active-low rst_n, synchronous). Encoder and
// decoder follow the code; the memory organisation, port list and flags are
// this design's own choices.
module mbc_codec_top
  import mbc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  data_t             wr_data,
  // read port
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic              rd_valid,
  output data_t             rd_data,
  output syndrome_t         rd_syndrome,
  output logic              rd_err,
  output logic              rd_corrected,
  output logic              rd_uncorrectable,
  // upset injection
  input  logic              upset_en,
  input  logic [AW-1:0]     upset_addr,
  input  codeword_t         upset_mask
);

  codeword_t wr_code;
  codeword_t rd_code;

  mbc_encoder u_enc (.data_i(wr_data), .code_o(wr_code));

  mbc_memory #(.DEPTH(DEPTH), .WIDTH(CODE_W)) u_mem (
    .clk        (clk),
    .wr_en      (wr_en),
    .wr_addr    (wr_addr),
    .wr_data    (wr_code),
    .rd_en      (rd_en),
    .rd_addr    (rd_addr),
    .rd_data    (rd_code),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_mask)
  );

  mbc_decoder u_dec (
    .code_i          (rd_code),
    .data_o          (rd_data),
    .syndrome_o      (rd_syndrome),
    .err_o           (rd_err),
    .corrected_o     (rd_corrected),
    .uncorrectable_o (rd_uncorrectable)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

  // Read results are valid exactly one cycle after the read request.
  a_rd_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                 $past(rst_n) |-> rd_valid == $past(rd_en));

endmodule
