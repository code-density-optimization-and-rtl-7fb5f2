// lzw_decomp_top: compressed-code decompression path for a 32-bit processor.
//
// Program memory (or a loader) writes 8-bit LZW codes into IN BUF (16 x 8);
// the LZW decompressor turns them back into the original program and writes
// it as 32-bit words into OUT BUF (16 x 32), from which the processor or its
// instruction cache reads. The host raises decode_ena for one compressed
// stream, keeps it high while codes of that stream remain to be written, and
// lowers it once IN BUF has been emptied; busy falls when the last word has
// reached OUT BUF.
//
// Interface: a FIFO write port for codes (code_wr_en / code_wr_data /
// code_full), a FIFO read port for words (word_rd_en / word_rd_data /
// word_empty, show-ahead), the fill levels of both buffers, and status. The arrangement IN BUF -> decompressor
// -> OUT BUF follows the source paper's block diagram; the handshakes are this
// design's own.
module lzw_decomp_top
  import lzw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               decode_ena,
  // compressed codes in
  input  logic               code_wr_en,
  input  logic [CODE_W-1:0]  code_wr_data,
  output logic               code_full,
  output logic               code_empty,
  output logic [$clog2(IN_DEPTH):0]  code_count,
  // decompressed words out
  input  logic               word_rd_en,
  output logic [OUT_W-1:0]   word_rd_data,
  output logic               word_empty,
  output logic [$clog2(OUT_DEPTH):0] word_count,
  // status
  output logic               busy,
  output state_t             state,
  output logic               dict_full
);

  logic [CODE_W-1:0] in_data;
  logic              in_rd_en;
  logic              out_wr_en, out_full;
  logic [OUT_W-1:0]  out_wr_data;

  in_buf #(.DEPTH(IN_DEPTH), .WIDTH(CODE_W)) u_in_buf (
    .clk, .rst_n,
    .wr_en(code_wr_en), .wr_data(code_wr_data), .full(code_full),
    .rd_en(in_rd_en), .rd_data(in_data), .empty(code_empty), .count(code_count)
  );

  lzw_decompressor u_decomp (
    .clk, .rst_n, .decode_ena,
    .in_data, .in_empty(code_empty), .in_rd_en,
    .out_wr_en, .out_wr_data, .out_full,
    .busy, .state, .dict_full
  );

  out_buf #(.DEPTH(OUT_DEPTH), .WIDTH(OUT_W)) u_out_buf (
    .clk, .rst_n,
    .wr_en(out_wr_en), .wr_data(out_wr_data), .full(out_full),
    .rd_en(word_rd_en), .rd_data(word_rd_data), .empty(word_empty), .count(word_count)
  );

endmodule
