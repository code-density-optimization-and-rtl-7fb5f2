// bit2byte: bit-to-byte conversion logic of the LZW decompressor.
//
// The decompressed program arrives as a bit string, one bit per accepted
// valid/ready handshake. Bits are shifted into a byte register, most
// significant bit first; each completed byte is placed into the next lane of
// a 32-bit word, lane 0 in bits 31:24. A completed word is written to OUT BUF
// as soon as OUT BUF is not full; while it waits, no new bit is accepted. A
// flush pulse (end of stream) closes a partly filled word, padding the
// remaining bits with zeros, so that no decoded bit stays behind.
//
// Timing: one bit per clock while OUT BUF has room; the word is written the
// cycle after its last bit, with one cycle without a new bit per word.
//
// From the source paper: bits are gathered into bytes and written to the
// 32-bit wide OUT BUF. This design's own choices: the bit and byte order, the
// handshake and the zero padding on flush.
module bit2byte #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_valid,
  input  logic              bit_data,
  output logic              bit_ready,
  input  logic              flush,
  // OUT BUF write side
  output logic              out_wr_en,
  output logic [WORD_W-1:0] out_wr_data,
  input  logic              out_full,
  output logic              pending    // a partial or complete word is held
);

  localparam int unsigned LANES = WORD_W / 8;
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1;

  logic [7:0]        byte_sr;
  logic [2:0]        bit_cnt;
  logic [LW-1:0]     lane;
  logic [WORD_W-1:0] word;
  logic              word_valid;
  logic              take, byte_done, partial;
  logic [7:0]        byte_next;

  assign bit_ready   = !word_valid;
  assign take        = bit_valid && bit_ready;
  assign byte_next   = {byte_sr[6:0], bit_data};
  assign byte_done   = take && (bit_cnt == 3'd7);
  assign partial     = (bit_cnt != '0) || (lane != '0);
  assign out_wr_en   = word_valid && !out_full;
  assign out_wr_data = word;
  assign pending     = word_valid || partial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_sr    <= '0;
      bit_cnt    <= '0;
      lane       <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      if (out_wr_en) word_valid <= 1'b0;
      if (take) begin
        byte_sr <= byte_next;
        bit_cnt <= bit_cnt + 1'b1;
        if (byte_done) begin
          word[WORD_W-1 - 8*lane -: 8] <= byte_next;
          if (lane == LW'(LANES - 1)) begin
            lane       <= '0;
            word_valid <= 1'b1;
          end else begin
            lane <= lane + 1'b1;
          end
        end
      end else if (flush && partial && !word_valid) begin
        // Close the word: shift the partial byte up and zero what is left.
        word[WORD_W-1 - 8*lane -: 8] <= byte_sr << (4'd8 - {1'b0, bit_cnt});
        for (int l = 0; l < LANES; l++)
          if (l > int'(lane)) word[WORD_W-1 - 8*l -: 8] <= '0;
        bit_cnt    <= '0;
        lane       <= '0;
        word_valid <= 1'b1;
      end
    end
  end

endmodule
