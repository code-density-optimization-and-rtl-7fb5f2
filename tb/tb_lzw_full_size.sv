// tb_lzw_full_size: the verification flow of the design at full size. A
// random binary string fills seq_mem (8192 x 32 bits); the reference
// compressor turns it into codes held in code_mem; the codes go through IN BUF,
// the decompressor and OUT BUF into deseq_mem; seq_mem and deseq_mem must be
// equal. The top runs with its default parameters.
module tb_lzw_full_size;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  localparam int WORDS = 8192;

  logic clk = 1'b0, rst_n = 1'b0;
  logic decode_ena = 1'b0, code_wr_en = 1'b0;
  logic [7:0] code_wr_data = '0;
  logic code_full, code_empty, word_rd_en, word_empty, busy, dict_full;
  logic [4:0] code_count, word_count;
  logic [31:0] word_rd_data;
  state_t state;
  int checks = 0, failures = 0;
  longint cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  lzw_decomp_top dut (.*);

  int unsigned seq_mem   [WORDS];
  int unsigned deseq_mem [WORDS];
  codeq_t      code_mem;
  int          n_out = 0;

  assign word_rd_en = !word_empty;
  always @(posedge clk) if (rst_n && word_rd_en) begin
    if (n_out < WORDS) deseq_mem[n_out] = word_rd_data;
    n_out++;
  end

  initial begin
    bitq_t bits;
    int kwk;
    longint t0;
    foreach (seq_mem[i]) begin
      seq_mem[i] = $urandom;
      for (int b = 31; b >= 0; b--) bits.push_back(seq_mem[i][b]);
    end
    compress(bits, code_mem, kwk);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t0 = cycles;
    decode_ena = 1'b1;
    foreach (code_mem[i]) begin
      while (code_full) @(negedge clk);
      code_wr_en = 1'b1; code_wr_data = 8'(code_mem[i]);
      @(negedge clk);
      code_wr_en = 1'b0;
    end
    while (!code_empty) @(negedge clk);
    decode_ena = 1'b0;
    @(negedge clk);
    while (busy || !word_empty) @(negedge clk);
    checks++;
    if (n_out != WORDS) begin failures++; $display("FAIL %0d words out, expected %0d", n_out, WORDS); end
    foreach (seq_mem[i]) begin
      checks++;
      if (deseq_mem[i] !== seq_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h, expected %h", i, deseq_mem[i], seq_mem[i]);
      end
    end
    $display("%0d bits, %0d codes (%0d bits of code), %0d cycles, %0.2f cycles per output bit",
             bits.size(), code_mem.size(), 8 * code_mem.size(), cycles - t0,
             real'(cycles - t0) / bits.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
