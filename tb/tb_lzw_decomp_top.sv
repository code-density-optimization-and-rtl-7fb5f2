// tb_lzw_decomp_top: end-to-end test of the decompression path.
//
// Several streams are compressed by the reference compressor, written code by
// code into IN BUF with random gaps, decoded, and read back from OUT BUF with
// random stalls; the words must equal the original bit strings packed 32 bits
// per word (zero padded). Streams: random bits (dictionary fills, then the
// full path), all-zero bits (every code after the first names the entry being
// built, strings up to 254 bits deep in the stack), a repeated instruction
// pattern, and a length that is not a multiple of 32 (flush of a partial
// word). The test counts how often each mechanism happened and fails if one
// never did: IN BUF empty stall, chain step, dictionary add, full dictionary,
// code-equals-next-entry, OUT BUF full stall, return to RD_DATA and to IDLE,
// partial-word flush.
module tb_lzw_decomp_top;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic decode_ena = 1'b0;
  logic code_wr_en = 1'b0;
  logic [7:0] code_wr_data = '0;
  logic code_full, code_empty, word_rd_en, word_empty, busy, dict_full;
  logic [4:0] code_count, word_count;
  logic [31:0] word_rd_data;
  state_t state;

  int checks = 0, failures = 0;
  int n_rd_stall = 0, n_chain = 0, n_add = 0, n_full = 0, n_kwk = 0;
  int n_out_stall = 0, n_c4 = 0, n_c5 = 0, n_flush = 0;
  bit reader_slow = 1'b0, reader_hold = 1'b0, writer_slow = 1'b0;

  always #5 clk = ~clk;
  int cycles = 0;
  always @(posedge clk) cycles++;

  lzw_decomp_top dut (.*);

  // Mechanism counters, from the FSM state and the datapath strobes.
  always @(posedge clk) if (rst_n) begin
    if (state == RD_DATA && code_empty)                    n_rd_stall++;
    if (state == CHK_CODE && dut.u_decomp.code_ram_dout_gt2) n_chain++;
    if (dut.u_decomp.dict_we)                              n_add++;
    if (state == CHK_CODE && !dut.u_decomp.code_ram_dout_gt2 && dict_full) n_full++;
    if (dut.u_decomp.in_rd_en && dut.u_decomp.u_code_ram_ctrl.kwk) n_kwk++;
    if (dut.u_decomp.u_bit2byte.word_valid && dut.u_decomp.out_full) n_out_stall++;
    if (state == OUT_STRING && dut.u_decomp.stack_ram_emp &&  decode_ena) n_c4++;
    if (state == OUT_STRING && dut.u_decomp.stack_ram_emp && !decode_ena) n_c5++;
    if (dut.u_decomp.flush && dut.u_decomp.u_bit2byte.partial) n_flush++;
  end

  // Reader: takes words from OUT BUF with random stalls.
  int unsigned got[$];
  assign word_rd_en = !word_empty && !reader_hold && (reader_slow ? ($urandom_range(7) == 0)
                                                  : ($urandom_range(3) != 0));
  always @(posedge clk) if (rst_n && word_rd_en) got.push_back(word_rd_data);

  task automatic run_stream(string name, bitq_t bits, int exp_kwk_min);
    codeq_t codes;
    int unsigned exp[$];
    int kwk, t0;
    compress(bits, codes, kwk);
    pack(bits, exp);
    got = {};
    t0 = cycles;
    @(negedge clk) decode_ena = 1'b1;
    foreach (codes[i]) begin
      while ($urandom_range(9) == 0) @(negedge clk);   // occasional gaps
      if (writer_slow) repeat ($urandom_range(60)) @(negedge clk);
      while (code_full) @(negedge clk);
      code_wr_en = 1'b1; code_wr_data = 8'(codes[i]);
      @(negedge clk);
      code_wr_en = 1'b0;
    end
    while (!code_empty) @(negedge clk);
    decode_ena = 1'b0;
    @(negedge clk);
    while (busy || !word_empty) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d words, expected %0d", name, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s word %0d: got %08h exp %08h", name, i,
                                    (i < got.size()) ? got[i] : 0, exp[i]);
      end
    end
    checks++;
    if (kwk < exp_kwk_min) begin
      failures++;
      $display("FAIL %s: only %0d code-equals-next-entry cases", name, kwk);
    end
    $display("stream %s: %0d bits, %0d codes, %0d words, %0d cycles", name,
             bits.size(), codes.size(), exp.size(), cycles - t0);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("mechanism %-22s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_stream("random",   random_bits(4096), 0);
    run_stream("zeros",    pattern_bits(40000, 32'h0), 250);
    reader_slow = 1'b1;
    fork
      run_stream("pattern",  pattern_bits(6400, 32'hE1A0_1002), 0);
      begin reader_hold = 1'b1; repeat (4000) @(negedge clk); reader_hold = 1'b0; end
    join
    writer_slow = 1'b1;
    run_stream("odd_len",  random_bits(1001), 0);
    reader_slow = 1'b0;
    writer_slow = 1'b0;
    run_stream("single",   random_bits(1), 0);
    expect_seen("IN BUF empty stall", n_rd_stall);
    expect_seen("chain step (c1)",   n_chain);
    expect_seen("dictionary add",    n_add);
    expect_seen("dictionary full (c2)", n_full);
    expect_seen("code = next entry", n_kwk);
    expect_seen("OUT BUF full stall", n_out_stall);
    expect_seen("next code (c4)",    n_c4);
    expect_seen("stop (c5)",         n_c5);
    expect_seen("partial-word flush", n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
