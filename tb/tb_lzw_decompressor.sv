// tb_lzw_decompressor: checks the decompression engine on its own. The
// testbench stands in for IN BUF (a queue of codes, with random empty
// periods) and OUT BUF (random full periods) and compares the words written
// with the original bit strings. Streams: random bits, all-ones bits, a
// repeated instruction word, an odd length; the dictionary is cleared between
// streams, which the second run of the same data checks.
module tb_lzw_decompressor;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        decode_ena = 0, in_empty = 1, in_rd_en, out_wr_en, out_full = 0, busy, dict_full;
  logic [7:0]  in_data = '0;
  logic [31:0] out_wr_data;
  state_t      state;
  int checks = 0, failures = 0;
  byte unsigned q[$];
  int unsigned  got[$];
  bit hold_in = 0;

  lzw_decompressor dut (.*);

  // The IN BUF stand-in is sampled on the falling edge, so the decompressor
  // sees a stable queue head at the rising edge.
  always @(negedge clk) begin
    in_empty = (q.size() == 0) || hold_in;
    in_data  = (q.size() != 0) ? q[0] : 8'h0;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_rd_en) void'(q.pop_front());
    if (out_wr_en) got.push_back(out_wr_data);
    out_full <= ($urandom_range(4) == 0);
    hold_in  <= ($urandom_range(6) == 0);
  end

  task automatic stream(string name, bitq_t bits);
    codeq_t codes;
    int unsigned exp[$];
    int kwk;
    compress(bits, codes, kwk);
    pack(bits, exp);
    got = {};
    foreach (codes[i]) q.push_back(8'(codes[i]));
    @(negedge clk) decode_ena = 1'b1;
    while (q.size() != 0) @(negedge clk);
    decode_ena = 1'b0;
    @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL %s: %0d words exp %0d", name, got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s word %0d got %h exp %h", name, i, (i < got.size()) ? got[i] : 0, exp[i]);
      end
    end
    $display("stream %s: %0d codes, %0d words", name, codes.size(), exp.size());
  endtask

  initial begin
    bitq_t r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    r = random_bits(2048);
    stream("random", r);
    stream("random again", r);
    stream("ones", pattern_bits(36000, 32'hFFFF_FFFF));
    stream("word", pattern_bits(3200, 32'hE59F_1024));
    stream("odd", random_bits(77));
    checks++;
    if (state !== IDLE) begin failures++; $display("FAIL not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
