// tb_bit2byte: feeds random bit strings into the bit-to-byte logic with random
// valid gaps and random OUT BUF full periods, and compares the written words
// with the bits packed first-bit-in-bit-31. Each string ends with a flush, so
// a string whose length is not a multiple of 32 must come out zero padded.
// With valid always high and OUT BUF never full, 32 bits must take at most
// 33 cycles per word.
module tb_bit2byte;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bit_valid = 0, bit_data = 0, bit_ready, flush = 0, out_wr_en, out_full = 0, pending;
  logic [31:0] out_wr_data;
  int checks = 0, failures = 0;
  int unsigned got[$];
  bit fast;

  bit2byte dut (.*);

  always @(posedge clk) begin
    if (rst_n) out_full <= fast ? 1'b0 : ($urandom_range(3) == 0);
    if (rst_n && out_wr_en) got.push_back(out_wr_data);
  end

  task automatic run(int nbits, bit fast_mode);
    int unsigned exp[$];
    int unsigned w;
    int t0, cycles;
    fast = fast_mode;
    got = {};
    w = 0;
    for (int i = 0; i < nbits; i++) begin
      bit b = 1'($urandom);
      w[31 - (i % 32)] = b;
      if (i % 32 == 31 || i == nbits - 1) begin exp.push_back(w); w = 0; end
    end
    t0 = 0;
    cycles = 0;
    for (int i = 0; i < nbits; i++) begin
      bit_valid = fast ? 1'b1 : ($urandom_range(4) != 0);
      while (!bit_valid) begin @(negedge clk); cycles++; bit_valid = ($urandom_range(4) != 0); end
      bit_data = exp[i / 32][31 - (i % 32)];
      @(posedge clk); #1;
      while (!bit_ready) begin @(posedge clk); #1; cycles++; end   // taken at this edge only if ready
      cycles++;
      @(negedge clk);
    end
    bit_valid = 1'b0;
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    while (pending) @(negedge clk);
    @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL %0d words exp %0d", got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", i, (i < got.size()) ? got[i] : 0, exp[i]);
      end
    end
    if (fast) begin
      checks++;
      if (cycles > (nbits / 32) * 33 + 33) begin failures++; $display("FAIL rate: %0d cycles for %0d bits", cycles, nbits); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(320, 1'b1);
    run(1000, 1'b0);
    run(5, 1'b0);
    run(64 + 17, 1'b1);
    run(32 * 40, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
