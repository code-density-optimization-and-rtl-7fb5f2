// lzw_width_run: testbench helper that decodes one program through an
// lzw_decompressor built with CW-bit codes and a 2**CW-entry dictionary and
// stack, and compares the result with the original. It reports its checks,
// failures and the compressed size on its output ports when done.
module lzw_width_run #(
  parameter int CW     = 9,
  parameter int NWORDS = 2048
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   code_bits,
  output int   orig_bits
);
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic          decode_ena = 1'b0, in_empty = 1'b1, in_rd_en, out_wr_en, busy, dict_full;
  logic          out_full = 1'b0;
  logic [CW-1:0] in_data = '0;
  logic [31:0]   out_wr_data;
  state_t        state;
  int unsigned   q[$];
  int unsigned   got[$];

  lzw_decompressor #(.CW(CW), .DEPTH(2 ** CW), .SDEPTH(2 ** CW)) dut (
    .clk, .rst_n, .decode_ena, .in_data, .in_empty, .in_rd_en,
    .out_wr_en, .out_wr_data, .out_full, .busy, .state, .dict_full
  );

  // The IN BUF stand-in is sampled on the falling edge, so the decompressor
  // sees a stable queue head at the rising edge.
  always @(negedge clk) begin
    in_empty = (q.size() == 0);
    in_data  = (q.size() != 0) ? CW'(q[0]) : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_rd_en) void'(q.pop_front());
    if (out_wr_en) got.push_back(out_wr_data);
  end

  initial begin
    bitq_t bits;
    codeq_t codes;
    int unsigned exp[$];
    int kwk;
    done = 1'b0; checks = 0; failures = 0;
    bits = program_bits(NWORDS, 96, 32'h1234_5678);
    compress(bits, codes, kwk, 2 ** CW);
    pack(bits, exp);
    orig_bits = bits.size();
    code_bits = CW * codes.size();
    foreach (codes[i]) q.push_back(codes[i]);
    while (!rst_n) @(negedge clk);
    @(negedge clk) decode_ena = 1'b1;
    while (q.size() != 0) @(negedge clk);
    decode_ena = 1'b0;
    @(negedge clk);
    while (busy) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL CW=%0d: %0d words exp %0d", CW, got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++;
        if (failures < 5) $display("FAIL CW=%0d word %0d", CW, i);
      end
    end
    // The dictionary must be full exactly when the stream needed more entries
    // than the 2**CW - 3 it has (one entry per code after the first).
    checks++;
    if (dict_full !== (codes.size() - 1 >= 2 ** CW - 3)) begin
      failures++; $display("FAIL CW=%0d: dict_full=%0d after %0d codes", CW, dict_full, codes.size());
    end
    done = 1'b1;
  end
endmodule
