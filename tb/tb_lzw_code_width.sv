// tb_lzw_code_width: the dictionary-size study run on the RTL. The same
// program-like data (8192 words) is compressed with 8- to 14-bit codes
// (dictionaries of 256 to 16384 codes; 8 bits is the default build) and decoded by a decompressor built
// for each width; every decoded word is compared and the compressed size is
// reported as a percentage of the original for each width.
module tb_lzw_code_width;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 7;
  logic done [N];
  int   c [N], f [N], cb [N], ob [N];
  int   checks = 0, failures = 0;

  for (genvar g = 0; g < N; g++) begin : g_w
    lzw_width_run #(.CW(8 + g), .NWORDS(8192)) u_run (
      .clk, .rst_n, .done(done[g]), .checks(c[g]), .failures(f[g]),
      .code_bits(cb[g]), .orig_bits(ob[g]));
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < N; i++) if (!done[i]) all = 1'b0;
    end while (!all);
    for (int i = 0; i < N; i++) begin
      checks += c[i];
      failures += f[i];
      $display("%0d-bit codes: %0d bits -> %0d bits of code, %0.2f%%", 8 + i, ob[i], cb[i],
               100.0 * cb[i] / ob[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    for (int i = 0; i < N; i++) $display("width %0d done=%0d", 8 + i, done[i]);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
