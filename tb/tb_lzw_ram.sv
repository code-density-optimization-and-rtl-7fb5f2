// tb_lzw_ram: checks the synchronous RAM in its two shapes, 256 x 8 (code
// RAM) and 256 x 1 (char and stack RAM). Random writes and reads are compared
// with a shadow array; the read data must appear exactly one cycle after the
// address, and a read of the address being written must return the old word.
module tb_lzw_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we8, we1;
  logic [7:0] wa8, ra8, wd8, rd8, wa1, ra1;
  logic       wd1, rd1;
  int checks = 0, failures = 0;

  lzw_ram #(.DEPTH(256), .WIDTH(8)) u_ram8 (.clk, .we(we8), .waddr(wa8), .wdata(wd8), .raddr(ra8), .rdata(rd8));
  lzw_ram #(.DEPTH(256), .WIDTH(1)) u_ram1 (.clk, .we(we1), .waddr(wa1), .wdata(wd1), .raddr(ra1), .rdata(rd1));

  logic [7:0] shadow8 [256];
  logic       shadow1 [256];
  logic [7:0] exp8;
  logic       exp1;
  bit         valid8 [256];

  initial begin
    we8 = 0; we1 = 0; wa8 = 0; ra8 = 0; wd8 = 0; wa1 = 0; ra1 = 0; wd1 = 0;
    // Fill both memories.
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we8 = 1; wa8 = 8'(a); wd8 = 8'($urandom); shadow8[a] = wd8;
      we1 = 1; wa1 = 8'(a); wd1 = 1'($urandom); shadow1[a] = wd1;
    end
    @(negedge clk); we8 = 0; we1 = 0;
    // Random mixed traffic.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ra8 = 8'($urandom); ra1 = 8'($urandom);
      we8 = 1'($urandom); wa8 = ($urandom_range(3) == 0) ? ra8 : 8'($urandom); wd8 = 8'($urandom);
      we1 = 1'($urandom); wa1 = ($urandom_range(3) == 0) ? ra1 : 8'($urandom); wd1 = 1'($urandom);
      exp8 = shadow8[ra8];           // read-first: old contents
      exp1 = shadow1[ra1];
      if (we8) shadow8[wa8] = wd8;
      if (we1) shadow1[wa1] = wd1;
      @(posedge clk); #1;
      checks += 2;
      if (rd8 !== exp8) begin failures++; $display("FAIL ram8 addr %0d got %h exp %h", ra8, rd8, exp8); end
      if (rd1 !== exp1) begin failures++; $display("FAIL ram1 addr %0d got %h exp %h", ra1, rd1, exp1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
