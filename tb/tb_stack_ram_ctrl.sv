// tb_stack_ram_ctrl: checks the stack RAM control together with a 256 x 1
// stack RAM. For each string a random number of bits (0 to 255) is pushed as
// the chain walk would push them, then OUT_STRING must deliver the leading bit
// first and the pushed bits in reverse order, with a random ready from the
// next stage, and raise stack_ram_emp only when all were sent. With ready
// held high a string of n pushed bits must leave in n + 1 cycles.
module tb_stack_ram_ctrl;
  import lzw_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  state_t     state = IDLE;
  logic       push = 0, push_bit = 0, first_char = 0;
  logic       stack_we, stack_wdata, stack_rdata;
  logic [7:0] stack_waddr, stack_raddr;
  logic       bit_valid, bit_data, bit_ready = 0, stack_ram_emp;
  int checks = 0, failures = 0;

  stack_ram_ctrl dut (.*);
  lzw_ram #(.DEPTH(256), .WIDTH(1)) u_stack (.clk, .we(stack_we), .waddr(stack_waddr),
    .wdata(stack_wdata), .raddr(stack_raddr), .rdata(stack_rdata));

  task automatic one_string(int n, bit fast);
    bit exp[$];
    bit got[$];
    int cycles;
    @(negedge clk);
    state = RD_DATA;
    first_char = 1'($urandom);
    exp.push_back(first_char);
    @(negedge clk);
    state = SCAN_TABLE;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      state = CHK_CODE;
      push = 1'b1;
      push_bit = 1'($urandom);
      exp.insert(1, push_bit);   // later pushes come out earlier
      @(negedge clk);
      push = 1'b0;
      state = SCAN_TABLE;
    end
    @(negedge clk);
    state = OUT_STRING;
    cycles = 0;
    while (!stack_ram_emp) begin
      bit_ready = fast ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (bit_valid && bit_ready) got.push_back(bit_data);
      cycles++;
      @(negedge clk);
      if (cycles > 2000) break;
    end
    state = RD_DATA;
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL n=%0d: %0d bits out", n, got.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin failures++; $display("FAIL n=%0d bit %0d", n, i); end
    end
    if (fast) begin
      checks++;
      if (cycles != n + 1) begin failures++; $display("FAIL n=%0d took %0d cycles", n, cycles); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one_string(0, 1);
    one_string(1, 1);
    one_string(255, 1);
    one_string(255, 0);
    for (int i = 0; i < 40; i++) one_string($urandom_range(30), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
