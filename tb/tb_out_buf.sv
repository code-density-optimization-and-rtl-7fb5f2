// tb_out_buf: checks the out_buf FIFO (16 x 32) against a queue model under random
// pushes and pops: show-ahead data, full and empty flags, fill count, and
// that a push into a full buffer or a pop from an empty one changes nothing.
module tb_out_buf;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [32-1:0] wr_data = '0, rd_data;
  logic [4:0]    count;
  logic [32-1:0] model[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, bias;

  out_buf dut (.*);

  task automatic check_flags();
    checks += 3;
    if (count !== 5'(model.size())) begin failures++; $display("FAIL count %0d exp %0d", count, model.size()); end
    if (full  !== (model.size() == 16)) begin failures++; $display("FAIL full"); end
    if (empty !== (model.size() == 0))  begin failures++; $display("FAIL empty"); end
    if (model.size() > 0) begin
      checks++;
      if (rd_data !== model[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, model[0]); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      bias = (i / 500) % 2;      // alternate fill-heavy and drain-heavy phases
      @(negedge clk);
      check_flags();
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en   = ($urandom_range(3) < ((bias != 0) ? 3 : 1));
      rd_en   = ($urandom_range(3) < ((bias != 0) ? 1 : 3));
      // Never request an illegal operation: those are covered by assertions.
      if (full) wr_en = 1'b0;
      if (empty) rd_en = 1'b0;
      wr_data = 32'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full or empty never reached"); end
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
