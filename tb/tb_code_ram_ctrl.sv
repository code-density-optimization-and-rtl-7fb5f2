// tb_code_ram_ctrl: checks the code RAM control with its code RAM and char
// RAM. The testbench plays the FSM: per code it steps RD_DATA, SCAN_TABLE /
// CHK_CODE while the chain continues, ADD_TABLE unless the dictionary is full.
// The bits pushed plus first_char must rebuild the string the reference
// compressor encoded, for random data (dictionary fills) and for all-zero
// data (each code names the entry about to be built). A chain step must take
// exactly two cycles, and decode_ram_full must rise after 253 entries.
module tb_code_ram_ctrl;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  state_t     state = IDLE;
  logic       start = 0, in_empty = 1, in_rd_en;
  logic [7:0] in_data = 0;
  logic       dict_we, char_ram_wdata, char_ram_dout;
  logic [7:0] dict_waddr, code_ram_wdata, dict_raddr, code_ram_dout;
  logic       code_ram_dout_gt2, decode_ram_full, push, push_bit, first_char;
  int checks = 0, failures = 0, n_adds = 0;

  code_ram_ctrl dut (.*);
  lzw_ram #(.DEPTH(256), .WIDTH(8)) u_code (.clk, .we(dict_we), .waddr(dict_waddr),
    .wdata(code_ram_wdata), .raddr(dict_raddr), .rdata(code_ram_dout));
  lzw_ram #(.DEPTH(256), .WIDTH(1)) u_char (.clk, .we(dict_we), .waddr(dict_waddr),
    .wdata(char_ram_wdata), .raddr(dict_raddr), .rdata(char_ram_dout));

  always @(posedge clk) if (dict_we) n_adds++;

  task automatic stream(string name, bitq_t bits);
    codeq_t codes;
    bit out[$];
    bit stk[$];
    int kwk, steps, cyc;
    compress(bits, codes, kwk);
    @(negedge clk); state = IDLE; start = 1'b1;
    @(negedge clk); start = 1'b0;
    n_adds = 0;
    foreach (codes[i]) begin
      stk = {};
      state = RD_DATA; in_empty = 1'b0; in_data = 8'(codes[i]);
      #1;
      checks++;
      if (!in_rd_en) begin failures++; $display("FAIL no read in RD_DATA"); end
      if (push) stk.push_back(push_bit);
      @(negedge clk); in_empty = 1'b1;
      steps = 0; cyc = 0;
      forever begin
        state = SCAN_TABLE; @(negedge clk); cyc++;
        state = CHK_CODE;  #1;
        if (push) stk.push_back(push_bit);
        if (!code_ram_dout_gt2) break;
        @(negedge clk); cyc++; steps++;
      end
      checks++;
      if (cyc != 2 * steps + 1) begin failures++; $display("FAIL chain timing"); end
      if (!decode_ram_full) begin
        @(negedge clk); state = ADD_TABLE;
      end
      @(negedge clk); state = OUT_STRING;
      out.push_back(first_char);
      while (stk.size() > 0) out.push_back(stk.pop_back());
      @(negedge clk);
    end
    checks++;
    if (out.size() != bits.size()) begin failures++; $display("FAIL %s: %0d bits, exp %0d", name, out.size(), bits.size()); end
    foreach (bits[i]) begin
      checks++;
      if (i >= out.size() || out[i] !== bits[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s bit %0d", name, i);
      end
    end
    checks++;
    if (codes.size() > 254 && (!decode_ram_full || n_adds != 253)) begin
      failures++; $display("FAIL %s: full=%0d after %0d adds", name, decode_ram_full, n_adds);
    end
    $display("stream %s: %0d codes, %0d adds, %0d code=next cases", name, codes.size(), n_adds, kwk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    stream("random", random_bits(3000));
    stream("zeros", pattern_bits(4000, 0));
    stream("ones", pattern_bits(40000, 32'hFFFF_FFFF));
    stream("word", pattern_bits(3200, 32'hE59F_1024));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
