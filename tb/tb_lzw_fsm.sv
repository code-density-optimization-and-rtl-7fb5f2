// tb_lzw_fsm: drives the decoder FSM with random condition inputs and checks
// every transition against the state diagram: IDLE -> RD_DATA on decode_ena,
// RD_DATA -> SCAN_TABLE when a code is available, SCAN_TABLE -> CHK_CODE,
// CHK_CODE -> SCAN_TABLE (c1) / OUT_STRING (c2) / ADD_TABLE (c3),
// ADD_TABLE -> OUT_STRING, OUT_STRING -> RD_DATA (c4) / IDLE (c5). It also
// checks the start, flush and busy outputs and that every arc was taken.
module tb_lzw_fsm;
  import lzw_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic decode_ena = 0, in_empty = 1, code_ram_dout_gt2 = 0, decode_ram_full = 0, stack_ram_emp = 0;
  logic start, flush, busy;
  state_t state, exp_state;
  int checks = 0, failures = 0;
  int arcs [string];

  lzw_fsm dut (.*);

  function automatic state_t next_of(state_t s, output string arc);
    arc = "";
    case (s)
      IDLE:       begin if (decode_ena) begin arc = "idle>rd"; return RD_DATA; end return IDLE; end
      RD_DATA:    begin if (!in_empty) begin arc = "rd>scan"; return SCAN_TABLE; end arc = "rd wait"; return RD_DATA; end
      SCAN_TABLE: begin arc = "scan>chk"; return CHK_CODE; end
      CHK_CODE: begin
        if (code_ram_dout_gt2)    begin arc = "c1"; return SCAN_TABLE; end
        if (decode_ram_full)      begin arc = "c2"; return OUT_STRING; end
        arc = "c3"; return ADD_TABLE;
      end
      ADD_TABLE:  begin arc = "add>out"; return OUT_STRING; end
      OUT_STRING: begin
        if (stack_ram_emp && decode_ena)  begin arc = "c4"; return RD_DATA; end
        if (stack_ram_emp && !decode_ena) begin arc = "c5"; return IDLE; end
        arc = "out wait"; return OUT_STRING;
      end
      default: return IDLE;
    endcase
  endfunction

  initial begin
    string arc;
    repeat (2) @(negedge clk);
    checks++;
    if (state !== IDLE) begin failures++; $display("FAIL reset state %s", state.name()); end
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      decode_ena        = ($urandom_range(7) != 0);
      in_empty          = ($urandom_range(3) == 0);
      code_ram_dout_gt2 = 1'($urandom);
      decode_ram_full   = ($urandom_range(3) == 0);
      stack_ram_emp     = ($urandom_range(2) == 0);
      #1;
      exp_state = next_of(state, arc);
      checks += 3;
      if (start !== (state == IDLE && decode_ena)) begin failures++; $display("FAIL start"); end
      if (flush !== (arc == "c5")) begin failures++; $display("FAIL flush"); end
      if (busy  !== (state != IDLE)) begin failures++; $display("FAIL busy"); end
      if (arc != "") arcs[arc] = arcs.exists(arc) ? arcs[arc] + 1 : 1;
      @(posedge clk); #1;
      checks++;
      if (state !== exp_state) begin
        failures++;
        $display("FAIL arc %s: state %s exp %s", arc, state.name(), exp_state.name());
      end
    end
    foreach (arcs[a]) $display("arc %-8s taken %0d times", a, arcs[a]);
    checks++;
    if (arcs.size() != 11) begin failures++; $display("FAIL only %0d arcs taken", arcs.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
