// stack_ram_ctrl: stack RAM control of the LZW decompressor.
//
// The chain walk meets the bits of a string from last to first, so they are
// pushed onto the stack RAM as they come and popped in reverse order. The
// stack pointer sp counts the stored bits; a push writes at sp, a pop removes
// the bit at sp-1. In OUT_STRING the controller first sends the string's
// first bit (first_char, the root found at the end of the walk), then pops the
// stack one bit per cycle to the bit-to-byte logic with a valid/ready
// handshake. stack_ram_emp tells the FSM that the whole string has been sent.
//
// Timing: the stack RAM has a registered read. Its read address is always
// (next sp) - 1, so the top of the stack is on rdata one cycle after sp
// settles; a push in the previous cycle marks rdata stale for one cycle. Each
// decoded string enters OUT_STRING with the leading bit, which covers that
// cycle, so popping runs at one bit per clock.
//
// From the source paper: a stack RAM read in reverse order, with its own
// address generator. This design's own choices: the leading bit is sent from
// a register instead of being stored, and the handshake to the next stage.
module stack_ram_ctrl
  import lzw_pkg::*;
#(
  parameter int unsigned DEPTH = STACK_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  state_t        state,
  input  logic          push,
  input  logic          push_bit,
  input  logic          first_char,
  // stack RAM
  output logic          stack_we,
  output logic [AW-1:0] stack_waddr,
  output logic          stack_wdata,
  output logic [AW-1:0] stack_raddr,
  input  logic          stack_rdata,
  // decoded bit stream to the bit-to-byte logic
  output logic          bit_valid,
  output logic          bit_data,
  input  logic          bit_ready,
  // to the FSM
  output logic          stack_ram_emp
);

  logic [AW:0] sp, sp_d;
  logic        lead_pending;   // first bit of the string not yet sent
  logic        top_valid;      // stack_rdata holds mem[sp-1]
  logic        pop, out_phase;

  assign out_phase = (state == OUT_STRING);

  always_comb begin
    bit_valid = 1'b0;
    bit_data  = 1'b0;
    if (out_phase) begin
      if (lead_pending) begin
        bit_valid = 1'b1;
        bit_data  = first_char;
      end else if (sp != '0) begin
        bit_valid = top_valid;
        bit_data  = stack_rdata;
      end
    end
  end

  assign pop  = out_phase && !lead_pending && (sp != '0) && top_valid && bit_ready;
  assign sp_d = sp + (AW+1)'(push) - (AW+1)'(pop);

  assign stack_we    = push;
  assign stack_waddr = sp[AW-1:0];
  assign stack_wdata = push_bit;
  assign stack_raddr = AW'(sp_d - 1'b1);

  assign stack_ram_emp = (sp == '0) && !lead_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp           <= '0;
      lead_pending <= 1'b0;
      top_valid    <= 1'b0;
    end else begin
      sp        <= sp_d;
      top_valid <= !push;
      if (state == RD_DATA)                         lead_pending <= 1'b1;
      else if (out_phase && lead_pending && bit_ready) lead_pending <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (sp < (AW+1)'(DEPTH)));
  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
