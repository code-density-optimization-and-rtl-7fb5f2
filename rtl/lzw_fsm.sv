// lzw_fsm: the core control of the LZW decompressor.
//
// Six states, as in the state diagram: IDLE waits for decode_ena; RD_DATA
// takes one code from IN BUF; SCAN_TABLE reads the code RAM and char RAM at
// the current chain address; CHK_CODE either continues the chain walk (c1:
// the prefix read is above 8'h02), goes straight to OUT_STRING when the
// dictionary is full (c2), or goes to ADD_TABLE (c3); ADD_TABLE writes the new
// dictionary entry; OUT_STRING sends the decoded bits out and, once the stack
// is empty, returns to RD_DATA while decode_ena is high (c4) or to IDLE (c5).
//
// Interface: the datapath reports code_ram_dout_gt2 (chain continues),
// decode_ram_full, stack_ram_emp (string fully sent) and in_empty; the FSM
// publishes its state, from which the controllers derive their strobes, and
// the one-cycle start / flush pulses. Timing: one state per clock edge.
//
// From the source paper: the states and the conditions c1..c5. This
// design's own choices: RD_DATA waits while IN BUF is empty (the diagram shows
// an unconditional arc), and the start pulse on leaving IDLE that clears the
// dictionary for a new stream.
module lzw_fsm
  import lzw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   decode_ena,
  input  logic   in_empty,
  input  logic   code_ram_dout_gt2,
  input  logic   decode_ram_full,
  input  logic   stack_ram_emp,
  output state_t state,
  output logic   start,   // IDLE -> RD_DATA: begin a new compressed stream
  output logic   flush,   // OUT_STRING -> IDLE: the stream has ended
  output logic   busy
);

  state_t state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      IDLE:       if (decode_ena) state_d = RD_DATA;
      RD_DATA:    if (!in_empty)  state_d = SCAN_TABLE;
      SCAN_TABLE: state_d = CHK_CODE;
      CHK_CODE: begin
        if (code_ram_dout_gt2)    state_d = SCAN_TABLE;  // c1
        else if (decode_ram_full) state_d = OUT_STRING;  // c2
        else                      state_d = ADD_TABLE;   // c3
      end
      ADD_TABLE:  state_d = OUT_STRING;
      OUT_STRING: if (stack_ram_emp) state_d = decode_ena ? RD_DATA : IDLE;  // c4 / c5
      default:    state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_d;
  end

  assign start = (state == IDLE) && decode_ena;
  assign flush = (state == OUT_STRING) && stack_ram_emp && !decode_ena;
  assign busy  = (state != IDLE);

endmodule
