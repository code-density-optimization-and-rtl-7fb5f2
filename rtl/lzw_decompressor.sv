// lzw_decompressor: the LZW decompression engine that sits between the
// compressed program memory and an unmodified 32-bit processor.
//
// It takes fixed-width codes from IN BUF and writes the decompressed program
// as 32-bit words to OUT BUF. Inside: the FSM; the code RAM control with the
// dictionary (code RAM of prefix codes, char RAM of last bits); the stack RAM
// control with the stack RAM, which turns the back-to-front chain walk into a
// front-to-back bit string; and the bit-to-byte logic that packs the bits.
// A stream is decoded while decode_ena is high; each stream starts with an
// empty dictionary. After decode_ena falls the engine finishes the code in
// hand, flushes a partial word and returns to IDLE (busy low).
//
// Timing per code: 1 cycle in RD_DATA (more while IN BUF is empty), 2 cycles
// per chain step (SCAN_TABLE + CHK_CODE), 1 cycle in ADD_TABLE and 1 cycle
// per output bit plus one in OUT_STRING, plus stalls while OUT BUF is full.
//
// The partition, the RAM sizes (256 x 8 code RAM, 256 x 1 char and stack
// RAM) and the states follow the source paper's block diagram and state diagram;
// the interfaces between the parts are this design's own.
module lzw_decompressor
  import lzw_pkg::*;
#(
  parameter int unsigned CW     = CODE_W,
  parameter int unsigned DEPTH  = DICT_DEPTH,
  parameter int unsigned SDEPTH = STACK_DEPTH,
  parameter int unsigned WORD_W = OUT_W,
  localparam int unsigned SAW   = $clog2(SDEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              decode_ena,
  // IN BUF read side
  input  logic [CW-1:0]     in_data,
  input  logic              in_empty,
  output logic              in_rd_en,
  // OUT BUF write side
  output logic              out_wr_en,
  output logic [WORD_W-1:0] out_wr_data,
  input  logic              out_full,
  // status
  output logic              busy,
  output state_t            state,
  output logic              dict_full
);

  logic          start, flush, fsm_busy;
  logic          code_ram_dout_gt2, decode_ram_full, stack_ram_emp;
  logic          dict_we, char_ram_wdata, char_ram_dout;
  logic [CW-1:0] dict_waddr, dict_raddr, code_ram_wdata, code_ram_dout;
  logic          push, push_bit, first_char;
  logic          stack_we, stack_wdata, stack_rdata;
  logic [SAW-1:0] stack_waddr, stack_raddr;
  logic          bit_valid, bit_data, bit_ready, pack_pending;

  lzw_fsm u_fsm (
    .clk, .rst_n, .decode_ena, .in_empty,
    .code_ram_dout_gt2, .decode_ram_full, .stack_ram_emp,
    .state, .start, .flush, .busy(fsm_busy)
  );

  code_ram_ctrl #(.CW(CW), .DEPTH(DEPTH)) u_code_ram_ctrl (
    .clk, .rst_n, .state, .start,
    .in_data, .in_empty, .in_rd_en,
    .dict_we, .dict_waddr, .code_ram_wdata, .char_ram_wdata, .dict_raddr,
    .code_ram_dout, .char_ram_dout,
    .code_ram_dout_gt2, .decode_ram_full,
    .push, .push_bit, .first_char
  );

  lzw_ram #(.DEPTH(DEPTH), .WIDTH(CW)) u_code_ram (
    .clk, .we(dict_we), .waddr(dict_waddr), .wdata(code_ram_wdata),
    .raddr(dict_raddr), .rdata(code_ram_dout)
  );

  lzw_ram #(.DEPTH(DEPTH), .WIDTH(1)) u_char_ram (
    .clk, .we(dict_we), .waddr(dict_waddr), .wdata(char_ram_wdata),
    .raddr(dict_raddr), .rdata(char_ram_dout)
  );

  stack_ram_ctrl #(.DEPTH(SDEPTH)) u_stack_ram_ctrl (
    .clk, .rst_n, .state, .push, .push_bit, .first_char,
    .stack_we, .stack_waddr, .stack_wdata, .stack_raddr, .stack_rdata,
    .bit_valid, .bit_data, .bit_ready, .stack_ram_emp
  );

  lzw_ram #(.DEPTH(SDEPTH), .WIDTH(1)) u_stack_ram (
    .clk, .we(stack_we), .waddr(stack_waddr), .wdata(stack_wdata),
    .raddr(stack_raddr), .rdata(stack_rdata)
  );

  bit2byte #(.WORD_W(WORD_W)) u_bit2byte (
    .clk, .rst_n, .bit_valid, .bit_data, .bit_ready, .flush,
    .out_wr_en, .out_wr_data, .out_full, .pending(pack_pending)
  );

  assign busy      = fsm_busy || pack_pending;
  assign dict_full = decode_ram_full;

endmodule
