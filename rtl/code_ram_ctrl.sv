// code_ram_ctrl: code RAM control of the LZW decompressor.
//
// In RD_DATA it takes one code from IN BUF and loads it as the chain address.
// In SCAN_TABLE the code RAM (prefix codes) and char RAM (last bits) are read
// at that address; in CHK_CODE the bit read is pushed onto the stack and, if
// the prefix read is above 8'h02, the prefix becomes the next chain address
// (code_ram_dout_gt2). A prefix at or below 8'h02 is a root: its value is the
// first bit of the string, kept in first_char. In ADD_TABLE the entry
// {previous code, first bit of the current string} is written at next_code,
// which counts up from 3 until the dictionary is full (decode_ram_full).
//
// A code equal to next_code names the entry about to be created (the classic
// LZW case "string + its own first character"): the controller then pushes the
// previous string's first bit as the string's last bit and walks the previous
// code instead. The first code of a stream adds no entry.
//
// Timing: the RAM read address is the registered chain address, so the data
// read in SCAN_TABLE is valid in CHK_CODE; one chain step costs two cycles.
//
// From the source paper: the two RAMs it addresses, the chain walk ended by
// a code read at or below 8'h02, and the ADD_TABLE entry. This design's own
// choices: codes 0 and 1 are the bit roots and code 2 is reserved, the first
// bit is taken from the root prefix rather than stored on the stack, the
// handling of the code-equals-next-entry case, and stopping dictionary growth
// (no reset) once all 256 entries are used.
module code_ram_ctrl
  import lzw_pkg::*;
#(
  parameter int unsigned CW    = CODE_W,
  parameter int unsigned DEPTH = DICT_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  state_t        state,
  input  logic          start,
  // IN BUF read side
  input  logic [CW-1:0] in_data,
  input  logic          in_empty,
  output logic          in_rd_en,
  // code RAM (prefix) and char RAM (last bit); both share the addresses
  output logic          dict_we,
  output logic [CW-1:0] dict_waddr,
  output logic [CW-1:0] code_ram_wdata,
  output logic          char_ram_wdata,
  output logic [CW-1:0] dict_raddr,
  input  logic [CW-1:0] code_ram_dout,
  input  logic          char_ram_dout,
  // to the FSM
  output logic          code_ram_dout_gt2,
  output logic          decode_ram_full,
  // to the stack RAM control
  output logic          push,
  output logic          push_bit,
  output logic          first_char
);

  logic [CW-1:0] scan_addr;   // current chain address
  logic [CW-1:0] cur_code;    // code being decoded
  logic [CW-1:0] prev_code;   // previously decoded code
  logic [CW:0]   next_code;   // next free dictionary entry
  logic          have_prev;
  logic          is_root, kwk, take;

  assign decode_ram_full = (next_code == (CW+1)'(DEPTH));
  assign take            = (state == RD_DATA) && !in_empty;
  assign in_rd_en        = take;
  assign kwk             = have_prev && !decode_ram_full && (in_data == next_code[CW-1:0]);
  assign is_root         = (scan_addr <= CW'(ROOT_LIMIT));

  assign dict_raddr        = scan_addr;
  assign code_ram_dout_gt2 = !is_root && (code_ram_dout > CW'(ROOT_LIMIT));

  assign dict_we        = (state == ADD_TABLE) && have_prev;
  assign dict_waddr     = next_code[CW-1:0];
  assign code_ram_wdata = prev_code;
  assign char_ram_wdata = first_char;

  always_comb begin
    push     = 1'b0;
    push_bit = 1'b0;
    if (take && kwk) begin
      push     = 1'b1;
      push_bit = first_char;        // still the previous string's first bit
    end else if ((state == CHK_CODE) && !is_root) begin
      push     = 1'b1;
      push_bit = char_ram_dout;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_addr  <= '0;
      cur_code   <= '0;
      prev_code  <= '0;
      next_code  <= (CW+1)'(FIRST_FREE);
      have_prev  <= 1'b0;
      first_char <= 1'b0;
    end else begin
      if (start) begin
        next_code <= (CW+1)'(FIRST_FREE);
        have_prev <= 1'b0;
      end
      if (take) begin
        cur_code  <= in_data;
        scan_addr <= kwk ? prev_code : in_data;
      end
      if (state == CHK_CODE) begin
        if (code_ram_dout_gt2) scan_addr  <= code_ram_dout;
        else                   first_char <= is_root ? scan_addr[0] : code_ram_dout[0];
        // With a full dictionary ADD_TABLE is skipped; keep the history anyway.
        if (!code_ram_dout_gt2 && decode_ram_full) prev_code <= cur_code;
      end
      if (state == ADD_TABLE) begin
        if (have_prev) next_code <= next_code + 1'b1;
        prev_code <= cur_code;
        have_prev <= 1'b1;
      end
    end
  end

  // The first code of a stream must be a root, and no code may point past
  // the entry being built.
  a_first_is_root: assert property (@(posedge clk) disable iff (!rst_n)
    (take && !have_prev) |-> (in_data <= CW'(1)));
  a_code_defined: assert property (@(posedge clk) disable iff (!rst_n)
    (take && have_prev && !decode_ram_full) |-> ((CW+1)'(in_data) <= next_code));

endmodule
