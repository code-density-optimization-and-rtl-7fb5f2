// lzw_ref_pkg: reference LZW compressor used by the testbenches.
//
// It plays the role of the offline compressor: it turns a bit string into the
// code stream the decompressor expects. Alphabet {0,1}; codes 0 and 1 are the
// roots, code 2 is never used, new entries are numbered from 3 and the
// dictionary stops growing when all codes of the chosen width are used
// (256 for 8-bit codes). Because the alphabet has two
// letters, every code has at most two extensions, kept in child[code][bit].
package lzw_ref_pkg;

  typedef bit          bitq_t[$];
  typedef int unsigned codeq_t[$];

  // Compress `bits` with a dictionary of dict_size codes (2**code width);
  // kwk counts the codes that name the entry the decoder is about to create
  // (the "string + own first bit" case).
  function automatic void compress(input bitq_t bits, output codeq_t codes,
                                   output int kwk, input int dict_size = 256);
    int child [][2];
    int w, nxt, dec_next;
    codes = {};
    kwk   = 0;
    if (bits.size() == 0) return;
    child = new[dict_size];
    foreach (child[i]) begin child[i][0] = 0; child[i][1] = 0; end
    nxt = 3;
    w   = int'(bits[0]);
    for (int i = 1; i < bits.size(); i++) begin
      int b = int'(bits[i]);
      if (child[w][b] != 0) begin
        w = child[w][b];
      end else begin
        codes.push_back(w);
        if (nxt < dict_size) begin
          child[w][b] = nxt;
          nxt++;
        end
        w = b;
      end
    end
    codes.push_back(w);
    // The decoder adds its k-th entry when it receives code k+1 (k from 0).
    for (int k = 1; k < codes.size(); k++) begin
      dec_next = 3 + k - 1;
      if (dec_next < dict_size && int'(codes[k]) == dec_next) kwk++;
    end
  endfunction

  // Pack a bit string into 32-bit words, first bit in bit 31, zero padded.
  function automatic void pack(input bitq_t bits, output int unsigned words[$]);
    int unsigned w;
    words = {};
    w = 0;
    for (int i = 0; i < bits.size(); i++) begin
      w[31 - (i % 32)] = bits[i];
      if ((i % 32) == 31 || i == bits.size() - 1) begin
        words.push_back(w);
        w = 0;
      end
    end
  endfunction

  // Random bits, or runs of a repeated 32-bit pattern (program-like data).
  function automatic bitq_t random_bits(int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(bit'($urandom_range(1)));
    return q;
  endfunction

  function automatic bitq_t pattern_bits(int n, int unsigned pat);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(pat[31 - (i % 32)]);
    return q;
  endfunction

  // Synthetic program-like data: nwords 32-bit words drawn from a pool of
  // `pool` instruction-like words, with runs of repeated short sequences as loops
  // and copies produce. A fixed linear congruential generator keeps it the
  // same for every caller with the same seed.
  function automatic bitq_t program_bits(int nwords, int pool, int unsigned seed);
    bitq_t q;
    int unsigned lcg = seed;
    int unsigned words[];
    int unsigned prog[$];
    words = new[pool];
    // Pool words look like 32-bit RISC instructions: one of eight top bytes
    // (condition + opcode), random register fields, small immediates.
    foreach (words[i]) begin
      lcg = lcg * 1664525 + 1013904223;
      words[i] = {8'hE0 | {5'b0, lcg[31:29]}, lcg[15:0] & 16'h77FF, 8'(lcg[27:22])};
    end
    while (prog.size() < nwords) begin
      lcg = lcg * 1664525 + 1013904223;
      if (lcg[31:30] == 2'b00 && prog.size() > 16) begin
        int len, from;
        int unsigned w;
        len  = 2 + int'(lcg[7:3]) % 12;
        from = int'(lcg[23:8]) % (prog.size() - len + 1);
        for (int k = 0; k < len && prog.size() < nwords; k++) begin
          w = prog[from + k];
          prog.push_back(w);
        end
      end else begin
        int idx;
        int unsigned w;
        idx = int'(lcg[29:12]) % pool;
        w   = words[idx];
        prog.push_back(w);
      end
    end
    foreach (prog[i]) begin
      int unsigned w = prog[i];
      for (int b = 31; b >= 0; b--) q.push_back(w[b]);
    end
    return q;
  endfunction

endpackage
