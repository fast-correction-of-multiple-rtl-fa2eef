// cache_pkg: sizes and helper functions shared by the cache blocks.
// The default geometry is the evaluated configuration: a 32 KB, 32-way
// set-associative cache with 32-byte lines and a 24-bit tag, which gives
// 32 sets and 1024 CAM tag words. The CPU word width, the number of MSHR
// entries and the address split (24-bit tag + 5-bit set + 5-bit offset =
// 34-bit byte address) are this design's own choices.
package cache_pkg;
  parameter int SETS         = 32;
  parameter int WAYS         = 32;
  parameter int TAG_W        = 24;
  parameter int LINE_BYTES   = 32;
  parameter int WORD_W       = 32;
  parameter int MSHR_ENTRIES = 8;

  // Number of check bits of a single-error-correcting Hamming code
  // protecting k data bits: the smallest r with 2**r >= k + r + 1.
  function automatic int hamming_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Codeword position (1-based, powers of two are check bits) of data bit i.
  function automatic int hamming_pos(input int i);
    int pos, cnt;
    pos = 0;
    cnt = -1;
    while (cnt < i) begin
      pos++;
      if ((pos & (pos - 1)) != 0) cnt++;
    end
    return pos;
  endfunction

  // Data-bit mask of Hamming check bit j for k data bits: bit i is set
  // when data bit i takes part in check bit j.
  function automatic logic [255:0] hamming_mask(input int k, input int j);
    logic [255:0] m;
    m = '0;
    for (int i = 0; i < k; i++)
      if (((hamming_pos(i) >> j) & 1) == 1) m[i] = 1'b1;
    return m;
  endfunction

  // States of the background correction engine (named after the stages
  // of the correction timeline: read, write, propagate).
  typedef enum logic [1:0] {
    C_IDLE = 2'd0,   // waiting for a group address from the encoder
    C_RD   = 2'd1,   // read tag word, compute its parity error and ECC fix
    C_WR   = 2'd2,   // write corrected word back and search the MSHR
    C_PROP = 2'd3    // let the parity chain and encoder settle again
  } corr_state_e;
endpackage
