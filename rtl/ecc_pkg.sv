// ecc_pkg: widths, codeword layout and Hamming helper functions shared by the
// ECC memory controller blocks.
//
// The code protects a 32-bit word with 7 check bits, giving a 39-bit codeword.
// Check bits CB0..CB5 are the classic Hamming parity bits: data bits are laid
// out at the codeword positions 1..38 that are not powers of two (data bit 0 at
// position 3, bit 1 at 5, bit 2 at 6, bit 3 at 7, bit 4 at 9, ... bit 31 at 38),
// and CBk is the XOR of every data bit whose position has bit k set. CBk itself
// sits at position 2^k. CB6 is the XOR of all 32 data bits and sits at position 0.
// This reproduces the participation table of the design (CB0..CB6 against data
// bits 0..31) and its encoder example values, e.g. data 0x0000000F encodes to
// codeword 0x00000000FE.
//
// The decoder syndrome uses the same layout: gen[6:1] is the Hamming syndrome
// (the position of a single flipped bit among positions 1..38) and gen[0] is
// the mismatch of the overall data parity.
package ecc_pkg;

  localparam int unsigned DATA_W  = 32;
  localparam int unsigned CHECK_W = 7;
  localparam int unsigned CODE_W  = DATA_W + CHECK_W;  // 39
  localparam int unsigned ADDR_W  = 4;                  // 16 words

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [CHECK_W-1:0] check_t;
  typedef logic [CODE_W-1:0]  code_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  // Error status reported by ecc_status (ind).
  typedef enum logic [1:0] {
    IND_NONE    = 2'b00,  // no error
    IND_SINGLE  = 2'b01,  // single-bit error detected and corrected
    IND_DOUBLE  = 2'b10,  // two-bit error detected, not corrected
    IND_INVALID = 2'b11   // syndrome that matches no single or double error
  } ind_t;

  // Forced-error diagnostic modes.
  typedef enum logic [1:0] {
    FORCE_NONE   = 2'b00,
    FORCE_SINGLE = 2'b01,
    FORCE_DOUBLE = 2'b10,
    FORCE_TRIPLE = 2'b11
  } force_t;

  // Codeword position (1..38) of data bit i (0..31): count up from i+1 and
  // step over each check-bit position 1, 2, 4, 8, 16, 32 already reached.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned pos;
    pos = i + 1;
    for (int unsigned k = 0; k < CHECK_W - 1; k++)
      if (pos >= (1 << k)) pos++;
    return pos;
  endfunction

  // Check bits CB6..CB0 of a data word.
  function automatic check_t calc_check(input data_t d);
    check_t cb;
    cb = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      for (int unsigned k = 0; k < CHECK_W - 1; k++)
        if (data_pos(i)[k]) cb[k] ^= d[i];
      cb[CHECK_W-1] ^= d[i];
    end
    return cb;
  endfunction

  // Data bits placed at their codeword positions; check-bit positions are 0.
  function automatic code_t place_data(input data_t d);
    code_t c;
    c = '0;
    for (int unsigned i = 0; i < DATA_W; i++) c[data_pos(i)] = d[i];
    return c;
  endfunction

  // Data bits taken from their codeword positions.
  function automatic data_t extract_data(input code_t c);
    data_t d;
    for (int unsigned i = 0; i < DATA_W; i++) d[i] = c[data_pos(i)];
    return d;
  endfunction

  // Check bits CB6..CB0 as stored in a codeword.
  function automatic check_t extract_check(input code_t c);
    check_t cb;
    for (int unsigned k = 0; k < CHECK_W - 1; k++) cb[k] = c[1 << k];
    cb[CHECK_W-1] = c[0];
    return cb;
  endfunction

endpackage
