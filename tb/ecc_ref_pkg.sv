// ecc_ref_pkg: reference model of the 32/39 Hamming code, used by the testbenches.
//
// Written independently of the RTL: the check bits come from the participation
// columns of the check-bit table, stored as one 32-bit mask per check bit
// (bit i set when data bit i participates), the data positions come from a
// literal list, and the syndrome is computed as the XOR of the positions of all
// set codeword bits rather than by re-encoding.
package ecc_ref_pkg;

  localparam logic [31:0] CB_MASK [7] = '{
    32'h56AA_AD5B,   // CB0
    32'h9B33_366D,   // CB1
    32'hE3C3_C78E,   // CB2
    32'h03FC_07F0,   // CB3
    32'h03FF_F800,   // CB4
    32'hFC00_0000,   // CB5
    32'hFFFF_FFFF    // CB6
  };

  localparam int POS [32] = '{
     3,  5,  6,  7,  9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21,
    22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 33, 34, 35, 36, 37, 38
  };

  localparam int CB_POS [7] = '{1, 2, 4, 8, 16, 32, 0};

  function automatic logic [38:0] ref_encode(input logic [31:0] d, input logic en);
    logic [38:0] c;
    c = '0;
    for (int i = 0; i < 32; i++) c[POS[i]] = d[i];
    if (en)
      for (int k = 0; k < 7; k++) c[CB_POS[k]] = ^(d & CB_MASK[k]);
    return c;
  endfunction

  function automatic logic [31:0] ref_data(input logic [38:0] c);
    logic [31:0] d;
    for (int i = 0; i < 32; i++) d[i] = c[POS[i]];
    return d;
  endfunction

  function automatic logic [6:0] ref_gen(input logic [38:0] c, input logic en);
    logic [5:0] s;
    s = '0;
    for (int p = 1; p < 39; p++) if (c[p]) s ^= 6'(p);
    if (!en) return '0;
    return {s, ^ref_data(c) ^ c[0]};
  endfunction

  // Index of the data bit at codeword position p, or -1.
  function automatic int ref_index(input int p);
    for (int i = 0; i < 32; i++) if (POS[i] == p) return i;
    return -1;
  endfunction

  // Expected {sts_out, ind} for raw data and syndrome.
  function automatic logic [33:0] ref_status(input logic [31:0] raw, input logic [6:0] gen,
                                             input logic en);
    int idx;
    if (!en || gen == '0) return {raw, 2'b00};
    if (!gen[0])          return {raw, 2'b10};
    if (gen[6:1] == '0)   return {raw, 2'b01};
    idx = ref_index(int'(gen[6:1]));
    if (idx >= 0)         return {raw ^ (32'd1 << idx), 2'b01};
    return {raw, 2'b11};
  endfunction

endpackage
