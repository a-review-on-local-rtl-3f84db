// ecc_encoder: Hamming encoder, 32 data bits in, 39-bit codeword out.
//
// With ecc_en high the seven check bits CB0..CB6 are computed from data_in
// (see ecc_pkg for the participation of each data bit) and placed in the
// codeword at positions 1, 2, 4, 8, 16, 32 (CB0..CB5) and 0 (CB6); the data
// bits fill the remaining positions. With ecc_en low the data bits are placed
// the same way and all check bits are 0, as in the design's encoder example
// (data 0x7 gives 0x68 with ecc_en low and 0x69 with ecc_en high).
//
// Ports: data_in[31:0], ecc_en -> ecc_data_out[38:0]. Purely combinational,
// no clock and no latency. Names and widths follow the design's encoder
// symbol; the codeword layout follows its example values.
module ecc_encoder
  import ecc_pkg::*;
(
  input  data_t data_in,
  input  logic  ecc_en,
  output code_t ecc_data_out
);

  check_t cb;

  always_comb begin
    cb           = ecc_en ? calc_check(data_in) : '0;
    ecc_data_out = place_data(data_in);
    for (int unsigned k = 0; k < CHECK_W - 1; k++) ecc_data_out[1 << k] = cb[k];
    ecc_data_out[0] = cb[CHECK_W-1];
  end

endmodule
