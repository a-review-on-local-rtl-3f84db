// ecc_decoder: splits a 39-bit codeword into its data and computes the syndrome.
//
// dec_out always carries the 32 data bits taken from their codeword positions,
// without correction; correction is done downstream by ecc_status. With ecc_en
// high, gen[6:0] is the syndrome: gen[6:1] = recomputed CB5..CB0 XOR stored
// CB5..CB0 (equal to the position of a single flipped bit among positions
// 1..38) and gen[0] = recomputed CB6 XOR stored CB6 (overall data parity
// mismatch). A clean codeword gives gen = 0. With ecc_en low the decoder does
// no checking and gen is 0.
//
// Example values of the design: 0x69 -> dec_out 7, gen 0x00; 0x61 (data bit 0
// flipped) -> dec_out 6, gen 0x07; 0x41 (data bits 0 and 1 flipped) -> dec_out
// 4, gen 0x0C.
//
// Ports: dec_in[38:0], ecc_en -> dec_out[31:0], gen[6:0]. Combinational.
module ecc_decoder
  import ecc_pkg::*;
(
  input  code_t  dec_in,
  input  logic   ecc_en,
  output data_t  dec_out,
  output check_t gen
);

  check_t diff;

  always_comb begin
    dec_out = extract_data(dec_in);
    diff    = calc_check(dec_out) ^ extract_check(dec_in);
    if (ecc_en) gen = {diff[CHECK_W-2:0], diff[CHECK_W-1]};
    else        gen = '0;
  end

endmodule
