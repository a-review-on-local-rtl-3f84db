// topmodel: local memory bus controller with Hamming SEC-DED style ECC.
//
// Write path: data_in -> ecc_encoder -> ecc_error_inject -> Memory39, written
// at wr_addr on the rising edge when wr_en is high. Read path: Memory39 (read
// registered on the rising edge when rd_en is high) -> ecc_decoder ->
// ecc_status -> data_out, ind. Read data and status are valid one cycle after
// rd_en/rd_addr are sampled and stay until the next read. ecc_en switches the
// check-bit generation on writes and the checking and correction on reads.
// ind: 00 no error, 01 single error corrected, 10 double error detected,
// 11 invalid syndrome. force_error (00 off, 01/10/11 one/two/three flipped
// bits) corrupts the codeword being written, to exercise the checker.
//
// The four blocks, their chaining and the top-level names follow the design's
// top-level diagram; the force_error port is added because the controller is
// required to handle forced errors, and err_pos is brought out for observing it.
module topmodel
  import ecc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  addr_t       wr_addr,
  input  logic        rd_en,
  input  addr_t       rd_addr,
  input  data_t       data_in,
  input  logic        ecc_en,
  input  logic [1:0]  force_error,
  output data_t       data_out,
  output logic [1:0]  ind,
  output logic [5:0]  err_pos
);

  code_t  encoder_out;
  code_t  mem_in;
  code_t  dec_in;
  data_t  sts_in;
  check_t gen;

  ecc_encoder u1 (
    .data_in      (data_in),
    .ecc_en       (ecc_en),
    .ecc_data_out (encoder_out)
  );

  ecc_error_inject u5 (
    .clk         (clk),
    .rst         (rst),
    .force_error (force_error),
    .code_in     (encoder_out),
    .code_out    (mem_in),
    .err_pos     (err_pos)
  );

  Memory39 #(.WIDTH(CODE_W), .ADDR_W(ADDR_W)) u2 (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (wr_en),
    .wr_addrs (wr_addr),
    .rd_en    (rd_en),
    .rd_addrs (rd_addr),
    .data_in  (mem_in),
    .data_out (dec_in)
  );

  ecc_decoder u3 (
    .dec_in  (dec_in),
    .ecc_en  (ecc_en),
    .dec_out (sts_in),
    .gen     (gen)
  );

  ecc_status u4 (
    .sts_in  (sts_in),
    .gen     (gen),
    .ecc_en  (ecc_en),
    .sts_out (data_out),
    .ind     (ind)
  );

endmodule
