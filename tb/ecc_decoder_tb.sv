// ecc_decoder_tb: self-checking test of ecc_decoder.
// Checks the decoder example values of the design (0x69, 0x61, 0x41 with
// ecc_en high and 0x69 with ecc_en low), then random clean codewords with 0..3
// random bit flips against the reference syndrome (XOR of set-bit positions).
module ecc_decoder_tb;
  import ecc_ref_pkg::*;

  logic [38:0] dec_in;
  logic        ecc_en;
  logic [31:0] dec_out;
  logic [6:0]  gen;
  int checks = 0, failures = 0;

  ecc_decoder dut (.dec_in(dec_in), .ecc_en(ecc_en), .dec_out(dec_out), .gen(gen));

  task automatic check(input logic [38:0] c, input logic en,
                       input logic [31:0] exp_d, input logic [6:0] exp_g);
    dec_in = c;
    ecc_en = en;
    #1;
    checks++;
    if (dec_out !== exp_d || gen !== exp_g) begin
      failures++;
      $display("FAIL in=%h en=%b got %h/%h exp %h/%h", c, en, dec_out, gen, exp_d, exp_g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(39'h69, 1'b0, 32'h7, 7'h00);
    check(39'h69, 1'b1, 32'h7, 7'h00);
    check(39'h61, 1'b1, 32'h6, 7'h07);
    check(39'h41, 1'b1, 32'h4, 7'h0C);
    // Every single flip of one codeword: data flips give {position, 1}.
    for (int p = 0; p < 39; p++) begin
      logic [38:0] c;
      c = ref_encode(32'hA5C3_1E77, 1'b1) ^ (39'd1 << p);
      check(c, 1'b1, ref_data(c), ref_gen(c, 1'b1));
    end
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] d;
      logic [38:0] c;
      logic        en;
      int          nerr;
      d    = $urandom;
      en   = 1'($urandom);
      c    = ref_encode(d, 1'b1);
      nerr = $urandom_range(0, 3);
      for (int e = 0; e < nerr; e++) c[$urandom_range(0, 38)] ^= 1'b1;
      check(c, en, ref_data(c), ref_gen(c, en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
