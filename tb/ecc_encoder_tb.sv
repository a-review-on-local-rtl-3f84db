// ecc_encoder_tb: self-checking test of ecc_encoder.
// Checks the four encoder example values of the design (data 0x7 and 0xF with
// ecc_en low and high), one-hot data words, and random words against the
// table-based reference encoder. The encoder is combinational: outputs are
// checked 1 ns after the inputs change.
module ecc_encoder_tb;
  import ecc_ref_pkg::*;

  logic [31:0] data_in;
  logic        ecc_en;
  logic [38:0] ecc_data_out;
  int checks = 0, failures = 0;

  ecc_encoder dut (.data_in(data_in), .ecc_en(ecc_en), .ecc_data_out(ecc_data_out));

  task automatic check(input logic [31:0] d, input logic en, input logic [38:0] exp);
    data_in = d;
    ecc_en  = en;
    #1;
    checks++;
    if (ecc_data_out !== exp) begin
      failures++;
      $display("FAIL data=%h en=%b got=%h exp=%h", d, en, ecc_data_out, exp);
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
    check(32'h7, 1'b0, 39'h68);
    check(32'hF, 1'b0, 39'hE8);
    check(32'h7, 1'b1, 39'h69);
    check(32'hF, 1'b1, 39'hFE);
    for (int i = 0; i < 32; i++) begin
      check(32'd1 << i, 1'b1, ref_encode(32'd1 << i, 1'b1));
      check(32'd1 << i, 1'b0, ref_encode(32'd1 << i, 1'b0));
    end
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] d;
      logic        en;
      d  = $urandom;
      en = 1'($urandom);
      check(d, en, ref_encode(d, en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
