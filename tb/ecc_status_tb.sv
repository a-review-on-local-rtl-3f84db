// ecc_status_tb: self-checking test of ecc_status.
// Feeds the block with the raw data and syndrome of clean codewords hit by
// 0, 1, 2 or 3 random bit flips and compares with the reference status rule.
// Independently of that rule it also checks the end-to-end promises: every
// single data-bit or CB6 flip is restored to the original word with ind 01,
// every two-bit flip inside the data is reported as 10, and ecc_en low passes
// the data through with ind 00. Counts how often each ind value occurred and
// fails if one never did.
module ecc_status_tb;
  import ecc_ref_pkg::*;

  logic [31:0] sts_in, sts_out;
  logic [6:0]  gen;
  logic        ecc_en;
  logic [1:0]  ind;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  ecc_status dut (.sts_in(sts_in), .gen(gen), .ecc_en(ecc_en), .sts_out(sts_out), .ind(ind));

  task automatic apply(input logic [38:0] c, input logic en);
    sts_in = ref_data(c);
    gen    = ref_gen(c, en);
    ecc_en = en;
    #1;
    seen[ind]++;
  endtask

  task automatic expect_out(input logic [31:0] exp_d, input logic [1:0] exp_i, input string what);
    checks++;
    if (sts_out !== exp_d || ind !== exp_i) begin
      failures++;
      $display("FAIL %s: got %h/%b exp %h/%b", what, sts_out, ind, exp_d, exp_i);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [31:0] d;
      logic [38:0] c;
      d = $urandom;
      c = ref_encode(d, 1'b1);
      apply(c, 1'b1);
      expect_out(d, 2'b00, "clean");
      for (int i = 0; i < 32; i++) begin
        apply(c ^ (39'd1 << POS[i]), 1'b1);
        expect_out(d, 2'b01, "single data flip");
      end
      apply(c ^ 39'd1, 1'b1);
      expect_out(d, 2'b01, "CB6 flip");
      begin
        int a, b;
        a = $urandom_range(0, 31);
        b = (a + 1 + $urandom_range(0, 30)) % 32;
        apply(c ^ (39'd1 << POS[a]) ^ (39'd1 << POS[b]), 1'b1);
        expect_out(ref_data(c ^ (39'd1 << POS[a]) ^ (39'd1 << POS[b])), 2'b10, "double data flip");
      end
      apply(c ^ (39'd1 << POS[5]), 1'b0);
      expect_out(ref_data(c ^ (39'd1 << POS[5])), 2'b00, "ecc off");
    end
    for (int n = 0; n < 3000; n++) begin
      logic [38:0] c;
      logic        en;
      logic [33:0] e;
      int          nerr;
      c    = ref_encode($urandom, 1'b1);
      en   = ($urandom_range(0, 9) != 0);
      nerr = $urandom_range(0, 3);
      for (int k = 0; k < nerr; k++) c[$urandom_range(0, 38)] ^= 1'b1;
      apply(c, en);
      e = ref_status(ref_data(c), ref_gen(c, en), en);
      expect_out(e[33:2], e[1:0], "random");
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL ind=%0d never produced", k);
      end
    end
    $display("ind counts: none=%0d single=%0d double=%0d invalid=%0d",
             seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
