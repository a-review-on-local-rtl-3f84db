// topmodel_tb: end-to-end test of the ECC memory controller at its default size.
//
// Part 1 replays the design's controller example: data 0x7 is written clean to
// address 0, with a forced single error on codeword bit 3 to address 1 (stored
// word 0x61) and with a forced double error to address 2 (stored word 0x09); reading them back
// with ecc_en high must give 0x7/ind 00, 0x7/ind 01 (corrected) and a detected
// double error (ind 10). The double error flips codeword bits 5 and 6 (data
// bits 1 and 2).
// Part 1 also places the reference word 0x41 (bits 3 and 5 flipped) in address
// 3 directly and expects raw data 0x4 with ind 10.
// Part 2 runs random writes, reads, ecc_en changes, forced-error modes and
// resets against a model of the stored codewords and the injector position.
// Read data is checked exactly one clock after the read is sampled. Every word
// written with ecc_en high and at most one forced flip on a data or CB6 bit
// must read back as the original data. Each mechanism (clean read, correction,
// double detection, invalid syndrome, ECC off, each forced-error mode, reset,
// read hold) is counted and a failure is counted for one that never happened.
module topmodel_tb;
  import ecc_ref_pkg::*;

  logic        clk = 0;
  logic        rst, wr_en, rd_en, ecc_en;
  logic [3:0]  wr_addr, rd_addr;
  logic [31:0] data_in, data_out;
  logic [1:0]  force_error, ind;
  logic [5:0]  err_pos;

  topmodel dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_addr(wr_addr), .rd_en(rd_en),
                .rd_addr(rd_addr), .data_in(data_in), .ecc_en(ecc_en),
                .force_error(force_error), .data_out(data_out), .ind(ind), .err_pos(err_pos));

  // Model state.
  logic [38:0] mem_m  [16];
  logic [31:0] orig_m [16];   // data as written
  logic        good_m [16];   // written with ECC and at most one flip on a correctable bit
  logic [38:0] rd_word;
  logic [31:0] rd_orig;
  logic        rd_good;
  int          pos_m;

  int checks = 0, failures = 0, cycles = 0;
  int n_clean = 0, n_single = 0, n_double = 0, n_invalid = 0, n_off = 0;
  int n_f1 = 0, n_f2 = 0, n_f3 = 0, n_reset = 0, n_hold = 0, n_restored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // One clock cycle with the given inputs; checks the outputs after the edge.
  task automatic cycle(input logic r, input logic we, input logic [3:0] wa, input logic [31:0] wd,
                       input logic re, input logic [3:0] ra, input logic en, input logic [1:0] fe);
    logic [38:0] mask;
    logic [33:0] e;
    rst = r; wr_en = we; wr_addr = wa; data_in = wd; rd_en = re; rd_addr = ra;
    ecc_en = en; force_error = fe;
    mask = '0;
    for (int k = 0; k < int'(fe); k++) mask[(pos_m + k) % 39] = 1'b1;
    @(posedge clk);
    if (r) begin
      foreach (mem_m[i]) begin
        mem_m[i] = '0; orig_m[i] = '0; good_m[i] = 1'b1;
      end
      rd_word = '0; rd_orig = '0; rd_good = 1'b1;
      pos_m   = 0;
      n_reset++;
    end else begin
      if (re) begin
        rd_word = mem_m[ra]; rd_orig = orig_m[ra]; rd_good = good_m[ra];
      end else begin
        n_hold++;
      end
      if (we) begin
        mem_m[wa]  = ref_encode(wd, en) ^ mask;
        orig_m[wa] = wd;
        good_m[wa] = en && (fe == 2'b00 || (fe == 2'b01 && (pos_m == 0 || ref_index(pos_m) >= 0)));
        case (fe)
          2'b01: n_f1++;
          2'b10: n_f2++;
          2'b11: n_f3++;
          default: ;
        endcase
      end
      if (fe != 2'b00) pos_m = (pos_m + 1) % 39;
    end
    #1;
    e = ref_status(ref_data(rd_word), ref_gen(rd_word, en), en);
    checks++;
    if (data_out !== e[33:2] || ind !== e[1:0])
      fail($sformatf("read got %h/%b exp %h/%b", data_out, ind, e[33:2], e[1:0]));
    if (en && rd_good) begin
      checks++;
      if (data_out !== rd_orig || ind == 2'b10 || ind == 2'b11)
        fail($sformatf("correctable word not restored: %h exp %h ind %b", data_out, rd_orig, ind));
      else if (re && !r) n_restored++;
    end
    checks++;
    if (err_pos !== 6'(pos_m)) fail($sformatf("err_pos %0d exp %0d", err_pos, pos_m));
    if (re && !r) begin
      if (!en)                n_off++;
      else if (ind == 2'b00)  n_clean++;
      else if (ind == 2'b01)  n_single++;
      else if (ind == 2'b10)  n_double++;
      else                    n_invalid++;
    end
  endtask

  task automatic expect_read(input logic [31:0] d, input logic [1:0] i, input string what);
    checks++;
    if (data_out !== d || ind !== i)
      fail($sformatf("%s: got %h/%b exp %h/%b", what, data_out, ind, d, i));
  endtask

  task automatic count(input int n, input string what);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
    $display("  %-22s %0d", what, n);
  endtask

  initial begin
    pos_m = 0;
    cycle(1, 0, 0, 0, 0, 0, 1, 2'b00);
    cycle(1, 0, 0, 0, 0, 0, 1, 2'b00);
    // Part 1: the controller example.
    cycle(0, 1, 0, 32'h7, 0, 0, 1, 2'b00);            // address 0: clean 0x69
    repeat (3) cycle(0, 0, 0, 0, 0, 0, 1, 2'b01);      // walk the error position to 3
    cycle(0, 1, 1, 32'h7, 0, 0, 1, 2'b01);            // address 1: bit 3 flipped -> 0x61
    cycle(0, 0, 0, 0, 0, 0, 1, 2'b01);                // error position 4 -> 5
    cycle(0, 1, 2, 32'h7, 0, 0, 1, 2'b10);            // address 2: bits 5,6 flipped -> 0x09
    checks++;
    if (dut.u2.mem[1] !== 39'h61) fail($sformatf("stored word %h exp 61", dut.u2.mem[1]));
    checks++;
    if (dut.u2.mem[2] !== 39'h09) fail($sformatf("stored word %h exp 09", dut.u2.mem[2]));
    cycle(0, 0, 0, 0, 1, 0, 1, 2'b00);
    expect_read(32'h7, 2'b00, "example address 0");
    cycle(0, 0, 0, 0, 1, 1, 1, 2'b00);
    expect_read(32'h7, 2'b01, "example address 1");
    cycle(0, 0, 0, 0, 1, 2, 1, 2'b00);
    checks++;
    if (ind !== 2'b10) fail("example address 2: double error not flagged");
    // The reference word 0x41 (bits 3 and 5 flipped) is not adjacent, so it is
    // placed in the memory directly: it must read as raw data 0x4 with ind 10.
    @(negedge clk);
    dut.u2.mem[3] = 39'h41;
    mem_m[3] = 39'h41; orig_m[3] = 32'h7; good_m[3] = 1'b0;
    cycle(0, 0, 0, 0, 1, 3, 1, 2'b00);
    expect_read(32'h4, 2'b10, "reference word 0x41");
    // Part 2: random traffic.
    for (int n = 0; n < 20000; n++) begin
      logic [1:0] fe;
      fe = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b00;
      cycle(($urandom_range(0, 999) == 0), 1'($urandom), 4'($urandom), $urandom,
            ($urandom_range(0, 3) != 0), 4'($urandom), ($urandom_range(0, 7) != 0), fe);
    end
    $display("mechanism counts:");
    count(n_clean,    "clean read");
    count(n_single,   "single corrected");
    count(n_restored, "word restored");
    count(n_double,   "double detected");
    count(n_invalid,  "invalid syndrome");
    count(n_off,      "read with ecc off");
    count(n_f1,       "forced single");
    count(n_f2,       "forced double");
    count(n_f3,       "forced triple");
    count(n_reset,    "reset");
    count(n_hold,     "read hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
