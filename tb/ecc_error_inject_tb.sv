// ecc_error_inject_tb: self-checking test of ecc_error_inject.
// Drives random codewords and random force_error modes and checks, each cycle,
// that code_in XOR code_out has exactly 0/1/2/3 adjacent set bits (wrapping
// from bit 38 to bit 0) starting at the position of a reference counter that
// resets to 0 and steps once per rising edge while a mode is active. Also
// checks that the position does not move while force_error is 00.
module ecc_error_inject_tb;

  logic        clk = 0;
  logic        rst;
  logic [1:0]  force_error;
  logic [38:0] code_in, code_out, exp_mask;
  logic [5:0]  err_pos;
  int          ref_pos;
  int checks = 0, failures = 0;
  int cycles = 0;

  ecc_error_inject dut (.clk(clk), .rst(rst), .force_error(force_error),
                        .code_in(code_in), .code_out(code_out), .err_pos(err_pos));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst         = 1;
    force_error = 2'b00;
    code_in     = '0;
    ref_pos     = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      force_error = 2'($urandom);
      if (n < 100) force_error = 2'b01;  // walk a full lap in single mode first
      code_in     = {7'($urandom), 32'($urandom)};
      #1;
      exp_mask = '0;
      for (int k = 0; k < int'(force_error); k++) exp_mask[(ref_pos + k) % 39] = 1'b1;
      checks++;
      if ((code_in ^ code_out) !== exp_mask || err_pos !== 6'(ref_pos)) begin
        failures++;
        $display("FAIL mode=%b pos=%0d/%0d mask=%h exp=%h", force_error, err_pos, ref_pos,
                 code_in ^ code_out, exp_mask);
      end
      @(posedge clk);
      if (force_error != 2'b00) ref_pos = (ref_pos + 1) % 39;
      #1;
    end
    // Reset puts the position back to 0.
    force_error = 2'b01;
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    checks++;
    if (err_pos !== 6'd0) begin
      failures++;
      $display("FAIL reset position %0d", err_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
