// Memory39_tb: self-checking test of Memory39 against an array model.
// Replays the design's memory example (words 0x69, 0x61, 0x41 at addresses
// 0..2 read back in order), then random writes and reads with random enables.
// Checks the one-cycle read latency, that data_out holds while rd_en is low,
// that a read of the address being written returns the old word, and that
// reset clears every word and ignores writes while it is high.
module Memory39_tb;

  logic        clk = 0;
  logic        rst, wr_en, rd_en;
  logic [3:0]  wr_addrs, rd_addrs;
  logic [38:0] data_in, data_out;
  logic [38:0] model [16];
  logic [38:0] exp_out;
  int checks = 0, failures = 0;
  int cycles = 0;

  Memory39 dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_addrs(wr_addrs), .rd_en(rd_en),
                .rd_addrs(rd_addrs), .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: apply the inputs, advance the model, check data_out after the edge.
  task automatic step(input logic r, input logic we, input logic [3:0] wa, input logic [38:0] wd,
                      input logic re, input logic [3:0] ra);
    rst = r; wr_en = we; wr_addrs = wa; data_in = wd; rd_en = re; rd_addrs = ra;
    @(posedge clk);
    if (r) begin
      foreach (model[i]) model[i] = '0;
      exp_out = '0;
    end else begin
      if (re) exp_out = model[ra];
      if (we) model[wa] = wd;
    end
    #1;
    checks++;
    if (data_out !== exp_out) begin
      failures++;
      $display("FAIL t=%0t data_out=%h exp=%h", $time, data_out, exp_out);
    end
  endtask

  initial begin
    step(1, 0, 0, 0, 0, 0);
    step(1, 1, 3, 39'h55, 1, 3);  // write during reset is ignored
    step(0, 1, 0, 39'h69, 0, 0);
    step(0, 1, 1, 39'h61, 0, 0);
    step(0, 1, 2, 39'h41, 0, 0);
    step(0, 0, 0, 0, 1, 0);
    step(0, 0, 0, 0, 1, 1);
    step(0, 0, 0, 0, 1, 2);
    step(0, 0, 0, 0, 0, 0);       // hold
    step(0, 0, 0, 0, 1, 3);       // untouched word reads 0
    step(0, 1, 5, 39'h1_2345_6789, 1, 5);  // old word on same-cycle read
    step(0, 0, 0, 0, 1, 5);
    for (int n = 0; n < 5000; n++) begin
      step(($urandom_range(0, 199) == 0), 1'($urandom), 4'($urandom), {7'($urandom), 32'($urandom)},
           1'($urandom), 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
