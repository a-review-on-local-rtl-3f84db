// Memory39: 16 x 39-bit codeword memory with separate write and read ports.
//
// A write stores data_in at wr_addrs on the rising clock edge when wr_en is
// high. A read, when rd_en is high, loads the word at rd_addrs into the data_out
// register on the rising clock edge, so read data appears one cycle after the
// request and is held while rd_en is low. While rst is high every word and
// data_out are cleared on each clock edge and reads and writes are ignored.
// A read and a write of the same address in the same cycle return the old word.
//
// The port names, the 4-bit addresses, the 39-bit width and the 16 words follow
// the design; the synchronous reset, the registered read and the
// read-before-write order are this design's choices.
module Memory39 #(
  parameter int unsigned WIDTH  = 39,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addrs,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addrs,
  input  logic [WIDTH-1:0]  data_in,
  output logic [WIDTH-1:0]  data_out
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
      data_out <= '0;
    end else begin
      if (wr_en) mem[wr_addrs] <= data_in;
      if (rd_en) data_out <= mem[rd_addrs];
    end
  end

endmodule
