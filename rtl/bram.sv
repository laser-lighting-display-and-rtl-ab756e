// bram: single-port synchronous block RAM.
//
// One address port shared by read and write. The word at `addr` appears on
// `dout` one clock after the address is presented. When `we` is high the
// input word is written and the same word is returned on the next cycle
// (write-first). The trace loop uses it as 128 x 25 bits (X, Y, laser); the
// scanner uses it as 512K x 1 bit to hold one noise-reduced frame.
// Contents are not initialised; the users clear or overwrite what they read.
module bram #(
  parameter int unsigned LOGSIZE = 7,
  parameter int unsigned WIDTH   = 25
) (
  input  logic               clk,
  input  logic [LOGSIZE-1:0] addr,
  input  logic               we,
  input  logic [WIDTH-1:0]   din,
  output logic [WIDTH-1:0]   dout
);

  logic [WIDTH-1:0] mem [2**LOGSIZE];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= din;
      dout      <= din;
    end else begin
      dout <= mem[addr];
    end
  end

endmodule
