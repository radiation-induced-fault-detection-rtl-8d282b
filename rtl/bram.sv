// bram: block memory under test, WORDS x 32 bits (8 KB by default).
//
// A simple dual-port RAM: one synchronous write port and one synchronous read
// port, read data valid one clock after the address (read-before-write when
// both ports hit the same word). Written as an array so that synthesis maps
// it to the FPGA's block RAM, which is the memory whose bit flips are being
// looked for. The 8 KB size follows the document; the port arrangement is
// this design's choice.
module bram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
