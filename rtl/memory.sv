// memory: single-port word memory, used both as instruction and as data memory.
//
// One address bus, one input data bus for writes, one output data bus for
// reads, and a write enable: per cycle either a read or a write. The address
// is a byte address; the word at address[2 +: log2(WORDS)] is accessed and the
// two low bits and any bits above the array are ignored (word-aligned accesses
// only). DATAIN is written on the rising clock edge when WE is high. DATAOUT
// is read combinationally, so a single-cycle processor can fetch, or load,
// within the cycle. Port names and the one-access-per-cycle rule follow the
// description; the asynchronous read, the word addressing and the size
// (WORDS, not given) are this design's choices. Contents are not reset.
module memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned WORDS = 1024
) (
  input  logic             clk,
  input  logic             we,
  input  logic [31:0]      address,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dataout
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    idx;

  assign idx     = address[2 +: AW];
  assign dataout = mem[idx];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= datain;
  end

endmodule
