// survivor_memory: single-port RAM of decision vectors.
//
// One word of 2^(K-1) decision bits per trellis stage, DEPTH words (one frame).
// The path metric unit writes a word per stage; after the frame the traceback
// unit reads them back in reverse order through the same port, so writes and
// reads never overlap. Writes take effect at the clock edge; reads are
// synchronous (data one cycle after the address). The single-port
// organisation follows the design description's resource figures; the word
// layout and the read timing are own choices.
module survivor_memory #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
