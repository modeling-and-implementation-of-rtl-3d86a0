// program_memory: 256 x 40-bit instruction store of the Harvard architecture.
//
// The document gives the size (256 words of 40 bits) and that the program
// counter addresses it. Reading is combinational here (this design's
// choice): the instruction at `addr` is on `ic` in the same cycle, which is
// what the published simulation shows when the address changes. Writing is
// a synchronous port used to download a program before or while the core is
// held in reset; the document does not say how programs are loaded. An
// optional hex file given by INIT_FILE preloads the contents.
module program_memory #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned WIDTH     = 40,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,     // from the program counter
  output logic [WIDTH-1:0]         ic,       // instruction code IC
  input  logic                     wr_en,    // program download
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign ic = mem[addr];
endmodule
