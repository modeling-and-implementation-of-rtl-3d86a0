// dual_port_ram: storage for the stacks of current results, CRW (words) and
// CRb (bits).
//
// The document gives a dual-port RAM whose port A is 128 words x 32 bits and
// port B is 4096 words x 1 bit. Both views cover 4096 bits, and the memory
// bit count reported for the Intel build (program memory 256 x 40 plus 4096)
// indicates one shared array, so here the two ports are two views of the same
// 4096 bits: bit n of port B is bit n[4:0] of word n[11:5] of port A.
//
// This design's choices: writes on the rising edge of the one clock (the
// document shows a clock per port), combinational reads so that an address
// set by the decoder gives its data in the same cycle, and no reset (contents
// are undefined until written, as in a block RAM). When both ports write the
// same bit in one cycle port B's value is kept; the decoder never does this.
module dual_port_ram #(
  parameter int unsigned A_AW = 7,   // 128 x 32-bit
  parameter int unsigned A_W  = 32,
  parameter int unsigned B_AW = 12   // 4096 x 1-bit
) (
  input  logic            clk,
  // port A: CRW stack
  input  logic [A_AW-1:0] porta_addr,
  input  logic [A_W-1:0]  porta_in,
  input  logic            porta_wren,
  output logic [A_W-1:0]  porta_out,
  // port B: CRb stack
  input  logic [B_AW-1:0] portb_addr,
  input  logic            portb_in,
  input  logic            portb_wren,
  output logic            portb_out
);
  localparam int unsigned SEL_W = $clog2(A_W);

  logic [A_W-1:0] mem [2**A_AW];

  logic [A_AW-1:0]  b_word;
  logic [SEL_W-1:0] b_bit;
  assign b_word = portb_addr[B_AW-1 -: A_AW];
  assign b_bit  = portb_addr[SEL_W-1:0];

  always_ff @(posedge clk) begin
    if (porta_wren) mem[porta_addr] <= porta_in;
    if (portb_wren) mem[b_word][b_bit] <= portb_in;
  end

  assign porta_out = mem[porta_addr];
  assign portb_out = mem[b_word][b_bit];

  initial assert (B_AW == A_AW + SEL_W)
    else $error("dual_port_ram: port B must address every bit of port A");
endmodule
