// mem_bank: general-purpose register bank used for M0_X (32 x 1 bit, memory
// bits) and M1_X (32 x 32 bit, memory words).
//
// The document gives the two sizes and that the operands selector reads them
// as operands and writes ALU results into them (ST / ST_W). This design's
// choices: combinational read, write on the rising clock edge, and all
// entries cleared by the synchronous reset so that a program reads defined
// values (a PLC marker area starts at zero).
module mem_bank #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data
);
  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign rd_data = regs[rd_addr];
endmodule
