// command_counter: descending counter that sets how many clock cycles the
// execution state of an instruction lasts.
//
// The document gives its role (a down-counter, loaded through WR_CC when
// WR_CC_en is set in the initialization state, read back as VAL_CC) and its
// 3-bit width. This design's choices: it decrements on every cycle in which
// `exe` is high and it is not already zero, it saturates at zero, and it
// resets to zero. The decoder leaves the execution state in the cycle where
// VAL_CC reads 0, so a load of N gives N+1 execution cycles.
module command_counter #(
  parameter int unsigned CC_W = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            wr_cc_en, // load enable (initialization state)
  input  logic [CC_W-1:0] wr_cc,    // execution cycles minus one
  input  logic            exe,      // count down during the execution state
  output logic [CC_W-1:0] val_cc    // current count
);
  always_ff @(posedge clk) begin
    if (rst)                       val_cc <= '0;
    else if (wr_cc_en)             val_cc <= wr_cc;
    else if (exe && val_cc != '0)  val_cc <= val_cc - 1'b1;
  end
endmodule
