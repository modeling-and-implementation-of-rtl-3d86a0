// tb_operands_selector: self-checking test of the operands selector. Random
// instructions of every data type are presented with dec high or low; the
// testbench plays the M0_X/M1_X banks, the CRW/CRb read ports, the inputs
// and the ALU output registers, and checks the registered operands and
// selects, the bank write strobes with their address and data, and the
// output register Q0_X against its own decoding of the instruction.
module tb_operands_selector;
  import plc_pkg::*;
  logic        clk = 0, rst = 1, dec = 0;
  logic [39:0] ic = 0;
  logic [4:0]  op_sig_w = 0;
  logic [3:0]  op_sig_b = 0;
  logic [7:0]  i0_x = 0;
  logic [31:0] crw_x = 0, alu1_out = 0;
  logic        crb_x = 0, alu2_out = 0;
  logic [4:0]  m0_addr, m1_addr;
  logic        m0_rd, m0_we, m0_wd;
  logic [31:0] m1_rd, m1_wd;
  logic        m1_we;
  logic [31:0] alu1_in_1;
  logic        alu2_in_1;
  logic [4:0]  alu1_sel;
  logic [3:0]  alu2_sel;
  logic [7:0]  q0_x;

  logic        m0 [32];
  logic [31:0] m1 [32];
  logic [31:0] e_w, p_w;
  logic        e_b, p_b;
  logic [7:0]  e_q;
  logic [4:0]  p_sw;
  logic [3:0]  p_sb;
  int checks = 0, failures = 0;
  int n_st_w = 0, n_st_m0 = 0, n_st_q = 0;

  operands_selector dut (.*);

  assign m0_rd = m0[m0_addr];
  assign m1_rd = m1[m1_addr];

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ic=%h", what, ic); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0]  dt;
    logic [5:0]  opc;
    logic [31:0] sfx;
    logic        exp_m1_we, exp_m0_we;
    for (int i = 0; i < 32; i++) begin m0[i] = 1'($urandom); m1[i] = $urandom; end
    @(posedge clk); #1 rst = 0;
    chk(q0_x === 8'd0, "Q0 reset");
    e_q = 0; p_w = alu1_in_1; p_b = alu2_in_1; p_sw = alu1_sel; p_sb = alu2_sel;
    for (int i = 0; i < 5000; i++) begin
      dt = 2'($urandom);
      case ($urandom % 4)
        0: opc = 6'(W_ST_W);
        1: opc = OPC_BIT_BASE | 6'(B_ST);
        2: opc = 6'($urandom % 23);
        default: opc = 6'($urandom);
      endcase
      sfx = $urandom;
      ic = {dt, opc, sfx};
      dec = ($urandom % 4) != 0;
      op_sig_w = 5'($urandom); op_sig_b = 4'($urandom);
      i0_x = 8'($urandom); crw_x = $urandom; crb_x = 1'($urandom);
      alu1_out = $urandom; alu2_out = 1'($urandom);
      #1;
      // expected values from the testbench's own decoding
      case (dt)
        2'd1: e_w = crw_x;
        2'd2: e_w = m1[sfx[4:0]];
        default: e_w = sfx;
      endcase
      case (dt)
        2'd0: e_b = i0_x[sfx[2:0]];
        2'd1: e_b = m0[sfx[4:0]];
        2'd2: e_b = crb_x;
        default: e_b = e_q[sfx[2:0]];
      endcase
      exp_m1_we = dec && opc == 6'd20 && dt == 2'd2;
      exp_m0_we = dec && opc == 6'd39 && dt == 2'd1;
      chk(m1_we === exp_m1_we, "M1 write strobe");
      chk(m0_we === exp_m0_we, "M0 write strobe");
      if (exp_m1_we) begin
        chk(m1_addr === sfx[4:0] && m1_wd === alu1_out, "M1 store address/data");
        n_st_w++;
      end
      if (exp_m0_we) begin
        chk(m0_addr === sfx[4:0] && m0_wd === alu2_out, "M0 store address/data");
        n_st_m0++;
      end
      @(posedge clk);
      if (m1_we) m1[m1_addr] <= m1_wd;
      if (m0_we) m0[m0_addr] <= m0_wd;
      if (dec && opc == 6'd39 && dt == 2'd3) begin e_q[sfx[2:0]] = alu2_out; n_st_q++; end
      if (dec) begin p_w = e_w; p_b = e_b; p_sw = op_sig_w; p_sb = op_sig_b; end
      #1;
      chk(alu1_in_1 === p_w, "word operand");
      chk(alu2_in_1 === p_b, "bit operand");
      chk(alu1_sel === p_sw && alu2_sel === p_sb, "selects");
      chk(q0_x === e_q, "Q0 outputs");
    end
    chk(n_st_w > 0 && n_st_m0 > 0 && n_st_q > 0, "every store kind exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
