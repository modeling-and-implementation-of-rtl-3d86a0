// tb_dual_port_ram: self-checking test of the CRW/CRb storage. Random word
// writes on port A and bit writes on port B are applied to a flat 4096-bit
// model; every read on either port, including bits written through the
// other port, must match it (bit n of port B is bit n%32 of word n/32).
module tb_dual_port_ram;
  logic        clk = 0;
  logic [6:0]  porta_addr = 0;
  logic [31:0] porta_in = 0, porta_out;
  logic        porta_wren = 0;
  logic [11:0] portb_addr = 0;
  logic        portb_in = 0, portb_wren = 0, portb_out;
  logic [4095:0] model;
  int checks = 0, failures = 0;

  dual_port_ram #(.A_AW(7), .A_W(32), .B_AW(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int i = 0; i < 128; i++) begin
      porta_wren = 1; porta_addr = 7'(i); porta_in = $urandom;
      model[i*32 +: 32] = porta_in;
      @(posedge clk); #1;
    end
    porta_wren = 0;
    for (int i = 0; i < 6000; i++) begin
      porta_addr = 7'($urandom); portb_addr = 12'($urandom);
      porta_wren = ($urandom % 4) == 0;
      portb_wren = ($urandom % 3) == 0;
      porta_in = $urandom; portb_in = 1'($urandom);
      if (porta_wren && portb_wren && (portb_addr[11:5] == porta_addr)) portb_wren = 0;
      #1;
      checks++;
      if (porta_out !== model[porta_addr*32 +: 32]) begin
        failures++; $display("FAIL A[%0d] %h vs %h", porta_addr, porta_out, model[porta_addr*32 +: 32]);
      end
      checks++;
      if (portb_out !== model[portb_addr]) begin
        failures++; $display("FAIL B[%0d] %b vs %b", portb_addr, portb_out, model[portb_addr]);
      end
      @(posedge clk);
      if (porta_wren) model[porta_addr*32 +: 32] = porta_in;
      if (portb_wren) model[portb_addr] = portb_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
