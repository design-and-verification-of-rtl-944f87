// Testbench of sw_reset_gen: a write of any value to register 111 gives a
// card reset pulse of exactly RST_PULSE clocks; reads and writes to other
// registers give none; the power-on reset also drives the card reset.
module tb_sw_reset_gen;
  localparam int PULSE = 7;
  logic clk = 0, reset_n = 0;
  logic board_sel_sig_n = 1, write_n = 1;
  logic [3:1] vme_addr = 0;
  logic card_rst_n;
  int checks = 0, failures = 0, low_cycles = 0;

  sw_reset_gen #(.RST_PULSE(PULSE)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (reset_n && !card_rst_n) low_cycles <= low_cycles + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1; check(!card_rst_n, "card reset during power-on reset");
    repeat (2) @(posedge clk); reset_n = 1;
    repeat (2) @(negedge clk);
    check(card_rst_n, "card reset released");
    for (int i = 0; i < 100; i++) begin
      logic wr; logic [2:0] a;
      wr = $urandom % 2; a = (i % 3 == 0) ? 3'b111 : 3'($urandom);
      @(negedge clk); low_cycles = 0;
      write_n = !wr; vme_addr = a; board_sel_sig_n = 0;
      repeat (4) @(negedge clk);
      board_sel_sig_n = 1; write_n = 1;
      repeat (PULSE + 4) @(negedge clk);
      check(low_cycles == ((wr && a == 3'b111) ? PULSE : 0), $sformatf("pulse %0d cycles", low_cycles));
      check(card_rst_n, "released after pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
