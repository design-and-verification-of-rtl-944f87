// Testbench of read_back_ctrl with a behavioural ADC: multiplexer selects
// for each channel, the settling delay before the start-of-conversion pulse,
// the stored result, the busy bit and the rule that a convert command issued
// during a conversion is ignored.
module tb_read_back_ctrl;
  localparam int SETTLE = 20, RC = 3;
  logic clk = 0, reset_n = 0;
  logic board_sel_sig_n = 1, write_n = 1;
  logic [3:1] vme_addr = 0;
  logic [15:0] data_from_bus = 0, adc_data, data_out;
  logic adc_busy_n, adc_rc_n, busy;
  logic [1:0] mux_1_sel; logic [2:0] mux_2_sel;
  int conv_count, checks = 0, failures = 0, ignored = 0;
  time t_cmd, t_rc;

  read_back_ctrl #(.SETTLE_CYCLES(SETTLE), .RC_PULSE(RC)) dut (.*);
  adc_model adc (.adc_rc_n, .mux_1_sel, .mux_2_sel, .adc_busy_n, .adc_data, .conv_count);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge adc_rc_n) if (reset_n) begin
    t_rc = $time;
    // command seen at the first clock after select; SETTLE+1 clocks to SOC
    check(t_rc - t_cmd == 5 + 10 * (SETTLE + 1), $sformatf("settle time %0t", t_rc - t_cmd));
  end
  always @(posedge adc_rc_n) if (reset_n)
    check($time - t_rc == 10 * RC, "R/C* pulse width");

  task automatic access(input logic wr, input logic [2:0] a, input logic [15:0] d);
    @(negedge clk);
    write_n = !wr; vme_addr = a; data_from_bus = d; board_sel_sig_n = 0;
    repeat (3) @(negedge clk);
    board_sel_sig_n = 1; write_n = 1;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); reset_n = 1;
    for (int i = 0; i < 24; i++) begin
      logic [2:0] ch; logic [15:0] exp; int c0;
      ch = 3'(i);
      c0 = conv_count;
      @(negedge clk); t_cmd = $time; #0;
      write_n = 0; vme_addr = 3'b100; data_from_bus = {13'($urandom), ch}; board_sel_sig_n = 0;
      repeat (3) @(negedge clk);
      board_sel_sig_n = 1; write_n = 1;
      check(busy, "busy after command");
      check(mux_1_sel == ch[1:0] && mux_2_sel == ch, $sformatf("mux selects for ch %0d", ch));
      // second command while busy: ignored
      access(1, 3'b100, 16'(ch + 3'd1));
      check(mux_2_sel == ch, "command while busy ignored");
      ignored++;
      // another register address does nothing
      access(1, 3'b101, 16'h0007);
      wait (!busy);
      exp = 16'h0C00 + 16'h0111 * 16'(ch) + 16'h0010 * 16'(ch[1:0]) + 16'(c0);
      check(conv_count == c0 + 1, "one conversion per command");
      check(data_out == exp, $sformatf("result %h exp %h", data_out, exp));
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
