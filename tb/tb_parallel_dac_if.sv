// Testbench of parallel_dac_if: every DAC load is captured at the rising
// edge of dac_wr_n (where the DAC takes it) and compared with the VME write
// that caused it; pulse width, setup time, ignored addresses and the clear
// output at reset are checked.
module tb_parallel_dac_if;
  localparam int SETUP = 2, PULSE = 3;
  logic clk = 0, reset_n = 0;
  logic board_sel_sig_n = 1, write_n = 1;
  logic [3:1] vme_addr = 0;
  logic [13:0] vme_data = 0, dac_data;
  logic [1:0] dac_addr;
  logic dac_wr_n, dac_clr_n;
  int checks = 0, failures = 0, loads = 0, exp_loads = 0;
  logic [1:0] exp_addr; logic [13:0] exp_data;
  time t_sel, t_fall;

  parallel_dac_if #(.WR_SETUP(SETUP), .WR_PULSE(PULSE)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask


  always @(posedge dac_wr_n) if (reset_n) begin
    loads++;
    check(dac_addr == exp_addr && dac_data == exp_data, $sformatf("load ch%0d %h", dac_addr, dac_data));
    check($time - t_fall == 10 * PULSE, $sformatf("WR* width %0t", $time - t_fall));
  end

  always @(negedge dac_wr_n) if (reset_n) begin
    t_fall = $time;
    check(t_fall - t_sel == 5 + 10 * SETUP, $sformatf("setup %0t", t_fall - t_sel));
  end

  task automatic access(input logic wr, input logic [2:0] a, input logic [13:0] d);
    @(negedge clk);
    write_n = !wr; vme_addr = a; vme_data = d; board_sel_sig_n = 0; t_sel = $time;
    if (wr && !a[2]) begin exp_addr = a[1:0]; exp_data = d; exp_loads++; end
    @(negedge clk); vme_data = 14'($urandom);
    repeat (SETUP + PULSE + 2) @(negedge clk);
    board_sel_sig_n = 1; write_n = 1;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(!dac_clr_n, "clear during reset");
    reset_n = 1;
    @(posedge clk); #1;
    check(dac_clr_n, "clear released");
    for (int ch = 0; ch < 4; ch++) access(1, 3'(ch), 14'h3FFF - 14'(ch));
    for (int i = 0; i < 200; i++) access($urandom % 2, 3'($urandom), 14'($urandom));
    check(loads == exp_loads, $sformatf("loads %0d exp %0d", loads, exp_loads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
