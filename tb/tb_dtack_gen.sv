// Testbench of dtack_gen: DTACK* assertion latency, hold until select
// release, rescinding drive time, and an abandoned cycle, for two settings
// of the delays.
module tb_dtack_gen;
  localparam int D1 = 2, R1 = 3;
  logic clk = 0, reset_n = 0;
  logic sel_a = 1, sel_b = 1;
  logic dtack_n_a, dtack_oe_a, dtack_n_b, dtack_oe_b;
  int checks = 0, failures = 0;

  dtack_gen #(.DTACK_DELAY(D1), .RESCIND_CYCLES(R1)) dut_a (
    .clk, .reset_n, .board_sel_sig_n(sel_a), .dtack_n(dtack_n_a), .dtack_oe(dtack_oe_a));
  dtack_gen dut_b (
    .clk, .reset_n, .board_sel_sig_n(sel_b), .dtack_n(dtack_n_b), .dtack_oe(dtack_oe_b));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One selected cycle on instance a (b when use_b); measures the latencies.
  task automatic cycle(input bit use_b, input int dly, input int resc, input int hold);
    int n;
    @(negedge clk);
    if (use_b) sel_b = 0; else sel_a = 0;
    n = 0;
    while ((use_b ? dtack_n_b : dtack_n_a) && n < 50) begin @(negedge clk); n++; end
    check(n == dly + 1, $sformatf("assert latency %0d, expected %0d", n, dly + 1));
    repeat (hold) begin
      @(negedge clk);
      check(!(use_b ? dtack_n_b : dtack_n_a) && (use_b ? dtack_oe_b : dtack_oe_a), "DTACK* held");
    end
    if (use_b) sel_b = 1; else sel_a = 1;
    @(negedge clk);
    check((use_b ? dtack_n_b : dtack_n_a), "DTACK* high one clock after release");
    n = 0;
    while ((use_b ? dtack_oe_b : dtack_oe_a) && n < 50) begin
      check((use_b ? dtack_n_b : dtack_n_a), "driven high while rescinding");
      @(negedge clk); n++;
    end
    check(n == resc, $sformatf("rescind time %0d, expected %0d", n, resc));
  endtask

  initial begin
    repeat (2) @(posedge clk); reset_n = 1;
    for (int i = 0; i < 10; i++) begin
      cycle(0, D1, R1, 1 + i);
      cycle(1, 1, 1, 2 + i);
    end
    // abandoned cycle: select drops before DTACK* would assert
    @(negedge clk); sel_a = 0;
    @(negedge clk); sel_a = 1;
    repeat (6) begin @(negedge clk); check(dtack_n_a && !dtack_oe_a, "no DTACK* on abandoned cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
