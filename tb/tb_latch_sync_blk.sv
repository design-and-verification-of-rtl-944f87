// Testbench of latch_sync_blk: checks the synchroniser latency of every
// strobe against a reference delay line (a pin value set between clock
// edges appears at the output after SYNC_STAGES rising edges), and that address and modifier are
// frozen while AS* is low and follow the bus while it is high.
module tb_latch_sync_blk;
  localparam int STAGES = 2;
  logic clk = 0, reset_n = 0;
  logic [23:1] vme_addr; logic [5:0] vme_am;
  logic vme_as_n, vme_ds_0_n, vme_ds_1_n, vme_iack_in, vme_iack_n, vme_lword_n, vme_write_n;
  logic [23:1] addr_l; logic [5:0] am_l;
  logic sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_in, sync_iack_n, sync_lword_n, sync_write_n;
  int checks = 0, failures = 0;

  latch_sync_blk #(.SYNC_STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  logic [6:0] hist [STAGES+1];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    {vme_as_n, vme_ds_0_n, vme_ds_1_n, vme_iack_in, vme_iack_n, vme_lword_n, vme_write_n} = '1;
    vme_addr = '0; vme_am = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    // synchroniser latency: each raw change appears exactly STAGES clocks later
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      {vme_ds_0_n, vme_ds_1_n, vme_iack_in, vme_iack_n, vme_lword_n, vme_write_n} = 6'($urandom);
      vme_as_n = 1'b1;
      for (int k = STAGES; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = {vme_as_n, vme_ds_0_n, vme_ds_1_n, vme_iack_in, vme_iack_n, vme_lword_n, vme_write_n};
      @(posedge clk); #1;
      if (i >= STAGES)
        check({sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_in, sync_iack_n, sync_lword_n, sync_write_n}
              == hist[STAGES-1], "sync latency");
    end
    // address latch
    for (int i = 0; i < 50; i++) begin
      logic [23:1] a, b; logic [5:0] m, n;
      a = 23'($urandom); b = 23'($urandom); m = 6'($urandom); n = 6'($urandom);
      @(negedge clk); vme_addr = a; vme_am = m;
      repeat (3) @(negedge clk);
      check(addr_l == a && am_l == m, "latch follows bus while AS* high");
      vme_as_n = 1'b0;
      repeat (STAGES) @(negedge clk);
      check(!sync_as_n, "AS* synchronised");
      check(addr_l == a && am_l == m, "latched value valid when sync AS* low");
      vme_addr = b; vme_am = n;
      repeat (4) @(negedge clk);
      check(addr_l == a && am_l == m, "latch frozen while AS* low");
      vme_as_n = 1'b1;
      repeat (STAGES + 2) @(negedge clk);
      check(addr_l == b && am_l == n, "latch follows bus after AS* release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
