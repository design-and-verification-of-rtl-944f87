// Testbench of vme_interrupter: request edges set IRQn*; an acknowledge
// cycle for a pending level is answered with the status/ID and clears the
// level; an acknowledge for a level not pending here is passed on through
// IACKOUT* until IACKIN* is released; without IACKIN* nothing happens.
module tb_vme_interrupter;
  localparam logic [15:0] BASE = 16'h5A38;
  logic clk = 0, reset_n = 0;
  logic [6:0] irq_req = 0, irq7_1;
  logic [3:1] vme_addr = 0;
  logic sync_as_n = 1, sync_ds_0_n = 1, sync_iack_n = 1, sync_iack_in = 1;
  logic iack_out, int_sel_n;
  logic [15:0] status_id;
  logic [6:0] ref_pend = 0;
  int checks = 0, failures = 0, answered = 0, passed = 0;

  vme_interrupter #(.STATUS_ID_BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic iack_cycle(input logic [2:0] level, input logic chain_in);
    logic hit;
    hit = chain_in && level != 0 && ref_pend[level - 1];
    @(negedge clk);
    vme_addr = level; sync_iack_n = 0; sync_as_n = 0;
    @(negedge clk);
    sync_ds_0_n = 0; sync_iack_in = !chain_in;
    repeat (2) @(negedge clk);
    if (hit) begin
      check(!int_sel_n && iack_out, "answers pending level");
      check(status_id == {BASE[15:3], level}, $sformatf("status/ID %h", status_id));
      answered++;
    end else if (chain_in) begin
      check(int_sel_n && !iack_out, "passes IACK on");
      passed++;
    end else begin
      check(int_sel_n && iack_out, "idle without IACKIN*");
    end
    sync_ds_0_n = 1;
    @(negedge clk);
    sync_as_n = 1; sync_iack_n = 1; sync_iack_in = 1;
    repeat (2) @(negedge clk);
    check(int_sel_n && iack_out, "released after cycle");
    if (hit) ref_pend[level - 1] = 0;
    check(irq7_1 == ref_pend, $sformatf("IRQ lines %b exp %b", irq7_1, ref_pend));
  endtask

  initial begin
    repeat (2) @(posedge clk); reset_n = 1;
    @(negedge clk); check(irq7_1 == 0, "no request after reset");
    for (int i = 0; i < 300; i++) begin
      if ($urandom % 3 == 0) begin
        logic [6:0] nreq;
        nreq = 7'($urandom);
        @(negedge clk);
        ref_pend = ref_pend | (nreq & ~irq_req);
        irq_req = nreq;
        repeat (2) @(negedge clk);
        check(irq7_1 == ref_pend, "request edge sets IRQ");
      end
      iack_cycle(3'($urandom), $urandom % 5 != 0);
    end
    check(answered > 20 && passed > 20, $sformatf("answered %0d passed %0d", answered, passed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
