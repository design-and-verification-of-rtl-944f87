// Testbench of reg_diag: alternating-bit patterns and random words written
// to both diagnostic registers, reads compared with a reference copy;
// writes to other addresses, read cycles and a held select must not change
// them, and reset clears them.
module tb_reg_diag;
  logic clk = 0, reset_n = 0;
  logic board_sel_sig_n = 1, write_n = 1;
  logic [2:0] diag_reg_addr_in = 0;
  logic [15:0] data_from_bus = 0, diag_reg_out1, diag_reg_out2;
  logic [15:0] ref1 = 0, ref2 = 0;
  int checks = 0, failures = 0;

  reg_diag dut (.*);
  always #5 clk = ~clk;

  task automatic access(input logic wr, input logic [2:0] a, input logic [15:0] d, input int hold);
    @(negedge clk);
    write_n = !wr; diag_reg_addr_in = a; data_from_bus = d; board_sel_sig_n = 0;
    repeat (hold) @(negedge clk);
    data_from_bus = ~d;   // changes while still selected must not be taken
    @(negedge clk);
    board_sel_sig_n = 1; write_n = 1;
    if (wr && a == 3'b101) ref1 = d;
    if (wr && a == 3'b110) ref2 = d;
    @(negedge clk);
    checks++;
    if (diag_reg_out1 != ref1 || diag_reg_out2 != ref2) begin
      failures++; $display("FAIL a=%b d=%h got %h %h exp %h %h", a, d, diag_reg_out1, diag_reg_out2, ref1, ref2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); reset_n = 1;
    access(1, 3'b101, 16'h5555, 1); access(1, 3'b110, 16'hAAAA, 1);
    access(1, 3'b101, 16'hAAAA, 2); access(1, 3'b110, 16'h5555, 3);
    for (int i = 0; i < 300; i++) access($urandom % 2, 3'($urandom), 16'($urandom), 1 + $urandom % 4);
    @(negedge clk); reset_n = 0; ref1 = 0; ref2 = 0;
    @(negedge clk); reset_n = 1;
    checks++;
    if (diag_reg_out1 != 0 || diag_reg_out2 != 0) begin failures++; $display("FAIL reset"); end
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
