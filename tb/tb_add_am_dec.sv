// Testbench of add_am_dec: random and directed accesses compared with a
// reference decode of A16/A24 modifiers, slot address, word size and IACK*.
module tb_add_am_dec;
  logic clk = 0, reset_n = 0;
  logic [23:1] vme_addr; logic [5:0] vme_am; logic [4:0] vme_ga_n;
  logic sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_n, sync_lword_n;
  logic board_sel_sig_n, a24_mode;
  int checks = 0, failures = 0, hits24 = 0, hits16 = 0;

  add_am_dec dut (.*);
  always #5 clk = ~clk;

  function automatic logic ref_sel(input logic [23:1] a, input logic [5:0] am, input logic [4:0] ga_n,
                                   input logic as_n, ds0, ds1, iack, lword, output logic is24);
    logic [4:0] s; logic h24, h16;
    s = ~ga_n;
    h24 = (am inside {6'h39, 6'h3A, 6'h3D, 6'h3E}) && a[23:19] == s && a[18:4] == 0;
    h16 = (am inside {6'h29, 6'h2D}) && a[15:11] == s && a[10:4] == 0;
    is24 = h24;
    return !as_n && !ds0 && !ds1 && iack && lword && s != 0 && (h24 || h16);
  endfunction

  initial begin
    logic exp, e24;
    {sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_n, sync_lword_n} = '1;
    vme_addr = '0; vme_am = '0; vme_ga_n = '1;
    repeat (2) @(posedge clk); reset_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [4:0] slot; logic [5:0] ams [6];
      ams = '{6'h39, 6'h3A, 6'h3D, 6'h3E, 6'h29, 6'h2D};
      @(negedge clk);
      slot = 5'($urandom);
      vme_ga_n = (i % 50 == 0) ? 5'h1F : ~slot;
      vme_am = ($urandom % 4 != 0) ? ams[$urandom % 6] : 6'($urandom);
      case ($urandom % 4)
        0: vme_addr = {slot, 15'h0, 3'($urandom)};
        1: vme_addr = {8'($urandom), slot, 7'h0, 3'($urandom)};
        2: vme_addr = {slot ^ 5'(1 << ($urandom % 5)), 15'h0, 3'($urandom)};
        default: vme_addr = 23'($urandom);
      endcase
      sync_as_n = ($urandom % 8 == 0); sync_ds_0_n = ($urandom % 8 == 0); sync_ds_1_n = ($urandom % 8 == 0);
      sync_iack_n = ($urandom % 8 != 0); sync_lword_n = ($urandom % 8 != 0);
      exp = ref_sel(vme_addr, vme_am, vme_ga_n, sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_n, sync_lword_n, e24);
      @(posedge clk); #1;
      checks++;
      if (board_sel_sig_n != !exp) begin
        failures++; $display("FAIL sel a=%h am=%h ga=%h exp=%b", vme_addr, vme_am, vme_ga_n, exp);
      end
      if (exp) begin
        checks++;
        if (a24_mode != e24) begin failures++; $display("FAIL a24_mode"); end
        if (e24) hits24++; else hits16++;
      end
    end
    checks++;
    if (hits24 < 20 || hits16 < 20) begin failures++; $display("FAIL too few hits %0d %0d", hits24, hits16); end
    $display("A24 hits %0d, A16 hits %0d", hits24, hits16);
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
