// Testbench of tri_state_bus_logic: read multiplexer contents on the bus for
// every register address, status/ID during an acknowledge, and release of
// the bus (the testbench's own driver then shows through) in write and
// unselected cycles.
module tb_tri_state_bus_logic;
  logic board_sel_sig_n, write_n, int_sel_n;
  logic [2:0] vme_addr;
  logic [15:0] adc_data, diag_reg_out1, diag_reg_out2, status_reg, int_status_id, data_from_bus;
  logic buf_en_n;
  wire  [15:0] bidir_data_bus;
  logic tb_drive; logic [15:0] tb_data;
  int checks = 0, failures = 0;

  tri_state_bus_logic dut (.*);
  assign bidir_data_bus = tb_drive ? tb_data : 'z;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] exp; logic drive;
      adc_data = 16'($urandom); diag_reg_out1 = 16'($urandom); diag_reg_out2 = 16'($urandom);
      status_reg = 16'($urandom % 2); int_status_id = 16'($urandom); tb_data = 16'($urandom);
      vme_addr = 3'($urandom); board_sel_sig_n = $urandom % 2; write_n = $urandom % 2;
      int_sel_n = ($urandom % 4 != 0);
      if (!int_sel_n) board_sel_sig_n = 1;
      drive = (!board_sel_sig_n && write_n) || !int_sel_n;
      tb_drive = !drive;
      case (vme_addr)
        3'b100: exp = adc_data;
        3'b101: exp = diag_reg_out1;
        3'b110: exp = diag_reg_out2;
        3'b111: exp = status_reg;
        default: exp = 16'h0000;
      endcase
      if (!int_sel_n) exp = int_status_id;
      if (!drive) exp = tb_data;
      #10;
      checks++;
      if (bidir_data_bus !== exp || data_from_bus !== exp || buf_en_n != !drive) begin
        failures++;
        $display("FAIL a=%b sel=%b wr=%b int=%b bus=%h exp=%h", vme_addr, board_sel_sig_n, write_n, int_sel_n, bidir_data_bus, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
