// End-to-end testbench of aoc_fpga_top at its default parameters.
//
// A bus-functional VME master (tasks below) runs asynchronous A24 and A16
// D16 cycles against the card in slot 5, with behavioural models of the ADC
// and the serial DAC and a monitor of the parallel DAC pins. It covers the
// diagnostic pattern test, loads of all four DAC channels (channel 3 also
// through the serial DAC), conversions of all eight read-back channels with
// status polling, a convert command while busy, accesses to other slots and
// modifiers that must not be answered, the software reset, and interrupt
// acknowledge cycles that are answered or passed on. Each of these
// mechanisms is counted and must occur. DTACK* latency and the rescinding
// release of DTACK* are checked on every cycle.
module tb_aoc_fpga_top;
  localparam int TCLK = 20;           // 50 MHz FPGA clock
  localparam logic [4:0] SLOT = 5'd5;

  logic clk = 0, reset_n = 0;
  logic [23:1] vme_addr = 0; logic vme_as_n = 1; logic [5:0] vme_am = 0;
  logic [4:0] vme_ga_n = ~SLOT;
  logic vme_lword_n = 1, vme_iack_n = 1, vme_iack_in = 1, vme_ds_1_n = 1, vme_ds_0_n = 1, vme_write_n = 1;
  wire  [15:0] bidir_data_bus;
  logic board_sel_sig_n, dtack_n, dtack_oe, data_buf_en_n, iack_out;
  logic [6:0] irq7_1, irq_req = 0;
  logic dac_wr_n, dac_clr_n; logic [13:0] dac_data; logic [1:0] dac_addr;
  logic sdac_sync_n, sdac_sclk, sdac_sdin, sdac_clr_n, sdac_rstin_n, busy_bit;
  logic adc_rc_n, adc_busy_n; logic [15:0] adc_data, data_out;
  logic [1:0] mux_1_sel; logic [2:0] mux_2_sel; logic a24_mode;

  logic m_drive = 0; logic [15:0] m_data = 0;
  logic dtack_line;
  logic [15:0] sdac_word; int sdac_bits, sdac_frames, conv_count;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_wr = 0, n_rd = 0, n_a24 = 0, n_a16 = 0, n_nosel = 0, n_dac_load = 0, n_sdac = 0;
  int n_conv = 0, n_busy_ignored = 0, n_busy_seen = 0, n_swrst = 0, n_clr = 0;
  int n_iack_ans = 0, n_iack_pass = 0, n_rescind = 0, n_diag = 0;
  logic [13:0] dac_mem [4];

  aoc_fpga_top dut (.*);
  adc_model adc (.adc_rc_n, .mux_1_sel, .mux_2_sel, .adc_busy_n, .adc_data, .conv_count);
  sdac_model sdac (.sdac_sync_n, .sdac_sclk, .sdac_sdin, .last_word(sdac_word),
                   .last_bits(sdac_bits), .frames(sdac_frames));

  always #(TCLK/2) clk = ~clk;
  assign bidir_data_bus = m_drive ? m_data : 'z;
  assign dtack_line = dtack_oe ? dtack_n : 1'b1;   // pull-up on the backplane

  always @(posedge dac_wr_n) if (reset_n) begin dac_mem[dac_addr] = dac_data; n_dac_load++; end
  always @(negedge dac_clr_n) if (reset_n) n_clr++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [23:1] reg_addr(input bit a24, input logic [2:0] r);
    return a24 ? {SLOT, 15'h0, r} : {8'h00, SLOT, 7'h0, r};
  endfunction

  // One D16 data transfer cycle. acked = 0 when no DTACK* came (bus error).
  task automatic vme_cycle(input bit wr, input logic [5:0] am, input logic [23:1] a,
                           input logic [15:0] wdata, output logic [15:0] rdata, output bit acked);
    time t0; int n;
    vme_addr = a; vme_am = am; vme_iack_n = 1; vme_lword_n = 1; vme_write_n = !wr;
    if (wr) begin m_data = wdata; m_drive = 1; end
    #35 vme_as_n = 0;
    #10 vme_ds_0_n = 0; vme_ds_1_n = 0; t0 = $time;
    n = 0;
    while (dtack_line && n < 2000) begin #1; n++; end
    acked = !dtack_line;
    rdata = 16'h0;
    if (acked) begin
      // DS* seen after 2 synchroniser clocks, select 1 clock, DTACK* 2 clocks
      check($time - t0 > 4 * TCLK && $time - t0 <= 5 * TCLK, $sformatf("DTACK* latency %0t", $time - t0));
      #5 rdata = bidir_data_bus;
      if (wr) n_wr++; else n_rd++;
      if (am inside {6'h39, 6'h3A, 6'h3D, 6'h3E}) n_a24++; else n_a16++;
    end
    vme_ds_0_n = 1; vme_ds_1_n = 1;
    if (acked) begin
      bit rescinded;
      n = 0; rescinded = 0;
      while (!dtack_line && n < 1000) begin #1; n++; end
      check(dtack_line, "DTACK* released");
      check(data_buf_en_n, "data bus released before DTACK* rises");
      while (dtack_oe && n < 1000) begin
        if (dtack_n) rescinded = 1;
        #1; n++;
      end
      if (rescinded) n_rescind++;
    end
    #10 vme_as_n = 1; m_drive = 0; vme_write_n = 1;
    #60;
  endtask

  task automatic wr16(input bit a24, input logic [2:0] r, input logic [15:0] d);
    logic [15:0] x; bit ok;
    vme_cycle(1, a24 ? 6'h39 : 6'h29, reg_addr(a24, r), d, x, ok);
    check(ok, $sformatf("write reg %b acknowledged", r));
  endtask

  task automatic rd16(input bit a24, input logic [2:0] r, output logic [15:0] d);
    bit ok;
    vme_cycle(0, a24 ? 6'h3D : 6'h2D, reg_addr(a24, r), 16'h0, d, ok);
    check(ok, $sformatf("read reg %b acknowledged", r));
  endtask

  // Interrupt acknowledge cycle for one level; this card is first in the chain.
  task automatic iack_cycle(input logic [2:0] level, output bit answered, output logic [15:0] id);
    int n;
    vme_addr = {20'h0, level}; vme_am = 6'h3D; vme_iack_n = 0; vme_write_n = 1;
    #35 vme_as_n = 0;
    #10 vme_ds_0_n = 0; vme_ds_1_n = 0; vme_iack_in = 0;
    n = 0;
    while (dtack_line && iack_out && n < 2000) begin #1; n++; end
    answered = !dtack_line;
    id = 16'h0;
    if (answered) begin #5 id = bidir_data_bus; end
    vme_ds_0_n = 1; vme_ds_1_n = 1;
    #10 vme_as_n = 1; vme_iack_in = 1; vme_iack_n = 1;
    n = 0;
    while ((!dtack_line || !iack_out) && n < 1000) begin #1; n++; end
    check(dtack_line && iack_out, "acknowledge released");
    #60;
  endtask

  initial begin
    logic [15:0] d; bit ok; logic [15:0] exp;
    #1;
    check(!dac_clr_n && !sdac_clr_n && !sdac_rstin_n, "DAC clear during reset");
    repeat (4) @(posedge clk);
    reset_n = 1;
    repeat (4) @(posedge clk);
    check(dac_clr_n && dtack_line && iack_out && irq7_1 == 0, "idle after reset");

    // diagnostic pattern test over the data lines, A24 and A16
    for (int a24 = 1; a24 >= 0; a24--) begin
      wr16(a24, 3'b101, 16'h5555); wr16(a24, 3'b110, 16'hAAAA);
      rd16(a24, 3'b101, d); check(d == 16'h5555, $sformatf("diag1 %h", d));
      rd16(a24, 3'b110, d); check(d == 16'hAAAA, $sformatf("diag2 %h", d));
      wr16(a24, 3'b101, 16'hAAAA); wr16(a24, 3'b110, 16'h5555);
      rd16(a24, 3'b101, d); check(d == 16'hAAAA, $sformatf("diag1 %h", d));
      rd16(a24, 3'b110, d); check(d == 16'h5555, $sformatf("diag2 %h", d));
      n_diag++;
    end

    // accesses the card must not answer
    vme_cycle(0, 6'h39, {SLOT + 5'd1, 15'h0, 3'b101}, 0, d, ok); check(!ok, "other slot ignored"); if (!ok) n_nosel++;
    vme_cycle(0, 6'h09, {SLOT, 15'h0, 3'b101}, 0, d, ok);        check(!ok, "A32 modifier ignored"); if (!ok) n_nosel++;
    vme_cycle(0, 6'h29, {8'h00, SLOT, 7'h01, 3'b101}, 0, d, ok); check(!ok, "A16 outside card ignored"); if (!ok) n_nosel++;

    // DAC loads on all four channels
    for (int ch = 0; ch < 4; ch++) begin
      logic [15:0] v; int f0;
      v = 16'h1000 * 16'(ch) + 16'h0A5A + 16'($urandom % 256);
      f0 = sdac_frames;
      wr16(ch % 2, 3'(ch), v);
      repeat (10) @(posedge clk);
      check(dac_mem[ch] == v[13:0], $sformatf("DAC %0d holds %h exp %h", ch, dac_mem[ch], v[13:0]));
      if (ch == 3) begin
        wait (!busy_bit); #100;
        check(sdac_frames == f0 + 1 && sdac_word == v && sdac_bits == 16, $sformatf("serial DAC word %h", sdac_word));
        n_sdac++;
      end else begin
        check(sdac_frames == f0, "no serial frame for channels 0-2");
      end
      rd16(1, 3'(ch), d); check(d == 16'h0, "DAC registers read as zero");
    end
    check(n_dac_load == 4, $sformatf("%0d DAC loads", n_dac_load));

    // read back all eight channels
    for (int ch = 0; ch < 8; ch++) begin
      int c0, polls;
      c0 = conv_count;
      wr16(1, 3'b100, {13'h1ABC, 3'(ch)});
      check(mux_1_sel == 2'(ch) && mux_2_sel == 3'(ch), "multiplexer selects");
      // a second command while busy is ignored
      wr16(1, 3'b100, {13'h0, 3'(ch + 1)});
      check(mux_2_sel == 3'(ch), "command while busy ignored");
      n_busy_ignored++;
      polls = 0;
      do begin rd16(0, 3'b111, d); polls++; if (d[0]) n_busy_seen++; end while (d[0] && polls < 200);
      check(!d[0], "conversion finished");
      exp = 16'h0C00 + 16'h0111 * 16'(ch) + 16'h0010 * 16'(ch % 4) + 16'(c0);
      rd16(1, 3'b100, d);
      check(d == exp && data_out == exp, $sformatf("read back ch %0d: %h exp %h", ch, d, exp));
      check(conv_count == c0 + 1, "one conversion per command");
      n_conv++;
    end

    // software reset: any word to register 111
    begin
      int c0;
      c0 = n_clr;
      wr16(1, 3'b101, 16'h1234);
      wr16(1, 3'b111, 16'($urandom));
      repeat (30) @(posedge clk);
      check(n_clr == c0 + 1, "DAC clear pulse on software reset");
      rd16(1, 3'b101, d); check(d == 16'h0, "diagnostic register cleared by software reset");
      rd16(1, 3'b100, d); check(d == 16'h0, "read-back register cleared by software reset");
      n_swrst++;
    end

    // interrupts
    for (int k = 0; k < 7; k++) begin
      logic [2:0] lvl; logic [15:0] id; bit ans;
      lvl = 3'(k + 1);
      @(negedge clk); irq_req[k] = 1;
      repeat (3) @(negedge clk);
      check(irq7_1[k], $sformatf("IRQ%0d* asserted", lvl));
      // acknowledge of a different level is passed on
      iack_cycle(lvl == 3'd7 ? 3'd1 : lvl + 3'd1, ans, id);
      check(!ans, "other level passed on"); if (!ans) n_iack_pass++;
      iack_cycle(lvl, ans, id);
      check(ans && id == {13'h0014, lvl}, $sformatf("status/ID %h", id));
      if (ans) n_iack_ans++;
      check(!irq7_1[k], "request released on acknowledge");
      irq_req[k] = 0;
    end

    check(n_wr > 0 && n_rd > 0, "reads and writes");
    check(n_a24 > 0, "A24 cycles");         check(n_a16 > 0, "A16 cycles");
    check(n_nosel > 0, "unselected cycles"); check(n_rescind > 0, "rescinding DTACK*");
    check(n_dac_load > 0, "DAC loads");     check(n_sdac > 0, "serial DAC frames");
    check(n_conv > 0, "conversions");       check(n_busy_ignored > 0, "commands ignored while busy");
    check(n_busy_seen > 0, "busy bit seen");  check(n_swrst > 0, "software reset");
    check(n_iack_ans > 0, "acknowledge answered"); check(n_iack_pass > 0, "acknowledge passed on");
    check(n_diag > 0, "diagnostic pattern test");
    $display("mechanisms: wr=%0d rd=%0d a24=%0d a16=%0d nosel=%0d rescind=%0d dac=%0d sdac=%0d conv=%0d ignored=%0d busy=%0d swrst=%0d iack_ans=%0d iack_pass=%0d",
             n_wr, n_rd, n_a24, n_a16, n_nosel, n_rescind, n_dac_load, n_sdac, n_conv, n_busy_ignored,
             n_busy_seen, n_swrst, n_iack_ans, n_iack_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
