// Testbench of serial_dac_if: a behavioural DAC receiver captures each
// frame; the received word, bit count, frame length (32*SCLK_HALF clocks
// of busy), the ignore-while-busy rule and writes to other registers
// are checked.
module tb_serial_dac_if;
  localparam int HALF = 3;
  logic clk = 0, reset_n = 0;
  logic board_sel_sig_n = 1, write_n = 1;
  logic [2:0] vme_addr = 0;
  logic [15:0] data_from_bus = 0;
  logic busy_bit, sdac_clr_n, sdac_rstin_n, sdac_sclk, sdac_sdin, sdac_sync_n;
  logic [15:0] last_word; int last_bits, frames;
  int checks = 0, failures = 0, exp_frames = 0, busy_cycles = 0;
  logic [15:0] exp_word;

  serial_dac_if #(.SCLK_HALF(HALF)) dut (.*);
  sdac_model rx (.sdac_sync_n, .sdac_sclk, .sdac_sdin, .last_word, .last_bits, .frames);
  always #5 clk = ~clk;
  always @(posedge clk) if (busy_bit) busy_cycles <= busy_cycles + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input logic wr, input logic [2:0] a, input logic [15:0] d, input int gap);
    @(negedge clk);
    write_n = !wr; vme_addr = a; data_from_bus = d; board_sel_sig_n = 0;
    repeat (3) @(negedge clk);
    board_sel_sig_n = 1; write_n = 1;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(!sdac_clr_n && !sdac_rstin_n, "clear and reset during reset");
    reset_n = 1;
    @(posedge clk); #1;
    check(sdac_clr_n && sdac_rstin_n && sdac_sync_n && sdac_sclk, "idle levels");
    for (int i = 0; i < 40; i++) begin
      logic [15:0] d; int f0;
      d = (i == 0) ? 16'hA5C3 : 16'($urandom);
      f0 = frames;
      busy_cycles = 0;
      access(1, 3'b011, d, 0);
      // a second write while the frame is running must be ignored
      access(1, 3'b011, ~d, 0);
      // writes to other registers must not start a frame
      access(1, 3'($urandom % 3), 16'($urandom), 0);
      wait (!busy_bit);
      repeat (2) @(negedge clk);
      check(frames == f0 + 1, "one frame per write");
      check(last_word == d, $sformatf("word %h exp %h", last_word, d));
      check(last_bits == 16, $sformatf("bits %0d", last_bits));
      check(busy_cycles == 32 * HALF, $sformatf("frame length %0d", busy_cycles));
    end
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
