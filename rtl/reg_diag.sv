// Diagnostic registers 1 and 2 (register addresses 101 and 110).
//
// Two 16-bit read/write registers with no effect on the card. Software writes
// a pattern such as 0101...01 and reads it back, then the complement, to find
// data lines stuck at 0 or 1 between the CPU and the card.
//
// A write is taken once per VME cycle, in the clock after board_sel_sig_n
// falls with write_n low and diag_reg_addr_in equal to the register's
// address. The registers clear on reset_n (power-on or software reset).
// Register function and addresses follow the card description; the write
// strobe timing and the reset value are this design's choices.
module reg_diag
  import vme_aoc_pkg::*;
(
  input  logic              clk,
  input  logic              reset_n,
  input  logic              board_sel_sig_n,
  input  logic              write_n,
  input  logic [2:0]        diag_reg_addr_in,   // A03-A01
  input  logic [DATA_W-1:0] data_from_bus,
  output logic [DATA_W-1:0] diag_reg_out1,
  output logic [DATA_W-1:0] diag_reg_out2
);

  logic sel_q, wr_stb;

  // Falling edge of the select marks the one write of a cycle. sel_q resets
  // to "selected" so that leaving reset inside a cycle writes nothing.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) sel_q <= 1'b0;
    else          sel_q <= board_sel_sig_n;
  end

  assign wr_stb = sel_q && !board_sel_sig_n && !write_n;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      diag_reg_out1 <= '0;
      diag_reg_out2 <= '0;
    end else if (wr_stb) begin
      if (diag_reg_addr_in == REG_DIAG1) diag_reg_out1 <= data_from_bus;
      if (diag_reg_addr_in == REG_DIAG2) diag_reg_out2 <= data_from_bus;
    end
  end

endmodule
