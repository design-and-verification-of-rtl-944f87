// Software reset generator (writes to register 111).
//
// Writing any word to the status/reset register resets the card functions.
// The write is seen in the clock after board_sel_sig_n falls; card_rst_n
// then goes low for RST_PULSE clocks. card_rst_n is also low, without delay,
// while the power-on reset_n is low, so it serves as the one reset of all
// card-function blocks (DAC interfaces, read-back controller, diagnostic
// registers). The VME bus interface itself (synchroniser, decoder, DTACK*
// generator, interrupter) runs on reset_n alone, so the write cycle that
// caused the reset still completes with DTACK*.
//
// That a write of any value resets the card follows the card description;
// which blocks are reset and the pulse length are this design's choices.
module sw_reset_gen
  import vme_aoc_pkg::*;
#(
  parameter int unsigned RST_PULSE = 16
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       board_sel_sig_n,
  input  logic       write_n,
  input  logic [3:1] vme_addr,
  output logic       card_rst_n
);

  logic       sel_q, wr_stb;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) sel_q <= 1'b0;
    else          sel_q <= board_sel_sig_n;
  end

  assign wr_stb = sel_q && !board_sel_sig_n && !write_n && (vme_addr == REG_STATUS);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      cnt        <= '0;
      card_rst_n <= 1'b0;
    end else if (wr_stb) begin
      cnt        <= 8'(RST_PULSE - 1);
      card_rst_n <= 1'b0;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else begin
      card_rst_n <= 1'b1;
    end
  end

endmodule
