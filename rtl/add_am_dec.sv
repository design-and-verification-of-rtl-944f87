// Board select logic: address and address-modifier decoder.
//
// Decides whether the current VME cycle is addressed to this card and, if
// so, drives board_sel_sig_n low for as long as the cycle lasts. It works on
// the address and modifier latched at AS* and on the synchronised strobes,
// so its output is a registered, glitch-free select one clock after the
// strobes are seen.
//
// The card is a D16 slave in A16 and A24 space. Its base address is taken
// from the geographical address pins GA4*-GA0* (the slot number):
//   A24 (AM 39, 3A, 3D, 3E): A23-A19 = slot, A18-A04 = 0
//   A16 (AM 29, 2D)        : A15-A11 = slot, A10-A04 = 0
// A03-A01 then select one of the eight registers. A cycle is accepted only
// when AS*, DS0* and DS1* are all low (16-bit transfer), LWORD* is high and
// IACK* is high (interrupt acknowledge cycles are answered by the
// interrupter instead). A card whose GA pins are all high (slot 0, no
// geographical address) is never selected.
//
// The document leaves the base address, the modifier list and the word-size
// check to the designer; those choices are this design's own.
module add_am_dec
  import vme_aoc_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic [23:1] vme_addr,     // latched address
  input  logic [5:0]  vme_am,       // latched address modifier
  input  logic [4:0]  vme_ga_n,
  input  logic        sync_as_n,
  input  logic        sync_ds_0_n,
  input  logic        sync_ds_1_n,
  input  logic        sync_iack_n,
  input  logic        sync_lword_n,
  output logic        board_sel_sig_n,
  output logic        a24_mode       // 1: current access is A24, 0: A16
);

  logic [4:0] slot;
  logic       a24_hit, a16_hit, strobes_ok, sel_d;

  assign slot = ~vme_ga_n;

  assign a24_hit = is_a24_am(vme_am) && (vme_addr[23:19] == slot) &&
                   (vme_addr[18:4] == '0);
  assign a16_hit = is_a16_am(vme_am) && (vme_addr[15:11] == slot) &&
                   (vme_addr[10:4] == '0);

  assign strobes_ok = !sync_as_n && !sync_ds_0_n && !sync_ds_1_n &&
                      sync_iack_n && sync_lword_n;

  assign sel_d = strobes_ok && (slot != '0) && (a24_hit || a16_hit);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      board_sel_sig_n <= 1'b1;
      a24_mode        <= 1'b0;
    end else begin
      board_sel_sig_n <= !sel_d;
      if (sel_d) a24_mode <= a24_hit;
    end
  end

endmodule
