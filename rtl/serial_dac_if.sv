// Control signal generator of the serial-input DAC (channel 3 option).
//
// Channel 3 of the card can be fitted with a serial-input 14/16-bit DAC
// instead of the parallel one. A VME write to register 011 (DAC 3) sends the
// full 16-bit data word to it as one SPI-style frame:
//   - sdac_sync_n falls and sdac_sdin shows bit 15;
//   - sdac_sclk (idle high) then toggles every SCLK_HALF clocks; the DAC
//     samples sdac_sdin on each falling edge and the next bit is presented
//     after each rising edge, MSB first;
//   - after the 16th falling edge and the following rising edge
//     sdac_sync_n returns high and the DAC updates its output.
// busy_bit is high for the whole frame; a write that arrives while busy is
// ignored. sdac_clr_n and sdac_rstin_n are held low while reset_n is low
// (power-on or software reset).
//
// busy_bit and sdac_sync_n are active for 2*FRAME_BITS*SCLK_HALF clocks,
// starting the clock after board_sel_sig_n falls. The signal names come from the
// card description; the frame format, clock phase, divider and the use of
// register 011 are this design's choices, to be matched to the DAC fitted.
module serial_dac_if
  import vme_aoc_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 2,
  parameter int unsigned FRAME_BITS = 16
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              board_sel_sig_n,
  input  logic              write_n,
  input  logic [2:0]        vme_addr,       // A03-A01
  input  logic [DATA_W-1:0] data_from_bus,
  output logic              busy_bit,
  output logic              sdac_clr_n,
  output logic              sdac_rstin_n,
  output logic              sdac_sclk,
  output logic              sdac_sdin,
  output logic              sdac_sync_n
);

  logic              sel_q, wr_stb;
  logic [DATA_W-1:0] shreg;
  logic [7:0]        div_cnt;
  logic [7:0]        edge_cnt;   // counts SCLK edges of the frame

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) sel_q <= 1'b0;
    else          sel_q <= board_sel_sig_n;
  end

  assign wr_stb = sel_q && !board_sel_sig_n && !write_n && (vme_addr == REG_DAC3);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      busy_bit     <= 1'b0;
      shreg        <= '0;
      div_cnt      <= '0;
      edge_cnt     <= '0;
      sdac_sclk    <= 1'b1;
      sdac_sdin    <= 1'b0;
      sdac_sync_n  <= 1'b1;
      sdac_clr_n   <= 1'b0;
      sdac_rstin_n <= 1'b0;
    end else begin
      sdac_clr_n   <= 1'b1;
      sdac_rstin_n <= 1'b1;
      if (!busy_bit) begin
        if (wr_stb) begin
          busy_bit    <= 1'b1;
          shreg       <= data_from_bus << 1;
          sdac_sdin   <= data_from_bus[DATA_W-1];
          sdac_sync_n <= 1'b0;
          div_cnt     <= '0;
          edge_cnt    <= '0;
        end
      end else if (div_cnt == 8'(SCLK_HALF - 1)) begin
        div_cnt   <= '0;
        edge_cnt  <= edge_cnt + 1'b1;
        sdac_sclk <= !sdac_sclk;
        if (!sdac_sclk) begin
          // rising edge: present the next bit, or end the frame
          if (edge_cnt == 8'(2*FRAME_BITS - 1)) begin
            busy_bit    <= 1'b0;
            sdac_sync_n <= 1'b1;
            sdac_sdin   <= 1'b0;
          end else begin
            sdac_sdin <= shreg[DATA_W-1];
            shreg     <= shreg << 1;
          end
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  // A frame is only open while the interface reports busy.
  a_sync_only_when_busy: assert property (@(posedge clk) disable iff (!reset_n) !sdac_sync_n |-> busy_bit);

endmodule
