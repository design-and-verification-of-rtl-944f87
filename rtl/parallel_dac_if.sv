// Control signal generator of the four-channel parallel-input DAC.
//
// A VME write to register 000-011 loads the 14 low data bits into DAC
// channel A02-A01. In the clock after the write is seen, dac_addr and
// dac_data are set up; in the following WR_SETUP clocks they settle at the
// DAC pins; then dac_wr_n is pulsed low for WR_PULSE clocks, and the DAC
// takes the word into the selected input register on the rising edge of
// dac_wr_n. Address and data stay on the pins until the next write.
// dac_clr_n is held low while reset_n is low, so both the power-on reset and
// the software reset clear the DAC outputs.
//
// Timing (clocks after board_sel_sig_n falls): address/data valid after 1,
// dac_wr_n low from 1+WR_SETUP to 1+WR_SETUP+WR_PULSE. A write arriving while
// a load is still in progress is ignored. The signal set and register
// addresses follow the card description; the pulse timing is this design's
// choice and should be set to the DAC's data sheet.
module parallel_dac_if
  import vme_aoc_pkg::*;
#(
  parameter int unsigned WR_SETUP = 1,
  parameter int unsigned WR_PULSE = 2
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic             board_sel_sig_n,
  input  logic             write_n,
  input  logic [3:1]       vme_addr,
  input  logic [DAC_W-1:0] vme_data,
  output logic [1:0]       dac_addr,
  output logic [DAC_W-1:0] dac_data,
  output logic             dac_wr_n,
  output logic             dac_clr_n
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WR} state_e;

  state_e     state;
  logic [7:0] cnt;
  logic       sel_q, wr_stb;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) sel_q <= 1'b0;
    else          sel_q <= board_sel_sig_n;
  end

  assign wr_stb = sel_q && !board_sel_sig_n && !write_n && (vme_addr[3] == 1'b0);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      dac_addr  <= '0;
      dac_data  <= '0;
      dac_wr_n  <= 1'b1;
      dac_clr_n <= 1'b0;
    end else begin
      dac_clr_n <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (wr_stb) begin
            dac_addr <= vme_addr[2:1];
            dac_data <= vme_data;
            cnt      <= '0;
            if (WR_SETUP == 0) begin
              state    <= S_WR;
              dac_wr_n <= 1'b0;
            end else begin
              state <= S_SETUP;
            end
          end
        end
        S_SETUP: begin
          if (cnt == 8'(WR_SETUP - 1)) begin
            cnt      <= '0;
            state    <= S_WR;
            dac_wr_n <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WR: begin
          if (cnt == 8'(WR_PULSE - 1)) begin
            cnt      <= '0;
            state    <= S_IDLE;
            dac_wr_n <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
