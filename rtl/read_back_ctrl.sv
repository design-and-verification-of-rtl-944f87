// Read-back control: channel select, settling delay, ADC start and capture.
//
// A VME write to register 100 (read back / convert) starts one conversion.
// The three low data bits name the channel to be read back. Both analog
// multiplexer levels are steered from them: mux_1_sel (4:1, field-current
// level) takes bits 1-0 and mux_2_sel (8:1, second level) takes all three
// bits, so on a board where the second-level inputs 0-3 carry the four DAC
// outputs and inputs 4-7 the amplified first-level output, channels 0-3
// read a DAC output directly and channels 4-7 read the field current of
// output 0-3.
//
// After the selects change the controller waits SETTLE_CYCLES clocks for
// the amplifiers to settle, then gives the start-of-conversion command by
// pulling adc_rc_n low for RC_PULSE clocks. The ADC answers by pulling
// adc_busy_n low while converting; the rising edge of adc_busy_n is the end
// of conversion, at which the 16-bit adc_data is stored in data_out, the
// read-back/convert register. busy is set from the command until data_out
// is written and is bit 0 of the status register; a conversion command
// issued while busy is ignored. adc_busy_n is resynchronised with two
// flip-flops, so adc_data is sampled two clocks after the ADC's end of
// conversion.
//
// The sequence (select, settle, SOC, EOC, store), the busy bit and the
// ignore-while-busy rule follow the card description. The channel
// numbering on the multiplexers, the delays and the R/C* pulse polarity are
// this design's choices.
module read_back_ctrl
  import vme_aoc_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 500,
  parameter int unsigned RC_PULSE      = 2
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              board_sel_sig_n,
  input  logic              write_n,
  input  logic [3:1]        vme_addr,
  input  logic [DATA_W-1:0] data_from_bus,
  input  logic              adc_busy_n,
  input  logic [DATA_W-1:0] adc_data,
  output logic              adc_rc_n,
  output logic [DATA_W-1:0] data_out,
  output logic [1:0]        mux_1_sel,
  output logic [2:0]        mux_2_sel,
  output logic              busy
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_SOC, S_WAIT_BUSY, S_WAIT_EOC} state_e;

  state_e      state;
  logic [31:0] cnt;
  logic        sel_q, wr_stb;
  logic [1:0]  busy_sync;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      sel_q     <= 1'b0;
      busy_sync <= 2'b11;
    end else begin
      sel_q     <= board_sel_sig_n;
      busy_sync <= {busy_sync[0], adc_busy_n};
    end
  end

  assign wr_stb = sel_q && !board_sel_sig_n && !write_n && (vme_addr == REG_RDBK);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      adc_rc_n  <= 1'b1;
      data_out  <= '0;
      mux_1_sel <= '0;
      mux_2_sel <= '0;
      busy      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (wr_stb) begin
            mux_1_sel <= data_from_bus[1:0];
            mux_2_sel <= data_from_bus[2:0];
            busy      <= 1'b1;
            cnt       <= '0;
            state     <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (cnt >= SETTLE_CYCLES) begin
            cnt      <= '0;
            adc_rc_n <= 1'b0;
            state    <= S_SOC;
          end else begin
            cnt <= cnt + 1;
          end
        end
        S_SOC: begin
          if (cnt >= RC_PULSE - 1) begin
            adc_rc_n <= 1'b1;
            state    <= S_WAIT_BUSY;
          end else begin
            cnt <= cnt + 1;
          end
        end
        S_WAIT_BUSY: if (!busy_sync[1]) state <= S_WAIT_EOC;
        S_WAIT_EOC: begin
          if (busy_sync[1]) begin
            data_out <= adc_data;
            busy     <= 1'b0;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The ADC is only started inside a command, never while idle.
  a_soc_only_when_busy: assert property (@(posedge clk) disable iff (!reset_n) !adc_rc_n |-> busy);

endmodule
