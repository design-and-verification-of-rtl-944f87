// DTACK* generator with programmable delay and rescinding release.
//
// When a cycle is selected (sel_n low) the generator waits DTACK_DELAY
// clocks, so that read data driven on D00-D15 has settled, and then pulls
// DTACK* low. It holds DTACK* low until the master releases the data strobes,
// which shows up here as sel_n going high. It then drives DTACK* actively high
// for RESCIND_CYCLES clocks ("rescinding DTACK", which speeds up the rise of
// the bus line) and finally stops driving it (dtack_oe low) so that the
// line's pull-up holds it. With RESCIND_CYCLES = 0 DTACK* is released
// straight to high impedance. A cycle abandoned before DTACK* was asserted
// returns to idle without a pulse.
//
// Interface: dtack_n is the level to drive, dtack_oe enables the board's
// DTACK* driver. Timing: DTACK* falls DTACK_DELAY+1 clocks after sel_n falls
// and rises one clock after sel_n rises.
// The assert-after-select, release-after-strobes order and the rescinding
// release follow the card description; the two delays being parameters,
// their defaults and the dtack_oe output are this design's choices.
module dtack_gen #(
  parameter int unsigned DTACK_DELAY    = 1,
  parameter int unsigned RESCIND_CYCLES = 1
) (
  input  logic clk,
  input  logic reset_n,
  input  logic board_sel_sig_n,
  output logic dtack_n,
  output logic dtack_oe
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK, S_RESCIND} state_e;

  localparam int unsigned CW = 8;

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      dtack_n  <= 1'b1;
      dtack_oe <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          dtack_n  <= 1'b1;
          dtack_oe <= 1'b0;
          cnt      <= '0;
          if (!board_sel_sig_n) begin
            if (DTACK_DELAY == 0) begin
              state    <= S_ACK;
              dtack_n  <= 1'b0;
              dtack_oe <= 1'b1;
            end else begin
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: begin
          if (board_sel_sig_n) begin
            state <= S_IDLE;
          end else if (cnt == CW'(DTACK_DELAY - 1)) begin
            state    <= S_ACK;
            dtack_n  <= 1'b0;
            dtack_oe <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_ACK: begin
          if (board_sel_sig_n) begin
            dtack_n <= 1'b1;
            cnt     <= '0;
            if (RESCIND_CYCLES == 0) begin
              dtack_oe <= 1'b0;
              state    <= S_IDLE;
            end else begin
              state <= S_RESCIND;
            end
          end
        end
        S_RESCIND: begin
          if (cnt == CW'(RESCIND_CYCLES - 1)) begin
            dtack_oe <= 1'b0;
            state    <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* is only ever pulled low while it is driven.
  a_low_only_when_driven: assert property (@(posedge clk) disable iff (!reset_n)
    !dtack_n |-> dtack_oe);

endmodule
