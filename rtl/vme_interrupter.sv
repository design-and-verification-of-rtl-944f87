// D16 interrupter with seven independent request levels.
//
// Each of the seven board request inputs irq_req[n-1] (n = 1..7) owns VME
// interrupt level n. A rising edge on a request input makes it pending, and
// a pending level drives its IRQn* line (irq7_1[n-1] = 1 means "pull IRQn*
// low" through the board's open-collector driver).
//
// The interrupt handler answers with an interrupt acknowledge cycle: IACK*
// low, the level being acknowledged on A03-A01, AS* and DS0* low, and the
// daisy-chain input IACKIN* low once every card in front of this one has
// passed the acknowledge on. When IACKIN* and DS0* are seen low the
// interrupter decides once per cycle:
//   - level pending here: it answers (int_sel_n low) with the 16-bit
//     status/ID {STATUS_ID_BASE[15:3], level} until the data strobe is
//     released, and the level stops being pending (release on
//     acknowledge);
//   - otherwise: it passes the acknowledge on by driving iack_out
//     (IACKOUT*, active low) low until IACKIN* is released.
// int_sel_n goes to the DTACK* generator and the data bus driver.
//
// That the card has a D16 interrupt interface for up to seven interrupts
// and the IACK*/IACKIN*/IACKOUT*/IRQ1*-IRQ7* pins follow the card
// description. The request inputs, release-on-acknowledge, and the status/ID
// format are this design's choices.
module vme_interrupter
  import vme_aoc_pkg::*;
#(
  parameter logic [15:0] STATUS_ID_BASE = 16'h00A0
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic [6:0]        irq_req,       // board requests, level 1..7
  input  logic [3:1]        vme_addr,      // latched A03-A01
  input  logic              sync_as_n,
  input  logic              sync_ds_0_n,
  input  logic              sync_iack_n,
  input  logic              sync_iack_in,  // IACKIN*, active low
  output logic [6:0]        irq7_1,
  output logic              iack_out,      // IACKOUT*, active low
  output logic              int_sel_n,
  output logic [DATA_W-1:0] status_id
);

  typedef enum logic [1:0] {S_IDLE, S_RESPOND, S_PASS} state_e;

  state_e     state;
  logic [6:0] pending, req_q, ack_clr;
  logic       ack_cycle, hit;
  logic [2:0] level;

  assign level     = vme_addr;
  assign ack_cycle = !sync_iack_n && !sync_as_n && !sync_ds_0_n && !sync_iack_in;
  assign hit       = (level != 3'd0) && pending[level - 3'd1];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      pending   <= '0;
      req_q     <= '0;
      int_sel_n <= 1'b1;
      iack_out  <= 1'b1;
      status_id <= '0;
    end else begin
      req_q   <= irq_req;
      pending <= (pending & ~ack_clr) | (irq_req & ~req_q);
      unique case (state)
        S_IDLE: begin
          if (ack_cycle) begin
            if (hit) begin
              state     <= S_RESPOND;
              int_sel_n <= 1'b0;
              status_id <= {STATUS_ID_BASE[15:3], level};
            end else begin
              state    <= S_PASS;
              iack_out <= 1'b0;
            end
          end
        end
        S_RESPOND: begin
          if (sync_ds_0_n) begin
            int_sel_n <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_PASS: begin
          if (sync_iack_in) begin
            iack_out <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The acknowledged level is cleared when the answer ends.
  always_comb begin
    ack_clr = '0;
    if (state == S_RESPOND && sync_ds_0_n) ack_clr[status_id[2:0] - 3'd1] = 1'b1;
  end

  assign irq7_1 = pending;

  // An acknowledge is either answered here or passed on, never both.
  a_answer_or_pass: assert property (@(posedge clk) disable iff (!reset_n) !(!int_sel_n && !iack_out));

endmodule
