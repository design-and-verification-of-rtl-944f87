// Tri-state bus logic: register read multiplexer and D00-D15 driver.
//
// During a selected read cycle (board_sel_sig_n low, write_n high) the
// register addressed by A03-A01 is driven onto the bidirectional data bus:
//   100 read-back/convert register (last ADC result)
//   101 diagnostic register 1, 110 diagnostic register 2
//   111 status register (bit 0 = read-back busy)
//   000-011 DAC registers are write-only and read as 0000.
// During an interrupt acknowledge cycle answered by this card (int_sel_n
// low) the interrupter's 16-bit status/ID is driven instead. At all other
// times the FPGA pins are high impedance and the bus is sampled into
// data_from_bus for the register writes. buf_en_n is low whenever the FPGA
// drives the bus; it can steer the direction of the board's data
// transceivers.
//
// The read multiplexer and the tri-state drive follow the card description.
// Reading DAC registers as zero, the status/ID path and the buf_en_n output
// are this design's choices.
module tri_state_bus_logic
  import vme_aoc_pkg::*;
(
  input  logic              board_sel_sig_n,
  input  logic              write_n,
  input  logic [2:0]        vme_addr,        // A03-A01
  input  logic [DATA_W-1:0] adc_data,        // read-back/convert register
  input  logic [DATA_W-1:0] diag_reg_out1,
  input  logic [DATA_W-1:0] diag_reg_out2,
  input  logic [DATA_W-1:0] status_reg,
  input  logic              int_sel_n,
  input  logic [DATA_W-1:0] int_status_id,
  inout  wire  [DATA_W-1:0] bidir_data_bus,
  output logic [DATA_W-1:0] data_from_bus,
  output logic              buf_en_n
);

  logic [DATA_W-1:0] rd_data;

  always_comb begin
    unique case (reg_addr_e'(vme_addr))
      REG_RDBK:   rd_data = adc_data;
      REG_DIAG1:  rd_data = diag_reg_out1;
      REG_DIAG2:  rd_data = diag_reg_out2;
      REG_STATUS: rd_data = status_reg;
      default:    rd_data = '0;
    endcase
    if (!int_sel_n) rd_data = int_status_id;
  end

  assign buf_en_n       = !((!board_sel_sig_n && write_n) || !int_sel_n);
  assign bidir_data_bus = buf_en_n ? 'z : rd_data;
  assign data_from_bus  = bidir_data_bus;

endmodule
