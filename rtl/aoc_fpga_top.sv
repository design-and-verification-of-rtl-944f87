// FPGA of a VME64x analog output card: A16/A24 D16 slave, four-channel DAC
// control, read-back control and D16 interrupter.
//
// The card drives four analog outputs from DACs and can read back either a
// DAC output or the field current of an output through two levels of analog
// multiplexers and an ADC. The FPGA sits between the VME bus and these
// parts. Eight 16-bit registers, selected by A03-A01, make up its whole
// programming model:
//   000-011 DAC 0-3 (write: 14-bit code; 011 also loads the serial DAC)
//   100     read back / convert (write: start conversion of channel
//           D02-D00; read: last ADC result)
//   101,110 diagnostic registers 1 and 2 (read/write)
//   111     status (read: bit 0 = conversion busy) / reset (write: any
//           value resets the card functions)
//
// Data flow: latch_sync_blk synchronises the VME strobes and latches the
// address at AS*; add_am_dec turns a matching access into board_sel_sig_n;
// dtack_gen answers with DTACK*; each register block takes its write on the
// falling edge of the select; tri_state_bus_logic drives read data. The
// interrupter shares the DTACK* generator and the data driver for its
// acknowledge cycles. sw_reset_gen makes the reset of the card-function
// blocks.
//
// Timing at the default parameters: a register access sees DTACK* fall
// 2 (synchroniser) + 1 (decoder) + 2 (DTACK delay) clocks after the data
// strobes fall, and DTACK* rise 2 + 1 + 1 clocks after they rise.
//
// The block partition, the register map and the pin names follow the card
// description. The dtack_oe, data_buf_en_n, card IRQ request and a24_mode
// ports are this design's additions: the board needs an enable for its
// open-collector DTACK* and data transceivers, and the interrupter needs its
// sources.
module aoc_fpga_top
  import vme_aoc_pkg::*;
#(
  parameter int unsigned SYNC_STAGES    = 2,
  parameter int unsigned DTACK_DELAY    = 1,
  parameter int unsigned RESCIND_CYCLES = 1,
  parameter int unsigned DAC_WR_SETUP   = 1,
  parameter int unsigned DAC_WR_PULSE   = 2,
  parameter int unsigned SCLK_HALF      = 2,
  parameter int unsigned SETTLE_CYCLES  = 500,
  parameter int unsigned ADC_RC_PULSE   = 2,
  parameter int unsigned RST_PULSE      = 16,
  parameter logic [15:0] STATUS_ID_BASE = 16'h00A0
) (
  input  logic              clk,
  input  logic              reset_n,
  // VME bus
  input  logic [23:1]       vme_addr,
  input  logic              vme_as_n,
  input  logic [5:0]        vme_am,
  input  logic [4:0]        vme_ga_n,
  input  logic              vme_lword_n,
  input  logic              vme_iack_n,
  input  logic              vme_iack_in,
  input  logic              vme_ds_1_n,
  input  logic              vme_ds_0_n,
  input  logic              vme_write_n,
  inout  wire  [15:0]       bidir_data_bus,
  output logic              board_sel_sig_n,
  output logic              dtack_n,
  output logic              dtack_oe,
  output logic              data_buf_en_n,
  output logic              iack_out,
  output logic [6:0]        irq7_1,
  // card interrupt sources (level n on irq_req[n-1])
  input  logic [6:0]        irq_req,
  // parallel DAC
  output logic              dac_wr_n,
  output logic              dac_clr_n,
  output logic [DAC_W-1:0]  dac_data,
  output logic [1:0]        dac_addr,
  // serial DAC
  output logic              sdac_sync_n,
  output logic              sdac_sclk,
  output logic              sdac_sdin,
  output logic              sdac_clr_n,
  output logic              sdac_rstin_n,
  output logic              busy_bit,
  // read back: multiplexers and ADC
  output logic              adc_rc_n,
  input  logic              adc_busy_n,
  input  logic [15:0]       adc_data,
  output logic [15:0]       data_out,
  output logic [1:0]        mux_1_sel,
  output logic [2:0]        mux_2_sel,
  output logic              a24_mode
);

  logic [23:1]       addr_l;
  logic [5:0]        am_l;
  logic              sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_in;
  logic              sync_iack_n, sync_lword_n, sync_write_n;
  logic              card_rst_n, rdbk_busy, int_sel_n, ack_sel_n;
  logic [DATA_W-1:0] data_from_bus, diag1, diag2, status_reg, status_id;

  latch_sync_blk #(.SYNC_STAGES(SYNC_STAGES)) u_lsync (
    .clk, .reset_n, .vme_addr, .vme_am, .vme_as_n, .vme_ds_0_n, .vme_ds_1_n,
    .vme_iack_in, .vme_iack_n, .vme_lword_n, .vme_write_n,
    .addr_l, .am_l, .sync_as_n, .sync_ds_0_n, .sync_ds_1_n, .sync_iack_in,
    .sync_iack_n, .sync_lword_n, .sync_write_n);

  add_am_dec u_adec (
    .clk, .reset_n, .vme_addr(addr_l), .vme_am(am_l), .vme_ga_n,
    .sync_as_n, .sync_ds_0_n, .sync_ds_1_n, .sync_iack_n, .sync_lword_n,
    .board_sel_sig_n, .a24_mode);

  vme_interrupter #(.STATUS_ID_BASE(STATUS_ID_BASE)) u_int (
    .clk, .reset_n, .irq_req, .vme_addr(addr_l[3:1]), .sync_as_n, .sync_ds_0_n,
    .sync_iack_n, .sync_iack_in, .irq7_1, .iack_out, .int_sel_n,
    .status_id);

  // DTACK* answers both register accesses and interrupt acknowledges.
  assign ack_sel_n = board_sel_sig_n & int_sel_n;

  dtack_gen #(.DTACK_DELAY(DTACK_DELAY), .RESCIND_CYCLES(RESCIND_CYCLES)) u_dtack (
    .clk, .reset_n, .board_sel_sig_n(ack_sel_n), .dtack_n, .dtack_oe);

  sw_reset_gen #(.RST_PULSE(RST_PULSE)) u_swrst (
    .clk, .reset_n, .board_sel_sig_n, .write_n(sync_write_n),
    .vme_addr(addr_l[3:1]), .card_rst_n);

  reg_diag u_diag (
    .clk, .reset_n(card_rst_n), .board_sel_sig_n, .write_n(sync_write_n),
    .diag_reg_addr_in(addr_l[3:1]), .data_from_bus,
    .diag_reg_out1(diag1), .diag_reg_out2(diag2));

  assign status_reg = {{(DATA_W-1){1'b0}}, rdbk_busy};

  tri_state_bus_logic u_tsb (
    .board_sel_sig_n, .write_n(sync_write_n), .vme_addr(addr_l[3:1]),
    .adc_data(data_out), .diag_reg_out1(diag1), .diag_reg_out2(diag2),
    .status_reg, .int_sel_n, .int_status_id(status_id), .bidir_data_bus,
    .data_from_bus, .buf_en_n(data_buf_en_n));

  parallel_dac_if #(.WR_SETUP(DAC_WR_SETUP), .WR_PULSE(DAC_WR_PULSE)) u_pdac (
    .clk, .reset_n(card_rst_n), .board_sel_sig_n, .write_n(sync_write_n),
    .vme_addr(addr_l[3:1]), .vme_data(data_from_bus[DAC_W-1:0]),
    .dac_addr, .dac_data, .dac_wr_n, .dac_clr_n);

  serial_dac_if #(.SCLK_HALF(SCLK_HALF)) u_sdac (
    .clk, .reset_n(card_rst_n), .board_sel_sig_n, .write_n(sync_write_n),
    .vme_addr(addr_l[3:1]), .data_from_bus, .busy_bit, .sdac_clr_n,
    .sdac_rstin_n, .sdac_sclk, .sdac_sdin, .sdac_sync_n);

  read_back_ctrl #(.SETTLE_CYCLES(SETTLE_CYCLES), .RC_PULSE(ADC_RC_PULSE)) u_rdbk (
    .clk, .reset_n(card_rst_n), .board_sel_sig_n, .write_n(sync_write_n),
    .vme_addr(addr_l[3:1]), .data_from_bus, .adc_busy_n, .adc_data,
    .adc_rc_n, .data_out, .mux_1_sel, .mux_2_sel, .busy(rdbk_busy));

endmodule
