// Latch and synchronisation block of the VME slave.
//
// The VME control lines are asynchronous to the FPGA clock. Each of AS*,
// DS0*, DS1*, WRITE*, IACK*, IACKIN* and LWORD* passes through a chain of
// SYNC_STAGES flip-flops (default 2) before any logic looks at it, which
// keeps metastability out of the decoders and state machines.
//
// The address A23-A01 and the address modifier AM5-AM0 are latched at the
// falling edge of AS*. In the clock domain this is done by letting the latch
// follow the bus while the synchronised AS* is high and freezing it once the
// synchronised AS* is low. Because the synchronised AS* lags the pin by
// SYNC_STAGES clocks, the value frozen was sampled after the real AS* edge,
// when the master already held address and modifier stable. The latched
// values are therefore valid in the same cycle in which sync_as_n first
// reads low, and they stay valid until AS* is released.
//
// Interface: raw VME pins in, synchronised strobes and latched address out.
// Latency from a pin to its synchronised copy: SYNC_STAGES clocks.
// Latching address and modifier and synchronising the strobes follows the
// card description; the number of stages is this design's choice.
module latch_sync_blk #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic [23:1] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic        vme_ds_0_n,
  input  logic        vme_ds_1_n,
  input  logic        vme_iack_in,   // IACKIN* daisy chain, active low
  input  logic        vme_iack_n,
  input  logic        vme_lword_n,
  input  logic        vme_write_n,
  output logic [23:1] addr_l,
  output logic [5:0]  am_l,
  output logic        sync_as_n,
  output logic        sync_ds_0_n,
  output logic        sync_ds_1_n,
  output logic        sync_iack_in,
  output logic        sync_iack_n,
  output logic        sync_lword_n,
  output logic        sync_write_n
);

  localparam int unsigned NSIG = 7;

  logic [NSIG-1:0] raw;
  logic [NSIG-1:0] chain [SYNC_STAGES];

  assign raw = {vme_as_n, vme_ds_0_n, vme_ds_1_n, vme_iack_in,
                vme_iack_n, vme_lword_n, vme_write_n};

  // All strobes are active low: reset the chains to "released".
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) chain[i] <= '1;
    end else begin
      chain[0] <= raw;
      for (int i = 1; i < SYNC_STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign {sync_as_n, sync_ds_0_n, sync_ds_1_n, sync_iack_in,
          sync_iack_n, sync_lword_n, sync_write_n} = chain[SYNC_STAGES-1];

  // Address and address modifier latch, frozen while AS* is asserted.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      addr_l <= '0;
      am_l   <= '0;
    end else if (sync_as_n) begin
      addr_l <= vme_addr;
      am_l   <= vme_am;
    end
  end

endmodule
