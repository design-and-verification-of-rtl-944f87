// Behavioural receiver of the serial DAC interface (not synthesizable).
//
// Shifts sdac_sdin in on each falling edge of sdac_sclk while sdac_sync_n is
// low, and on the rising edge of sdac_sync_n reports the received word in
// last_word, the number of bits received in last_bits, and increments
// frames. A DAC with this timing takes the word at the same points.
module sdac_model (
  input  logic        sdac_sync_n,
  input  logic        sdac_sclk,
  input  logic        sdac_sdin,
  output logic [15:0] last_word,
  output int          last_bits,
  output int          frames
);
  logic [15:0] sh;
  int          nbits;

  initial begin
    sh = '0; nbits = 0; last_word = '0; last_bits = 0; frames = 0;
  end

  always @(negedge sdac_sclk) begin
    if (!sdac_sync_n) begin
      sh    = {sh[14:0], sdac_sdin};
      nbits = nbits + 1;
    end
  end

  always @(posedge sdac_sync_n) begin
    last_word = sh;
    last_bits = nbits;
    frames    = frames + 1;
    nbits     = 0;
  end

  always @(negedge sdac_sync_n) nbits = 0;
endmodule
