// carrier_rom: synchronous ROM holding one period of a phase-shifted carrier.
//
// Word k (k = 0 .. SAMPLES_PER_SYMBOL-1) holds the IEEE-754 single-precision
// value of sin(2*pi*k/SAMPLES_PER_SYMBOL + PHASE_DEG degrees). The table is
// computed at elaboration by psk_pkg::carrier_sample, so the ROM can be
// rebuilt for any phase or period length by changing the parameters.
//
// Interface and timing follow the published ROM symbol: address, clock, clken
// and q. On a rising clock edge with clken high, q takes the word at address
// (one cycle of latency); with clken low q holds. Addresses beyond the last
// word read as 0. q has no reset: it is defined from the first enabled edge.
// With the default 10 words of 32 bits one ROM is 320 bits; the two ROMs of
// the BPSK modulator make 640 bits and the four of the QPSK modulator 1280
// bits, the published memory totals.
module carrier_rom #(
  parameter int          PHASE_DEG          = psk_pkg::QPSK_PH2_DEG,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned ADDR_W             = psk_pkg::ADDR_W
) (
  input  logic                  clock,
  input  logic                  clken,
  input  logic [ADDR_W-1:0]     address,
  output psk_pkg::sample_t      q
);

  typedef psk_pkg::sample_t table_t [SAMPLES_PER_SYMBOL];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < int'(SAMPLES_PER_SYMBOL); k++)
      t[k] = psk_pkg::carrier_sample(k, int'(SAMPLES_PER_SYMBOL), PHASE_DEG);
    return t;
  endfunction

  localparam table_t TABLE = make_table();
  localparam int unsigned IDX_W = (SAMPLES_PER_SYMBOL > 1) ? $clog2(SAMPLES_PER_SYMBOL) : 1;

  always_ff @(posedge clock) begin
    if (clken) begin
      if (32'(address) < SAMPLES_PER_SYMBOL) q <= TABLE[address[IDX_W-1:0]];
      else                                   q <= '0;
    end
  end

endmodule
