// control_block: timing generator of a PSK modulator.
//
// It sets the pace of the whole transmitter. A clock divider raises one
// "sample tick" every CLKS_PER_SAMPLE cycles; that tick is both rom_en (the
// ROMs load their next sample) and counter_en (the ROM address counters step).
// A sample index counts ticks modulo SAMPLES_PER_SYMBOL; on the tick where it
// is 0 a new symbol starts, so bit_separator_en is raised for that one cycle
// and the bit separator presents the next symbol together with the first
// carrier sample. data_counter counts the symbols started since reset
// (wrapping at 2**32).
//
// Timing: synchronous active-high reset. The divider comes out of reset at
// its last count, so the first tick (and the first bit_separator_en) occurs
// in the first cycle after rst is released; after that a tick every
// CLKS_PER_SAMPLE cycles and a symbol every CLKS_PER_SAMPLE*SAMPLES_PER_SYMBOL
// cycles (20 at the defaults).
//
// The output names follow the published block symbol (data_counter,
// bit_separator, counter, rom); that the enables are single-cycle strobes,
// the reset input and the meaning of data_counter are this design's choices.
module control_block #(
  parameter int unsigned CLKS_PER_SAMPLE    = psk_pkg::CLKS_PER_SAMPLE,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] data_counter,
  output logic        bit_separator_en,
  output logic        counter_en,
  output logic        rom_en
);

  localparam int unsigned DIV_W = (CLKS_PER_SAMPLE > 1) ? $clog2(CLKS_PER_SAMPLE) : 1;
  localparam int unsigned IDX_W = (SAMPLES_PER_SYMBOL > 1) ? $clog2(SAMPLES_PER_SYMBOL) : 1;
  localparam logic [DIV_W-1:0] DIV_LAST = DIV_W'(CLKS_PER_SAMPLE - 1);
  localparam logic [IDX_W-1:0] IDX_LAST = IDX_W'(SAMPLES_PER_SYMBOL - 1);

  logic [DIV_W-1:0] div_q;
  logic [IDX_W-1:0] idx_q;
  logic             tick;

  assign tick             = (div_q == DIV_LAST);
  assign rom_en           = tick;
  assign counter_en       = tick;
  assign bit_separator_en = tick && (idx_q == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q        <= DIV_LAST;
      idx_q        <= '0;
      data_counter <= '0;
    end else begin
      div_q <= tick ? '0 : div_q + 1'b1;
      if (tick) idx_q <= (idx_q == IDX_LAST) ? '0 : idx_q + 1'b1;
      if (bit_separator_en) data_counter <= data_counter + 1'b1;
    end
  end

  // A symbol only ever starts on a sample tick.
  a_symbol_on_tick : assert property (@(posedge clk) disable iff (rst)
    bit_separator_en |-> rom_en);

endmodule
