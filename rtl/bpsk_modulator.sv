// bpsk_modulator: mux-based BPSK modulator.
//
// Instead of multiplying the carrier by the data, the modulator keeps two
// copies of one carrier period in ROM, Sin_ph1 (sin(wt + 90 deg), sent for a
// 1) and Sin_ph2 (the same carrier shifted by 180 degrees, sent for a 0), and
// picks one of them sample by sample with a 2:1 mux driven by the current
// data bit. Each 14-bit ADC word on data_in is sent as 14 symbols, most
// significant bit first.
//
// Structure: control_block (enables) -> sample_counter (ROM address) -> two
// carrier_rom -> gate_of_mux, with bit_separator choosing the mux input.
//
// Timing at the defaults: a new 32-bit single-precision sample every 2 clocks,
// 10 samples (one carrier period) per bit, so 20 clocks per bit: 400 ns and
// 2.5 Mbit/s at a 50 MHz clock. data_out is valid from the second clock after
// rst is released. word_load is high in the cycle in which data_in is sampled
// (once every 14 bits); the source must hold data_in valid in that cycle.
// d_out is the bit currently being sent and data_counter the number of
// symbols started since reset.
//
// The block list, the ROM names and phases, the mux selection, the widths and
// the timing follow the published design; the reset input, word_load and the
// d_out and data_counter outputs are this design's additions. data_out is 32 bits wide: the
// published block symbol labels it [13..0], but its sample outputs and pin
// count are 32-bit.
module bpsk_modulator #(
  parameter int unsigned DATA_W             = psk_pkg::DATA_W,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned CLKS_PER_SAMPLE    = psk_pkg::CLKS_PER_SAMPLE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DATA_W-1:0] data_in,
  output psk_pkg::sample_t data_out,
  output logic             word_load,
  output logic [31:0]      data_counter,
  output logic             d_out
);

  localparam int unsigned ADDR_W = psk_pkg::ADDR_W;

  logic              bsep_en, cnt_en, rom_en;
  logic [ADDR_W-1:0] address;
  psk_pkg::sample_t  sin_ph [2];   // [1] = Sin_ph1 (bit 1), [0] = Sin_ph2 (bit 0)

  control_block #(
    .CLKS_PER_SAMPLE   (CLKS_PER_SAMPLE),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL)
  ) u_control (
    .clk             (clk),
    .rst             (rst),
    .data_counter    (data_counter),
    .bit_separator_en(bsep_en),
    .counter_en      (cnt_en),
    .rom_en          (rom_en)
  );

  sample_counter #(
    .ADDR_W            (ADDR_W),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL)
  ) u_counter (
    .clk (clk),
    .rst (rst),
    .en  (cnt_en),
    .addr(address)
  );

  carrier_rom #(
    .PHASE_DEG         (psk_pkg::BPSK_PH1_DEG),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL),
    .ADDR_W            (ADDR_W)
  ) u_sin_ph1 (
    .clock  (clk),
    .clken  (rom_en),
    .address(address),
    .q      (sin_ph[1])
  );

  carrier_rom #(
    .PHASE_DEG         (psk_pkg::BPSK_PH2_DEG),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL),
    .ADDR_W            (ADDR_W)
  ) u_sin_ph2 (
    .clock  (clk),
    .clken  (rom_en),
    .address(address),
    .q      (sin_ph[0])
  );

  bit_separator #(
    .DATA_W(DATA_W),
    .SYM_W (1)
  ) u_bit_separator (
    .clk      (clk),
    .rst      (rst),
    .clk_en   (bsep_en),
    .d_in     (data_in),
    .d_out    (d_out),
    .word_load(word_load)
  );

  gate_of_mux #(
    .SEL_W(1),
    .W    (psk_pkg::SAMPLE_W)
  ) u_gate_of_mux (
    .data  (sin_ph),
    .sel   (d_out),
    .result(data_out)
  );

  // The ROM address counter and the control block's symbol timing agree:
  // every symbol starts at carrier sample 0.
  a_symbol_at_address_0 : assert property (@(posedge clk) disable iff (rst)
    bsep_en |-> (address == '0));

endmodule
