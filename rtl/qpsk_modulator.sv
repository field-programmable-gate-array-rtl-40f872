// qpsk_modulator: mux-based QPSK modulator.
//
// Four ROMs hold one carrier period each at the four QPSK phases, and a 4:1
// mux picks one of them sample by sample according to the current dibit:
//     dibit 11 -> ph1, sin(wt + 315 deg)
//     dibit 10 -> ph2, sin(wt +  45 deg)
//     dibit 01 -> ph3, sin(wt + 225 deg)
//     dibit 00 -> ph4, sin(wt + 135 deg)
// Each 14-bit ADC word on data_in is sent as 7 dibits, most significant first.
// No multiplier and no I/Q mixing is needed: the constellation point is chosen
// by selecting a pre-computed waveform.
//
// Structure: control_block (enables) -> four sample_counter (one per ROM, as
// in the published design, all stepping together) -> four carrier_rom ->
// gate_of_mux, with bit_separator (2-bit symbols) choosing the mux input.
//
// Timing at the defaults: a new 32-bit single-precision sample every 2 clocks,
// 10 samples per dibit, 20 clocks per dibit: 400 ns per two bits, 5 Mbit/s at
// a 50 MHz clock. data_out is valid from the second clock after rst is
// released. word_load is high in the cycle in which data_in is sampled (once
// every 7 dibits); d_out is the dibit currently being sent and data_counter
// the number of symbols started since reset.
//
// The phases of ph1, ph2 and ph4 are read off the published simulation
// waveform (dibits 11, 10 and 00); ph3 = 225 degrees is the remaining QPSK
// phase. The reset input, word_load, d_out and data_counter are this design's additions, and
// data_out is 32 bits wide as in the published sample output and pin count.
module qpsk_modulator #(
  parameter int unsigned DATA_W             = psk_pkg::DATA_W,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned CLKS_PER_SAMPLE    = psk_pkg::CLKS_PER_SAMPLE
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in,
  output psk_pkg::sample_t  data_out,
  output logic              word_load,
  output logic [31:0]       data_counter,
  output logic [1:0]        d_out
);

  localparam int unsigned ADDR_W = psk_pkg::ADDR_W;
  // ROM phase for mux input i (i = dibit value): index 3 is ph1 ... 0 is ph4.
  localparam int PHASE_OF_SEL [4] = '{psk_pkg::QPSK_PH4_DEG, psk_pkg::QPSK_PH3_DEG,
                                      psk_pkg::QPSK_PH2_DEG, psk_pkg::QPSK_PH1_DEG};

  logic              bsep_en, cnt_en, rom_en;
  logic [ADDR_W-1:0] address [4];
  psk_pkg::sample_t  ph [4];      // ph[3] = ph1 ... ph[0] = ph4

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

  for (genvar i = 0; i < 4; i++) begin : g_phase
    sample_counter #(
      .ADDR_W            (ADDR_W),
      .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL)
    ) u_counter (
      .clk (clk),
      .rst (rst),
      .en  (cnt_en),
      .addr(address[i])
    );

    carrier_rom #(
      .PHASE_DEG         (PHASE_OF_SEL[i]),
      .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL),
      .ADDR_W            (ADDR_W)
    ) u_rom (
      .clock  (clk),
      .clken  (rom_en),
      .address(address[i]),
      .q      (ph[i])
    );
  end

  bit_separator #(
    .DATA_W(DATA_W),
    .SYM_W (2)
  ) u_bit_separator (
    .clk      (clk),
    .rst      (rst),
    .clk_en   (bsep_en),
    .d_in     (data_in),
    .d_out    (d_out),
    .word_load(word_load)
  );

  gate_of_mux #(
    .SEL_W(2),
    .W    (psk_pkg::SAMPLE_W)
  ) u_gate_of_mux (
    .data  (ph),
    .sel   (d_out),
    .result(data_out)
  );

  a_symbol_at_address_0 : assert property (@(posedge clk) disable iff (rst)
    bsep_en |-> (address[0] == '0));

endmodule
