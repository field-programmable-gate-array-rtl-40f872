// psk_modulators_top: the BPSK and the QPSK modulator side by side.
//
// Both modulators turn 14-bit ADC words into a stream of 32-bit
// single-precision carrier samples by choosing, per symbol, one of several
// stored carrier phases. They share the clock and reset but are otherwise
// independent, each with its own ADC word input, word_load strobe, current
// symbol, symbol count and sample output, so the two can be compared cycle by cycle: at the
// same 400 ns symbol time QPSK carries two bits per symbol and BPSK one.
// The ADCs that produce the words are outside this design.
module psk_modulators_top #(
  parameter int unsigned DATA_W             = psk_pkg::DATA_W,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned CLKS_PER_SAMPLE    = psk_pkg::CLKS_PER_SAMPLE
) (
  input  logic              clk,
  input  logic              rst,
  // BPSK channel
  input  logic [DATA_W-1:0] bpsk_data_in,
  output psk_pkg::sample_t  bpsk_data_out,
  output logic              bpsk_word_load,
  output logic [31:0]       bpsk_data_counter,
  output logic              bpsk_d_out,
  // QPSK channel
  input  logic [DATA_W-1:0] qpsk_data_in,
  output psk_pkg::sample_t  qpsk_data_out,
  output logic              qpsk_word_load,
  output logic [31:0]       qpsk_data_counter,
  output logic [1:0]        qpsk_d_out
);

  bpsk_modulator #(
    .DATA_W            (DATA_W),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL),
    .CLKS_PER_SAMPLE   (CLKS_PER_SAMPLE)
  ) u_bpsk (
    .clk      (clk),
    .rst      (rst),
    .data_in  (bpsk_data_in),
    .data_out (bpsk_data_out),
    .word_load(bpsk_word_load),
    .data_counter(bpsk_data_counter),
    .d_out    (bpsk_d_out)
  );

  qpsk_modulator #(
    .DATA_W            (DATA_W),
    .SAMPLES_PER_SYMBOL(SAMPLES_PER_SYMBOL),
    .CLKS_PER_SAMPLE   (CLKS_PER_SAMPLE)
  ) u_qpsk (
    .clk      (clk),
    .rst      (rst),
    .data_in  (qpsk_data_in),
    .data_out (qpsk_data_out),
    .word_load(qpsk_word_load),
    .data_counter(qpsk_data_counter),
    .d_out    (qpsk_d_out)
  );

endmodule
