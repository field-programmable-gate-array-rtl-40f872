// gate_of_mux: the output multiplexer of a PSK modulator.
//
// Passes one of 2**SEL_W carrier-ROM outputs to the modulator output,
// choosing input data[sel]. With SEL_W = 1 it is the BPSK mux (data[1] is the
// carrier for bit 1, data[0] the inverted carrier for bit 0); with SEL_W = 2
// it is the QPSK mux (data[3] .. data[0] carry the phases of symbols 11 .. 00).
// sel is the bit separator's d_out.
//
// Purely combinational; the published block (data1x/data0x or
// data3x..data0x, sel, result) has no register either. The array-style data
// port replaces the individually named inputs.
module gate_of_mux #(
  parameter int unsigned SEL_W = 2,
  parameter int unsigned W     = psk_pkg::SAMPLE_W
) (
  input  logic [W-1:0]     data [2**SEL_W],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     result
);

  always_comb result = data[sel];

endmodule
