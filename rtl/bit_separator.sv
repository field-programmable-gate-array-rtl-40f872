// bit_separator: splits ADC words into modulation symbols.
//
// Each DATA_W-bit word from the ADC is sent as DATA_W/SYM_W symbols of SYM_W
// bits, most significant bits first: SYM_W = 1 gives the single bits of BPSK,
// SYM_W = 2 the dibits of QPSK (a 14-bit word becomes 14 or 7 symbols).
// On every clk_en strobe d_out moves on to the next symbol. When the previous
// word is used up, that strobe samples d_in directly, presents its top SYM_W
// bits and keeps the rest in a shift register; word_load is high in exactly
// that cycle, telling the data source that d_in is being taken and may change
// after the clock edge.
//
// Timing: d_out is registered and changes only on the clock edge of an enabled
// cycle; synchronous active-high reset clears d_out and makes the first strobe
// load a new word. The published block has clk, clk_en, d_in[13..0] and d_out;
// the MSB-first order follows the published QPSK waveform, in which the
// dibits 00 then 11 of the word ...0011 are sent in that order. The reset and
// word_load ports are this design's additions.
module bit_separator #(
  parameter int unsigned DATA_W = psk_pkg::DATA_W,
  parameter int unsigned SYM_W  = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clk_en,
  input  logic [DATA_W-1:0] d_in,
  output logic [SYM_W-1:0]  d_out,
  output logic              word_load
);

  localparam int unsigned SYMS  = DATA_W / SYM_W;
  localparam int unsigned CNT_W = $clog2(SYMS + 1);

  logic [DATA_W-1:0] word_q;
  logic [CNT_W-1:0]  left_q;   // symbols of the current word still to send

  assign word_load = clk_en && (left_q == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      word_q <= '0;
      left_q <= '0;
      d_out  <= '0;
    end else if (clk_en) begin
      if (left_q == '0) begin
        d_out  <= d_in[DATA_W-1 -: SYM_W];
        word_q <= d_in << SYM_W;
        left_q <= CNT_W'(SYMS - 1);
      end else begin
        d_out  <= word_q[DATA_W-1 -: SYM_W];
        word_q <= word_q << SYM_W;
        left_q <= left_q - 1'b1;
      end
    end
  end

  initial begin
    assert (DATA_W % SYM_W == 0)
      else $error("bit_separator: DATA_W (%0d) must be a multiple of SYM_W (%0d)", DATA_W, SYM_W);
  end

endmodule
