// sample_counter: ROM address counter of a PSK modulator.
//
// Steps the ROM address through one carrier period: 0, 1, ...,
// SAMPLES_PER_SYMBOL-1, 0, ... advancing by one in every cycle in which en is
// high. Because one symbol is exactly one carrier period, address 0 always
// lines up with the start of a symbol.
//
// Interface: en comes from the control block's counter enable; addr drives
// the address input of one or more carrier ROMs. Synchronous active-high
// reset to 0. The 6-bit address width is the published one; the wrap at
// SAMPLES_PER_SYMBOL follows from the 10-sample carrier tables, and the reset
// is this design's choice.
module sample_counter #(
  parameter int unsigned ADDR_W             = psk_pkg::ADDR_W,
  parameter int unsigned SAMPLES_PER_SYMBOL = psk_pkg::SAMPLES_PER_SYMBOL
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  output logic [ADDR_W-1:0] addr
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(SAMPLES_PER_SYMBOL - 1);

  always_ff @(posedge clk) begin
    if (rst)     addr <= '0;
    else if (en) addr <= (addr == LAST) ? '0 : addr + 1'b1;
  end

  a_in_range : assert property (@(posedge clk) disable iff (rst) addr <= LAST);

endmodule
