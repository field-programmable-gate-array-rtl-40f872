// tb_bpsk_modulator: end-to-end check of the BPSK modulator at its default
// sizes (14-bit words, 10 samples per bit, 2 clocks per sample, 50 MHz).
//
// The first word is 01000111100100, the one of the published BPSK waveform;
// then random words follow, each offered on data_in until word_load takes it.
// After every clock edge the testbench predicts, from its own record of the
// words taken, the bit being sent (most significant first) and the carrier
// sample index, and checks:
//   * data_out against sin(2*pi*k/10 + 90 deg) for a 1 and + 270 deg for a 0,
//     computed here with $sin, within 1e-6;
//   * the bit-exact words of the published waveform for the bits 1 and 0;
//   * d_out and data_counter;
//   * the rate: a new sample every 2 clocks, a bit every 20 clocks (400 ns),
//     a word taken every 280 clocks.
// It also counts both symbol values and the phase reversals between bits.
module tb_bpsk_modulator;
  import tb_util_pkg::*;
  localparam int N = 10, CPS = 2, SYMS = 14, PERIOD = N * CPS;
  localparam logic [31:0] ONE_WORDS [N] = '{32'h3F800000, 32'h3F4F1BBD, 32'h3E9E377A,
      32'hBE9E377A, 32'hBF4F1BBD, 32'hBF800000, 32'hBF4F1BBD, 32'hBE9E377A, 32'h3E9E377A,
      32'h3F4F1BBD};

  logic        clk = 0, rst = 1;
  logic [13:0] data_in;
  logic [31:0] data_out, data_counter;
  logic        word_load, d_out;
  logic        bits [$];
  logic        cur, prev_bit;
  logic        took;
  int checks = 0, failures = 0, ones = 0, zeros = 0, reversals = 0, loads = 0;

  bpsk_modulator dut (.clk, .rst, .data_in, .data_out, .word_load, .data_counter, .d_out);

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  initial begin
    data_in = 14'b01000111100100;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 30 * SYMS * PERIOD; n++) begin
      // before edge n
      took = word_load;
      check(word_load == (n % (SYMS * PERIOD) == 0), $sformatf("cycle %0d: word_load %0b", n, word_load));
      if (n % PERIOD == 0) begin
        if (word_load) begin
          for (int b = 13; b >= 0; b--) bits.push_back(data_in[b]);
          loads++;
        end
        prev_bit = cur;
        cur = bits.pop_front();
        if (cur) ones++; else zeros++;
        if (n > 0 && cur != prev_bit) reversals++;
      end
      @(posedge clk);
      #1;
      if (took) data_in = 14'($urandom);
      check(d_out == cur, $sformatf("cycle %0d: d_out %0b expected %0b", n, d_out, cur));
      check(data_counter == 32'(n / PERIOD + 1), $sformatf("cycle %0d: data_counter %0d", n, data_counter));
      check(close_to(data_out, ref_sample((n / CPS) % N, N, bpsk_phase(cur))),
            $sformatf("cycle %0d: data_out %h for bit %0b sample %0d", n, data_out, cur, (n / CPS) % N));
      if (cur)
        check(data_out == ONE_WORDS[(n / CPS) % N], $sformatf("cycle %0d: word %h", n, data_out));
      else
        check(data_out == {~ONE_WORDS[(n / CPS) % N][31], ONE_WORDS[(n / CPS) % N][30:0]},
              $sformatf("cycle %0d: word %h", n, data_out));
    end
    check(ones > 0 && zeros > 0, "both bit values must occur");
    check(reversals > 0, "no phase reversal happened");
    check(loads == 30, $sformatf("%0d words taken", loads));
    $display("bits 1: %0d, bits 0: %0d, phase reversals: %0d, words: %0d", ones, zeros, reversals, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
