// tb_qpsk_modulator: end-to-end check of the QPSK modulator at its default
// sizes (14-bit words as 7 dibits, 10 samples per dibit, 2 clocks per sample).
//
// The first word is 11011010110011, the one of the published QPSK waveform,
// and the second starts with 10, so that the published dibit sequence
// 00, 11, 10 is reproduced; random words follow. After every clock edge the
// testbench predicts the dibit being sent (most significant first) and the
// sample index, and checks:
//   * data_out against sin(2*pi*k/10 + phase), phase 315/45/225/135 deg for
//     dibit 11/10/01/00, computed here with $sin, within 1e-6;
//   * the ten bit-exact words the published waveform shows for dibit 11 and
//     the first word it shows for dibit 10;
//   * d_out and data_counter;
//   * the rate: a dibit every 20 clocks (two bits per 400 ns at 50 MHz), a
//     word taken every 140 clocks.
// It counts each of the four dibits and the phase changes between dibits.
module tb_qpsk_modulator;
  import tb_util_pkg::*;
  localparam int N = 10, CPS = 2, SYMS = 7, PERIOD = N * CPS;
  localparam logic [31:0] D11_WORDS [N] = '{32'hBF3504F3, 32'hBE20305B, 32'h3EE87171,
      32'h3F641901, 32'h3F7CD925, 32'h3F3504F3, 32'h3E20305B, 32'hBEE87171, 32'hBF641901,
      32'hBF7CD925};

  logic        clk = 0, rst = 1;
  logic [13:0] data_in;
  logic [31:0] data_out, data_counter;
  logic        word_load;
  logic [1:0]  d_out, cur, prev_sym;
  logic [1:0]  syms [$];
  logic        took;
  int checks = 0, failures = 0, changes = 0, loads = 0;
  int seen [4] = '{0, 0, 0, 0};

  qpsk_modulator dut (.clk, .rst, .data_in, .data_out, .word_load, .data_counter, .d_out);

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
    data_in = 14'b11011010110011;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 40 * SYMS * PERIOD; n++) begin
      took = word_load;
      check(word_load == (n % (SYMS * PERIOD) == 0), $sformatf("cycle %0d: word_load %0b", n, word_load));
      if (n % PERIOD == 0) begin
        if (word_load) begin
          for (int b = 12; b >= 0; b -= 2) syms.push_back(data_in[b+:2]);
          loads++;
        end
        prev_sym = cur;
        cur = syms.pop_front();
        seen[cur]++;
        if (n > 0 && cur != prev_sym) changes++;
      end
      @(posedge clk);
      #1;
      if (took) data_in = (loads == 1) ? {2'b10, 12'($urandom)} : 14'($urandom);
      check(d_out == cur, $sformatf("cycle %0d: d_out %b expected %b", n, d_out, cur));
      check(data_counter == 32'(n / PERIOD + 1), $sformatf("cycle %0d: data_counter %0d", n, data_counter));
      check(close_to(data_out, ref_sample((n / CPS) % N, N, qpsk_phase(cur))),
            $sformatf("cycle %0d: data_out %h for dibit %b sample %0d", n, data_out, cur, (n / CPS) % N));
      if (cur == 2'b11)
        check(data_out == D11_WORDS[(n / CPS) % N], $sformatf("cycle %0d: word %h", n, data_out));
      if (cur == 2'b10 && (n % PERIOD) < CPS)
        check(data_out == 32'h3F3504F3, $sformatf("cycle %0d: word %h", n, data_out));
      // the published sequence: dibits 00 and 11 end the first word, 10 starts the next
      if (n == 5 * PERIOD) check(cur == 2'b00, "sixth dibit of the first word");
      if (n == 6 * PERIOD) check(cur == 2'b11, "seventh dibit of the first word");
      if (n == 7 * PERIOD) check(cur == 2'b10, "first dibit of the second word");
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("dibit %0d never sent", i));
    check(changes > 0, "no phase change happened");
    check(loads == 40, $sformatf("%0d words taken", loads));
    $display("dibits 00/01/10/11: %0d/%0d/%0d/%0d, phase changes: %0d, words: %0d",
             seen[0], seen[1], seen[2], seen[3], changes, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
