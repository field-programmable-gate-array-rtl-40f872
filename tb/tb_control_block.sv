// tb_control_block: checks the timing of the modulator enables at the
// default sizes (2 clocks per sample, 10 samples per symbol). After reset the
// ROM/counter enables must be high on cycles 0, 2, 4, ... and the bit-separator
// enable on cycles 0, 20, 40, ...; data_counter must count the symbols
// started. The symbol period of 20 clocks is 400 ns at 50 MHz.
module tb_control_block;
  logic        clk = 0, rst = 1;
  logic [31:0] data_counter;
  logic        bsep_en, cnt_en, rom_en;
  int checks = 0, failures = 0, symbols = 0, last_sym = -1;

  control_block dut (.clk, .rst, .data_counter, .bit_separator_en(bsep_en),
                     .counter_en(cnt_en), .rom_en(rom_en));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 1000; c++) begin
      // outputs of cycle c, before its clock edge
      checks++;
      if (rom_en !== (c % 2 == 0) || cnt_en !== (c % 2 == 0)) begin
        failures++; $display("cycle %0d: rom_en %0b cnt_en %0b", c, rom_en, cnt_en);
      end
      checks++;
      if (bsep_en !== (c % 20 == 0)) begin
        failures++; $display("cycle %0d: bit_separator_en %0b", c, bsep_en);
      end
      checks++;
      if (data_counter != 32'((c + 19) / 20)) begin
        failures++; $display("cycle %0d: data_counter %0d", c, data_counter);
      end
      if (bsep_en) begin
        if (last_sym >= 0) begin
          checks++;
          if (c - last_sym != 20) begin failures++; $display("symbol period %0d", c - last_sym); end
        end
        last_sym = c;
        symbols++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (symbols != 50) begin failures++; $display("symbols %0d", symbols); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
