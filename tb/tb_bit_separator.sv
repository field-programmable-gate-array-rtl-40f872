// tb_bit_separator: feeds random 14-bit words to a 1-bit (BPSK) and a 2-bit
// (QPSK) bit separator with a random enable pattern. A queue of expected
// symbols is built from every word at the moment word_load takes it, most
// significant bits first; each enabled cycle must present the next one on
// d_out, word_load must come exactly every 14 resp. 7 enables, and d_out must
// hold while the enable is low. The word 01000111100100 (BPSK) and
// 11011010110011 (QPSK) of the published waveforms are sent first.
module tb_bit_separator;
  logic        clk = 0, rst = 1, en = 0;
  logic [13:0] din1, din2;
  logic        dout1, wl1;
  logic [1:0]  dout2;
  logic        wl2;
  int checks = 0, failures = 0, loads1 = 0, loads2 = 0, nen = 0;
  logic        q1 [$];
  logic [1:0]  q2 [$];
  logic        exp1, took1;
  logic [1:0]  exp2;
  logic        took2;

  bit_separator #(.DATA_W(14), .SYM_W(1)) u1 (.clk, .rst, .clk_en(en), .d_in(din1), .d_out(dout1), .word_load(wl1));
  bit_separator #(.DATA_W(14), .SYM_W(2)) u2 (.clk, .rst, .clk_en(en), .d_in(din2), .d_out(dout2), .word_load(wl2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din1 = 14'b01000111100100;
    din2 = 14'b11011010110011;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 2) != 0);
      #1;
      // word_load is only allowed, and required, when the queue is empty
      if (en) begin
        checks++;
        if (wl1 !== (q1.size() == 0)) begin failures++; $display("wl1 %0b with %0d left", wl1, q1.size()); end
        checks++;
        if (wl2 !== (q2.size() == 0)) begin failures++; $display("wl2 %0b with %0d left", wl2, q2.size()); end
        if (q1.size() == 0) begin
          for (int b = 13; b >= 0; b--) q1.push_back(din1[b]);
          loads1++;
        end
        if (q2.size() == 0) begin
          for (int b = 12; b >= 0; b -= 2) q2.push_back(din2[b+:2]);
          loads2++;
        end
        exp1 = q1.pop_front();
        exp2 = q2.pop_front();
        nen++;
      end else begin
        checks += 2;
        if (wl1 || wl2) begin failures++; $display("word_load without enable"); end
        exp1 = dout1;
        exp2 = dout2;
      end
      took1 = wl1; took2 = wl2;
      @(posedge clk);
      #1;
      // a new word may appear once the old one has been taken
      if (took1) din1 = 14'($urandom);
      if (took2) din2 = 14'($urandom);
      checks++;
      if (dout1 !== exp1) begin failures++; $display("step %0d: BPSK d_out %0b expected %0b", i, dout1, exp1); end
      checks++;
      if (dout2 !== exp2) begin failures++; $display("step %0d: QPSK d_out %b expected %b", i, dout2, exp2); end
    end
    checks++;
    if (loads1 != (nen + 13) / 14 || loads2 != (nen + 6) / 7) begin
      failures++; $display("loads %0d %0d for %0d enables", loads1, loads2, nen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
