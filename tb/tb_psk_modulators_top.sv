// tb_psk_modulators_top: runs both modulators of the top level together, at
// the default sizes, from two independent random word sources.
//
// Two runs are made, each starting from reset, so that restarting in the
// middle of a word is exercised too. After every clock edge the testbench
// predicts for each channel the symbol being sent and the carrier sample
// index from its own record of the words taken, and checks data_out (against
// $sin within 1e-6), d_out, data_counter and the word_load timing. At the end
// of each run it checks the relative throughput: in the same time the QPSK
// channel has taken twice as many bits as the BPSK channel.
//
// Mechanisms counted, each of which must occur: words taken by each channel,
// both BPSK bit values, all four QPSK dibits, BPSK phase reversals, QPSK
// phase changes and restarts from reset.
module tb_psk_modulators_top;
  import tb_util_pkg::*;
  localparam int N = 10, CPS = 2, PERIOD = N * CPS;

  logic        clk = 0, rst = 1;
  logic [13:0] b_in, q_in;
  logic [31:0] b_out, q_out, b_cnt, q_cnt;
  logic        b_wl, q_wl, b_d;
  logic [1:0]  q_d;
  int checks = 0, failures = 0;
  int b_loads = 0, q_loads = 0, b_rev = 0, q_chg = 0, restarts = 0;
  int b_seen [2] = '{0, 0};
  int q_seen [4] = '{0, 0, 0, 0};

  psk_modulators_top dut (
    .clk, .rst,
    .bpsk_data_in(b_in), .bpsk_data_out(b_out), .bpsk_word_load(b_wl),
    .bpsk_data_counter(b_cnt), .bpsk_d_out(b_d),
    .qpsk_data_in(q_in), .qpsk_data_out(q_out), .qpsk_word_load(q_wl),
    .qpsk_data_counter(q_cnt), .qpsk_d_out(q_d)
  );

  always #10 clk = ~clk;

  initial begin
    #5000000;
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

  task automatic run(int cycles);
    logic       bq [$];
    logic [1:0] qq [$];
    logic       bcur, bprev;
    logic [1:0] qcur, qprev;
    logic       btook, qtook;
    int         bbits = 0, qbits = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    restarts++;
    for (int n = 0; n < cycles; n++) begin
      btook = b_wl;
      qtook = q_wl;
      check(b_wl == (n % (14 * PERIOD) == 0), $sformatf("cycle %0d: bpsk word_load %0b", n, b_wl));
      check(q_wl == (n % (7 * PERIOD) == 0), $sformatf("cycle %0d: qpsk word_load %0b", n, q_wl));
      if (n % PERIOD == 0) begin
        if (b_wl) begin
          for (int b = 13; b >= 0; b--) bq.push_back(b_in[b]);
          b_loads++;
          bbits += 14;
        end
        if (q_wl) begin
          for (int b = 12; b >= 0; b -= 2) qq.push_back(q_in[b+:2]);
          q_loads++;
          qbits += 14;
        end
        bprev = bcur;
        qprev = qcur;
        bcur = bq.pop_front();
        qcur = qq.pop_front();
        b_seen[bcur]++;
        q_seen[qcur]++;
        if (n > 0 && bcur != bprev) b_rev++;
        if (n > 0 && qcur != qprev) q_chg++;
      end
      @(posedge clk);
      #1;
      if (btook) b_in = 14'($urandom);
      if (qtook) q_in = 14'($urandom);
      check(b_d == bcur && q_d == qcur, $sformatf("cycle %0d: symbols %0b %b", n, b_d, q_d));
      check(b_cnt == 32'(n / PERIOD + 1) && q_cnt == b_cnt,
            $sformatf("cycle %0d: symbol counts %0d %0d", n, b_cnt, q_cnt));
      check(close_to(b_out, ref_sample((n / CPS) % N, N, bpsk_phase(bcur))),
            $sformatf("cycle %0d: bpsk sample %h", n, b_out));
      check(close_to(q_out, ref_sample((n / CPS) % N, N, qpsk_phase(qcur))),
            $sformatf("cycle %0d: qpsk sample %h", n, q_out));
    end
    // bits taken in the same time: QPSK twice BPSK once whole words align
    if (cycles % (14 * PERIOD) == 0)
      check(qbits == 2 * bbits, $sformatf("bits taken: qpsk %0d bpsk %0d", qbits, bbits));
  endtask

  initial begin
    b_in = 14'($urandom);
    q_in = 14'($urandom);
    run(20 * 14 * PERIOD);
    run(3 * 14 * PERIOD + 57);  // cut off mid-word by the next reset
    run(10 * 14 * PERIOD);
    check(b_loads > 0 && q_loads > 0, "no words taken");
    check(b_seen[0] > 0 && b_seen[1] > 0, "a BPSK bit value never occurred");
    foreach (q_seen[i]) check(q_seen[i] > 0, $sformatf("QPSK dibit %0d never occurred", i));
    check(b_rev > 0, "no BPSK phase reversal");
    check(q_chg > 0, "no QPSK phase change");
    check(restarts == 3, "restarts");
    $display("words bpsk/qpsk %0d/%0d, bpsk bits 0/1 %0d/%0d, qpsk dibits %0d/%0d/%0d/%0d",
             b_loads, q_loads, b_seen[0], b_seen[1], q_seen[0], q_seen[1], q_seen[2], q_seen[3]);
    $display("bpsk reversals %0d, qpsk phase changes %0d, restarts %0d", b_rev, q_chg, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
