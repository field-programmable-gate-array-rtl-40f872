// tb_sample_counter: checks the ROM address counter against a reference
// count. en is driven randomly; after every clock the address must equal the
// number of enabled cycles since reset modulo 10, and it must never leave
// 0..9. Also checks that reset returns it to 0 and that it holds when en is low.
module tb_sample_counter;
  localparam int N = 10;
  logic       clk = 0, rst = 1, en = 0;
  logic [5:0] addr;
  int checks = 0, failures = 0, wraps = 0, holds = 0, ref_cnt = 0;

  sample_counter #(.ADDR_W(6), .SAMPLES_PER_SYMBOL(N)) dut (.clk, .rst, .en, .addr);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (addr != 0) begin failures++; $display("addr not 0 after reset: %0d", addr); end
    for (int i = 0; i < 500; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        if (ref_cnt == N - 1) wraps++;
        ref_cnt = (ref_cnt + 1) % N;
      end else holds++;
      #1;
      checks++;
      if (int'(addr) != ref_cnt) begin
        failures++;
        $display("cycle %0d: addr %0d expected %0d", i, addr, ref_cnt);
      end
    end
    // reset in mid-count
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (addr != 0) begin failures++; $display("reset did not clear addr"); end
    checks++;
    if (wraps < 5 || holds < 20) begin failures++; $display("too few wraps/holds %0d %0d", wraps, holds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
