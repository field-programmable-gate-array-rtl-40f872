// tb_carrier_rom: reads every word of the carrier ROM at the six phases the
// modulators use and compares it with sin(2*pi*k/10 + phase) computed here.
// It also checks bit-exact words printed in the published waveforms (e.g.
// 3F800000 = 1.0, BF3504F3 = -0.7071), the one-cycle read latency, that q
// holds while clken is low and that out-of-range addresses read 0.
module tb_carrier_rom;
  import tb_util_pkg::*;
  localparam int N = 10;
  localparam int PH [6] = '{45, 135, 225, 315, 90, 270};

  logic        clk = 0, clken = 0;
  logic [5:0]  address = 0;
  logic [31:0] q [6];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 6; i++) begin : g_rom
    carrier_rom #(.PHASE_DEG(PH[i]), .SAMPLES_PER_SYMBOL(N), .ADDR_W(6))
      dut (.clock(clk), .clken, .address, .q(q[i]));
  end

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(int rom, logic [31:0] w, string what);
    checks++;
    if (q[rom] !== w) begin failures++; $display("%s: got %h expected %h", what, q[rom], w); end
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      address = 6'(k); clken = 1;
      @(negedge clk);
      for (int r = 0; r < 6; r++) begin
        checks++;
        if (!close_to(q[r], ref_sample(k, N, PH[r]))) begin
          failures++;
          $display("phase %0d k %0d: %h (%f) expected %f", PH[r], k, q[r], f32_to_real(q[r]),
                   ref_sample(k, N, PH[r]));
        end
      end
      // words printed in the published simulations
      if (k == 0) begin
        expect_word(4, 32'h3F800000, "90 deg k0");
        expect_word(5, 32'hBF800000, "270 deg k0");
        expect_word(3, 32'hBF3504F3, "315 deg k0");
        expect_word(0, 32'h3F3504F3, "45 deg k0");
      end
      if (k == 1) begin
        expect_word(4, 32'h3F4F1BBD, "90 deg k1");
        expect_word(3, 32'hBE20305B, "315 deg k1");
      end
      if (k == 2) begin
        expect_word(4, 32'h3E9E377A, "90 deg k2");
        expect_word(3, 32'h3EE87171, "315 deg k2");
      end
      if (k == 3) expect_word(3, 32'h3F641901, "315 deg k3");
      if (k == 4) expect_word(3, 32'h3F7CD925, "315 deg k4");
    end
    // clken low: q holds while the address changes
    clken = 0; address = 6'd3;
    @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      checks++;
      if (!close_to(q[r], ref_sample(N - 1, N, PH[r]))) begin failures++; $display("hold failed rom %0d", r); end
    end
    // out-of-range address reads 0
    clken = 1; address = 6'd63;
    @(negedge clk);
    for (int r = 0; r < 6; r++) expect_word(r, 32'h0, "address 63");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
