// tb_gate_of_mux: drives random data into a 2:1 (BPSK) and a 4:1 (QPSK)
// instance and checks that result equals the input chosen by sel, for every
// select value many times over.
module tb_gate_of_mux;
  logic [31:0] d2 [2];
  logic [31:0] d4 [4];
  logic        s1;
  logic [1:0]  s2;
  logic [31:0] r2, r4;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  gate_of_mux #(.SEL_W(1), .W(32)) u2 (.data(d2), .sel(s1), .result(r2));
  gate_of_mux #(.SEL_W(2), .W(32)) u4 (.data(d4), .sel(s2), .result(r4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      foreach (d2[j]) d2[j] = $urandom;
      foreach (d4[j]) d4[j] = $urandom;
      s1 = 1'($urandom);
      s2 = 2'($urandom);
      #1;
      checks++;
      if (r2 !== (s1 ? d2[1] : d2[0])) begin failures++; $display("2:1 sel %0b got %h", s1, r2); end
      checks++;
      case (s2)
        2'd0: if (r4 !== d4[0]) failures++;
        2'd1: if (r4 !== d4[1]) failures++;
        2'd2: if (r4 !== d4[2]) failures++;
        default: if (r4 !== d4[3]) failures++;
      endcase
      seen[s2]++;
    end
    foreach (seen[j]) begin
      checks++;
      if (seen[j] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
