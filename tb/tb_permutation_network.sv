// Testbench for permutation_network (N = 8, 17 exchange elements).
//
// Eight copies of the network get the same control word, copy k a one-hot
// input on line k, so one evaluation shows where every input line goes.  All
// 2^17 control words are tried.  Checks: every control word yields a
// permutation (each output line driven by exactly one input line), all
// 8! = 40320 permutations are reached (the network is rearrangeable), and the
// all-zero control word is the identity.
module tb_permutation_network;
  import ri_pkg::*;
  localparam int N = 8;
  localparam int B = waksman_bits(N);
  localparam int NPERM = 40320;
  logic [B-1:0] ctrl = '0;
  logic [N-1:0] outs [N];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < N; k++) begin : g_copy
    permutation_network #(.N(N)) dut (
      .in_lines(N'(1) << k), .ctrl(ctrl), .out_lines(outs[k])
    );
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [NPERM];

  // Lehmer code of a permutation of 0..N-1
  function automatic int rank(input int p [N]);
    int r, smaller;
    r = 0;
    for (int i = 0; i < N; i++) begin
      smaller = 0;
      for (int j = i + 1; j < N; j++) if (p[j] < p[i]) smaller++;
      r = r * (N - i) + smaller;
    end
    return r;
  endfunction

  initial begin
    int dest [N];
    int reached, bad;
    bit ok;
    reached = 0;
    bad = 0;
    for (int i = 0; i < NPERM; i++) seen[i] = 1'b0;
    checks++;
    if (B != 17) begin failures++; $display("FAIL element count %0d", B); end
    for (int c = 0; c < (1 << B); c++) begin
      ctrl = B'(c);
      #1;
      ok = 1'b1;
      for (int k = 0; k < N; k++) begin
        if ($countones(outs[k]) != 1) ok = 1'b0;
        dest[k] = 0;
        for (int j = 0; j < N; j++) if (outs[k][j]) dest[k] = j;
      end
      // each output line used once
      for (int j = 0; j < N; j++) begin
        int users;
        users = 0;
        for (int k = 0; k < N; k++) if (outs[k][j]) users++;
        if (users != 1) ok = 1'b0;
      end
      if (!ok) bad++;
      else if (!seen[rank(dest)]) begin
        seen[rank(dest)] = 1'b1;
        reached++;
      end
      if (c == 0) begin
        checks++;
        for (int k = 0; k < N; k++) if (dest[k] != k) ok = 1'b0;
        if (!ok) begin failures++; $display("FAIL zero controls are not the identity"); end
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d control words give no permutation", bad); end
    checks++;
    if (reached != NPERM) begin failures++; $display("FAIL only %0d of %0d permutations reached", reached, NPERM); end
    $display("permutations reached: %0d", reached);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
