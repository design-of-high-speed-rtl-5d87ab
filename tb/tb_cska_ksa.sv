// tb_cska_ksa: end-to-end self-checking test of the 20-bit carry skip adder
// at its default parameters (N = 20, M = 4, five stages).
//
// Every result is compared with the integer sum a + b + cin. The vectors are:
//   - the two additions of the published simulation waveform,
//     FFFFF + FFFFF + 0 = 1_FFFFE and AAAAA + AAAAA + 0 = 1_55554, together
//     with the stage intermediate results they show (Z = 1110 and 0100 in
//     every upper stage, every stage adder's carry 1);
//   - the full carry path: a + ~a + 1, where every bit propagates and the
//     carry of stage 1 skips all four upper stages;
//   - random operands, and random operands biased towards long propagate
//     runs (b = ~a with a few bits flipped).
// For each upper stage the test works out, from the operands alone, which
// mechanism decided its carry, and counts them: generate (the stage adder
// carries out), skip (Z all ones, incoming carry 1, passed on by the skip
// gate), stop (incoming carry 1 absorbed by the incrementer), and increment
// (incoming carry 1 added to Z). It also counts additions whose carry crossed
// every skip gate. Each count must be non-zero. The adder is combinational;
// each vector settles for 1 time unit. A watchdog ends the run with a failure
// if it has not finished in time.
module tb_cska_ksa;

  localparam int unsigned N = 20;
  localparam int unsigned M = 4;
  localparam int unsigned Q = N / M;
  localparam int unsigned NRAND = 200_000;

  int unsigned checks = 0, failures = 0;
  int unsigned n_generate = 0, n_skip = 0, n_stop = 0, n_increment = 0, n_full_skip = 0;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;

  cska_ksa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_val(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%h b=%h cin=%0d: got %0h expected %0h", what, a, b, cin, got, exp);
    end
  endtask

  // Apply one vector, check it and count the carry mechanisms it exercises.
  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic ci);
    longint unsigned r;
    logic            carry;
    int unsigned     run;
    a = x; b = y; cin = ci;
    r = longint'(x) + longint'(y) + longint'(ci);
    // Stage 1 carry out, then walk the upper stages.
    carry = ((longint'(x[M-1:0]) + longint'(y[M-1:0]) + longint'(ci)) >> M) != 0;
    run   = carry ? 1 : 0;
    for (int j = 1; j < Q; j++) begin
      int unsigned zs;
      logic        cj, zall;
      zs   = int'(x[j*M +: M]) + int'(y[j*M +: M]);
      cj   = (zs >> M) != 0;
      zall = (zs % (1 << M)) == (1 << M) - 1;
      if (cj) n_generate++;
      if (carry) n_increment++;
      if (!cj && zall && carry) n_skip++;
      if (!cj && !zall && carry) n_stop++;
      if (!cj && zall && carry && run == j) run++;
      carry = cj | (zall & carry);
    end
    if (run == Q) n_full_skip++;
    #1;
    check_val("sum",  sum,  r & ((64'd1 << N) - 1));
    check_val("cout", cout, r >> N);
  endtask

  // The waveform also shows the intermediate result and adder carry of each
  // upper stage; compare them with what the operands give.
  task automatic check_stage_internals(logic [M-1:0] exp_z, logic exp_c);
    check_val("Z stage 2", dut.g_stage[2].u_stage.z, exp_z);
    check_val("Z stage 3", dut.g_stage[3].u_stage.z, exp_z);
    check_val("Z stage 4", dut.g_stage[4].u_stage.z, exp_z);
    check_val("Z stage 5", dut.g_stage[5].u_stage.z, exp_z);
    check_val("C stage 2", dut.g_stage[2].u_stage.c_j, exp_c);
    check_val("C stage 5", dut.g_stage[5].u_stage.c_j, exp_c);
  endtask

  initial begin
    // Published waveform vectors.
    apply(20'hFFFFF, 20'hFFFFF, 1'b0);
    check_val("waveform sum 1", sum, 20'hFFFFE);
    check_val("waveform cout 1", cout, 1);
    check_stage_internals(4'b1110, 1'b1);
    apply(20'hAAAAA, 20'hAAAAA, 1'b0);
    check_val("waveform sum 2", sum, 20'h55554);
    check_val("waveform cout 2", cout, 1);
    check_stage_internals(4'b0100, 1'b1);

    // Full propagate: the carry in travels through every skip gate.
    apply(20'h00000, 20'hFFFFF, 1'b1);
    apply(20'h12345, 20'hEDCBA, 1'b1);
    apply(20'h00000, 20'hFFFFF, 1'b0);
    apply(20'hFFFFF, 20'h00001, 1'b0);

    for (int k = 0; k < NRAND; k++) begin
      logic [N-1:0] x, y;
      x = N'($urandom);
      if (k % 2 == 0) y = N'($urandom);
      else            y = ~x ^ (N'(1) << ($urandom % N)) ^ ((k % 4 == 1) ? N'(0) : N'(1) << ($urandom % N));
      apply(x, y, 1'($urandom));
    end

    $display("mechanisms: generate=%0d skip=%0d stop=%0d increment=%0d full_skip_chain=%0d",
             n_generate, n_skip, n_stop, n_increment, n_full_skip);
    checks += 5;
    if (n_generate == 0)  begin failures++; $display("FAIL no stage generated a carry"); end
    if (n_skip == 0)      begin failures++; $display("FAIL no carry skipped a stage"); end
    if (n_stop == 0)      begin failures++; $display("FAIL no carry was stopped by a stage"); end
    if (n_increment == 0) begin failures++; $display("FAIL no incrementer added a carry"); end
    if (n_full_skip == 0) begin failures++; $display("FAIL no carry crossed every skip gate"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
