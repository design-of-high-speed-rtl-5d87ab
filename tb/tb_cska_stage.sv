// tb_cska_stage: exhaustive self-checking test of one carry skip stage, in
// both polarities.
//
// For every a, b and incoming carry CO_{j-1} the reference is the plain sum
// a + b + CO_{j-1}: its low M bits are the stage sum and its carry is CO_j.
// The AOI stage gets CO_{j-1} true and must return ~CO_j; the OAI stage gets
// ~CO_{j-1} and must return CO_j. The test also counts how often the
// incoming carry skipped the stage (&Z = 1, C = 0, CO_{j-1} = 1) and fails if
// that never happened. Combinational; 1 time unit per vector. A watchdog
// ends the run with a failure if it has not finished in time.
module tb_cska_stage;
  import cska_pkg::*;

  int unsigned checks = 0, failures = 0, skips = 0;

  logic [3:0] a, b, s_aoi, s_oai;
  logic       cp, co_aoi, co_oai;

  cska_stage #(.GATE(SKIP_AOI)) dut_aoi (.a(a), .b(b), .co_prev(cp),  .sum(s_aoi), .co(co_aoi));
  cska_stage #(.GATE(SKIP_OAI)) dut_oai (.a(a), .b(b), .co_prev(~cp), .sum(s_oai), .co(co_oai));

  task automatic check(string name, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%h b=%h ci=%0d: got %0h expected %0h", name, a, b, cp, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int ci = 0; ci < 2; ci++) begin
          int unsigned r;
          a = 4'(x); b = 4'(y); cp = 1'(ci);
          r = x + y + ci;
          if (((x + y) == 15) && ci == 1) skips++;
          #1;
          check("AOI sum", s_aoi, r % 16);
          check("AOI co",  co_aoi, (r >= 16) ? 0 : 1);
          check("OAI sum", s_oai, r % 16);
          check("OAI co",  co_oai, (r >= 16) ? 1 : 0);
        end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL the skip case never occurred");
    end
    $display("skip cases: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
