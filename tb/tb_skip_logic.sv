// tb_skip_logic: exhaustive self-checking test of the AOI and OAI skip gates.
//
// For every intermediate result z, block carry C and previous carry CO, the
// reference carry is CO_j = C | (&z & CO). The AOI instance gets C and CO in
// true polarity and must return ~CO_j; the OAI instance gets both
// complemented and must return CO_j. Combinational; 1 time unit per vector.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_skip_logic;
  import cska_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic [3:0] z;
  logic       c, cp;
  logic       co_aoi, co_oai;

  skip_logic #(.GATE(SKIP_AOI)) dut_aoi (.z(z), .c_blk(c),  .co_prev(cp),  .co(co_aoi));
  skip_logic #(.GATE(SKIP_OAI)) dut_oai (.z(z), .c_blk(~c), .co_prev(~cp), .co(co_oai));

  initial begin
    for (int x = 0; x < 16; x++)
      for (int cc = 0; cc < 2; cc++)
        for (int cpp = 0; cpp < 2; cpp++) begin
          logic exp;
          z = 4'(x); c = 1'(cc); cp = 1'(cpp);
          exp = 1'(cc) | ((x == 15) && cpp == 1);
          #1;
          checks++;
          if (co_aoi != ~exp) begin
            failures++;
            $display("FAIL AOI z=%h C=%0d CO=%0d: got %0d", z, c, cp, co_aoi);
          end
          checks++;
          if (co_oai != exp) begin
            failures++;
            $display("FAIL OAI z=%h C=%0d CO=%0d: got %0d", z, c, cp, co_oai);
          end
        end
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
