// tb_incrementation_block: exhaustive self-checking test of the half-adder
// incrementer, {cout, sum} = z + cin, for the 4-bit default and a 6-bit
// instance. Combinational; each vector settles for 1 time unit. A watchdog
// ends the run with a failure if it has not finished in time.
module tb_incrementation_block;

  int unsigned checks = 0, failures = 0;

  logic [3:0] z4, s4;  logic ci4, co4;
  logic [5:0] z6, s6;  logic ci6, co6;

  incrementation_block dut4 (.z(z4), .cin(ci4), .sum(s4), .cout(co4));
  incrementation_block #(.W(6)) dut6 (.z(z6), .cin(ci6), .sum(s6), .cout(co6));

  task automatic check(string name, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int ci = 0; ci < 2; ci++) begin
        z4 = 4'(x); ci4 = 1'(ci);
        #1 check("W=4", {27'd0, co4, s4}, x + ci);
      end
    for (int x = 0; x < 64; x++)
      for (int ci = 0; ci < 2; ci++) begin
        z6 = 6'(x); ci6 = 1'(ci);
        #1 check("W=6", {25'd0, co6, s6}, x + ci);
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
