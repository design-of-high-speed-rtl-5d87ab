// tb_ks_adder: exhaustive self-checking test of the Kogge-Stone adder.
//
// Three instances are checked against the integer sum a + b + cin over every
// input combination: the 4-bit default, a 5-bit one (width not a power of
// two, so some prefix nodes pass through) and an 8-bit one (three prefix
// levels). The adder is combinational; each vector settles for 1 time unit.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_ks_adder;

  int unsigned checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;  logic c4i, c4o;
  logic [4:0] a5, b5, s5;  logic c5i, c5o;
  logic [7:0] a8, b8, s8;  logic c8i, c8o;

  ks_adder dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  ks_adder #(.W(5)) dut5 (.a(a5), .b(b5), .cin(c5i), .sum(s5), .cout(c5o));
  ks_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(c8i), .sum(s8), .cout(c8o));

  task automatic check(string name, int unsigned got, int unsigned exp,
                       int unsigned x, int unsigned y, int unsigned ci);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: %0d + %0d + %0d gave %0d, expected %0d", name, x, y, ci, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a4 = 4'(x); b4 = 4'(y); c4i = 1'(ci);
          #1 check("W=4", {27'd0, c4o, s4}, x + y + ci, x, y, ci);
        end
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a5 = 5'(x); b5 = 5'(y); c5i = 1'(ci);
          #1 check("W=5", {26'd0, c5o, s5}, x + y + ci, x, y, ci);
        end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); c8i = 1'(ci);
          #1 check("W=8", {23'd0, c8o, s8}, x + y + ci, x, y, ci);
        end
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
