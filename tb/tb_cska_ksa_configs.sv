// tb_cska_ksa_configs: self-checking test of the carry skip adder at other
// sizes than the default, against the integer sum a + b + cin.
//
//   N = 8,  M = 2: four stages, the last one an AOI stage whose complemented
//                  carry is inverted for cout; checked exhaustively.
//   N = 6,  M = 6: a single stage, no skip gate; checked exhaustively.
//   N = 16, M = 8: two stages; random operands.
//   N = 12, M = 3: four 3-bit stages; random operands.
// Combinational; 1 time unit per vector. A watchdog ends the run with a
// failure if it has not finished in time.
module tb_cska_ksa_configs;

  int unsigned checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  s8;   logic ci8,  co8;
  logic [5:0]  a6,  b6,  s6;   logic ci6,  co6;
  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [11:0] a12, b12, s12;  logic ci12, co12;

  cska_ksa #(.N(8),  .M(2)) dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cska_ksa #(.N(6),  .M(6)) dut6  (.a(a6),  .b(b6),  .cin(ci6),  .sum(s6),  .cout(co6));
  cska_ksa #(.N(16), .M(8)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cska_ksa #(.N(12), .M(3)) dut12 (.a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));

  task automatic check(string name, int unsigned got, int unsigned exp,
                       int unsigned x, int unsigned y, int unsigned ci);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: %0h + %0h + %0d gave %0h, expected %0h", name, x, y, ci, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(ci);
          #1 check("N=8 M=2", {23'd0, co8, s8}, x + y + ci, x, y, ci);
        end
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a6 = 6'(x); b6 = 6'(y); ci6 = 1'(ci);
          #1 check("N=6 M=6", {25'd0, co6, s6}, x + y + ci, x, y, ci);
        end
    for (int k = 0; k < 50_000; k++) begin
      int unsigned x, y, ci;
      x = $urandom % (1 << 16);
      y = (k % 2 == 0) ? $urandom % (1 << 16) : (~x ^ (1 << ($urandom % 16))) % (1 << 16);
      ci = $urandom % 2;
      a16 = 16'(x); b16 = 16'(y); ci16 = 1'(ci);
      x = $urandom % (1 << 12);
      y = (k % 2 == 0) ? $urandom % (1 << 12) : (~x ^ (1 << ($urandom % 12))) % (1 << 12);
      a12 = 12'(x); b12 = 12'(y); ci12 = 1'(ci);
      #1;
      check("N=16 M=8", {15'd0, co16, s16}, a16 + b16 + ci, a16, b16, ci);
      check("N=12 M=3", {19'd0, co12, s12}, a12 + b12 + ci, a12, b12, ci);
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
