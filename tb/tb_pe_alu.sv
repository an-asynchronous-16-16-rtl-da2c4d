// tb_pe_alu: exhaustive self-checking test of the PE ALU.
// Every pair (A, B) of 8-bit values is applied in the three modes (minimum, maximum,
// pass) and the output compared with the minimum, maximum or A computed here with
// ordinary integer comparison.
module tb_pe_alu;
  localparam int unsigned PIX_W = 8;

  logic [PIX_W-1:0] a, b, y;
  logic             max_op, pass;
  int               checks = 0, failures = 0;

  pe_alu dut (.a, .b, .max_op, .pass, .y);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int mode = 0; mode < 3; mode++) begin
      for (int ia = 0; ia < 256; ia++) begin
        for (int ib = 0; ib < 256; ib++) begin
          a      = PIX_W'(ia);
          b      = PIX_W'(ib);
          pass   = (mode == 2);
          max_op = (mode == 1);
          #1;
          if (mode == 2)      exp = ia;
          else if (mode == 1) exp = (ia > ib) ? ia : ib;
          else                exp = (ia < ib) ? ia : ib;
          checks++;
          if (int'(y) != exp) begin
            failures++;
            if (failures < 10) $display("mode %0d a=%0d b=%0d: y=%0d expected %0d", mode, ia, ib, y, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
