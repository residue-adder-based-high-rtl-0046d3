// tb_bin2res: exhaustive self-check of the binary-to-residue converter.
// Two instances are tested, W = 8 (operands) and W = 9 (the carry part of
// the complement product); every input value is applied and each residue
// compared with the % operator.
module tb_bin2res;
  import rns_pkg::*;
  logic [7:0] b8;
  logic [8:0] b9;
  rns_t       r8, r9;
  int checks = 0, failures = 0;

  bin2res #(.W(8)) dut8 (.bin(b8), .res(r8));
  bin2res #(.W(9)) dut9 (.bin(b9), .res(r9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v, input rns_t r);
    checks++;
    if (int'(r.r5) != v % 5 || int'(r.r11) != v % 11 || int'(r.r14) != v % 14) begin
      failures++;
      $display("FAIL v=%0d got (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
               v, r.r5, r.r11, r.r14, v % 5, v % 11, v % 14);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      b8 = 8'(v);
      b9 = 9'(v);
      #1;
      if (v < 256) check(v, r8);
      check(v, r9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
