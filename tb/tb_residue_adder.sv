// tb_residue_adder: self-check of the three-operand residue adder.
// Each channel is tested exhaustively over all residue triples (the
// channels are driven together, the 5- and 11-channels cycling through
// their triples while the 14-channel runs through all of its 2744), and
// a second phase adds residue forms of random integers a, b, c < 256 and
// checks the sum against (a+b+c) mod m computed here.
module tb_residue_adder;
  import rns_pkg::*;
  rns_t a, b, c, s;
  int checks = 0, failures = 0;

  residue_adder dut (.a(a), .b(b), .c(c), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rns_t to_rns(input int v);
    rns_t r;
    r.r5  = RW5'(v % 5);
    r.r11 = RW11'(v % 11);
    r.r14 = RW14'(v % 14);
    return r;
  endfunction

  task automatic check(input int e5, input int e11, input int e14);
    checks++;
    if (int'(s.r5) != e5 || int'(s.r11) != e11 || int'(s.r14) != e14) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%p b=%p c=%p s=%p expected (%0d,%0d,%0d)", a, b, c, s, e5, e11, e14);
    end
  endtask

  initial begin
    int i5, i11, x, y, z, n;
    n = 0;
    // Phase 1: every channel triple (i, j, k).
    for (int i = 0; i < 14; i++)
      for (int j = 0; j < 14; j++)
        for (int k = 0; k < 14; k++) begin
          i5  = n % 125;
          i11 = n % 1331;
          a.r14 = RW14'(i); b.r14 = RW14'(j); c.r14 = RW14'(k);
          a.r5  = RW5'(i5 / 25);   b.r5  = RW5'((i5 / 5) % 5);    c.r5  = RW5'(i5 % 5);
          a.r11 = RW11'(i11 / 121); b.r11 = RW11'((i11 / 11) % 11); c.r11 = RW11'(i11 % 11);
          #1;
          check((int'(a.r5) + int'(b.r5) + int'(c.r5)) % 5,
                (int'(a.r11) + int'(b.r11) + int'(c.r11)) % 11,
                (i + j + k) % 14);
          n++;
        end
    // Phase 2: residue forms of random integers.
    for (int t = 0; t < 20000; t++) begin
      x = int'($urandom_range(0, 255));
      y = int'($urandom_range(0, 255));
      z = int'($urandom_range(0, 256));
      a = to_rns(x); b = to_rns(y); c = to_rns(z);
      #1;
      check((x + y + z) % 5, (x + y + z) % 11, (x + y + z) % 14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
