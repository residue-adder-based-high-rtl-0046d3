// tb_res2bin: exhaustive self-check of the CRT residue-to-binary
// converter. For every value v in 0..769 the residue triple
// (v mod 5, v mod 11, v mod 14) is applied and the output must be v.
module tb_res2bin;
  import rns_pkg::*;
  rns_t          r;
  logic [MW-1:0] bin;
  int checks = 0, failures = 0;

  res2bin dut (.res(r), .bin(bin));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < int'(M); v++) begin
      r.r5  = RW5'(v % 5);
      r.r11 = RW11'(v % 11);
      r.r14 = RW14'(v % 14);
      #1;
      checks++;
      if (int'(bin) != v) begin
        failures++;
        $display("FAIL v=%0d residues (%0d,%0d,%0d) got %0d", v, r.r5, r.r11, r.r14, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
