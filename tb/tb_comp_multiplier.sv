// tb_comp_multiplier: exhaustive self-check of the complement multiplier
// over its whole input range 1..256 x 1..256 (the complements of 8-bit
// operands). lo must be the low byte and hi the bits above it of the
// integer product computed here.
module tb_comp_multiplier;
  localparam int unsigned N = 8;
  logic [N:0]   a, b;
  logic [N-1:0] lo;
  logic [N:0]   hi;
  int checks = 0, failures = 0;

  comp_multiplier #(.N(N)) dut (.a(a), .b(b), .lo(lo), .hi(hi));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    for (int i = 1; i <= 2**N; i++) begin
      for (int j = 1; j <= 2**N; j++) begin
        a = (N+1)'(i);
        b = (N+1)'(j);
        #1;
        p = i * j;
        checks++;
        if (int'(lo) != p % (2**N) || int'(hi) != p / (2**N)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d lo=%0d hi=%0d expected %0d", i, j, lo, hi, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
