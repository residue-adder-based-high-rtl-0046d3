// tb_complementer: exhaustive self-check of the Nikhilam complementer.
// Every 8-bit operand is applied and the output compared with 256 - x,
// computed here in integer arithmetic; x = 0 must give 256 (the ninth
// bit). Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_complementer;
  localparam int unsigned N = 8;
  logic [N-1:0] x;
  logic [N:0]   c;
  int checks = 0, failures = 0;

  complementer #(.N(N)) dut (.x(x), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      x = N'(v);
      #1;
      checks++;
      if (int'(c) != 2**N - v) begin
        failures++;
        $display("FAIL x=%0d c=%0d expected %0d", v, c, 2**N - v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
