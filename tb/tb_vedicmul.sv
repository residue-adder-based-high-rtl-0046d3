// tb_vedicmul: exhaustive end-to-end check of the 8x8 Nikhilam / RNS
// multiplier at its default size (no parameter override). All 65536
// operand pairs are applied and res compared with x*y computed here.
// It also counts how often each mechanism of the datapath is exercised,
// from an independent integer model of the algorithm, and counts a
// failure for any mechanism never seen:
//   zero_operand  - an operand is 0, so its complement is the full base
//   carry_part    - the complement product has a nonzero high part
//   wrap5/11/14   - a residue adder channel sum reaches its modulus
//   crt_wrap      - the CRT term sum reaches M and is reduced
module tb_vedicmul;
  logic [7:0]  x, y;
  logic [15:0] res;
  int checks = 0, failures = 0;
  int n_zero = 0, n_carry = 0, n_wrap5 = 0, n_wrap11 = 0, n_wrap14 = 0, n_crt = 0;

  vedicmul dut (.x(x), .y(y), .res(res));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CRT term for residue r of modulus m with weight s and inverse inv.
  function automatic int crt(input int r, input int m, input int s, input int inv);
    return s * ((r * inv) % m);
  endfunction

  task automatic count(input int i, input int j);
    int ca, cb, p, hi, t;
    ca = 256 - i;
    cb = 256 - j;
    p  = ca * cb;
    hi = p / 256;
    if (i == 0 || j == 0) n_zero++;
    if (hi != 0) n_carry++;
    if (i % 5  + j % 5  + hi % 5  >= 5)  n_wrap5++;
    if (i % 11 + j % 11 + hi % 11 >= 11) n_wrap11++;
    if (i % 14 + j % 14 + hi % 14 >= 14) n_wrap14++;
    t = i + j + hi;
    // weights 154, 70, 55 with inverses 4 (mod 5), 3 (mod 11), 13 (mod 14)
    if (crt(t % 5, 5, 154, 4) + crt(t % 11, 11, 70, 3) + crt(t % 14, 14, 55, 13) >= 770)
      n_crt++;
  endtask

  task automatic need(input string name, input int n);
    checks++;
    $display("mechanism %-13s seen %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = 8'(i);
        y = 8'(j);
        #1;
        checks++;
        if (int'(res) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, res);
        end
        count(i, j);
      end
    need("zero_operand", n_zero);
    need("carry_part", n_carry);
    need("wrap5", n_wrap5);
    need("wrap11", n_wrap11);
    need("wrap14", n_wrap14);
    need("crt_wrap", n_crt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
