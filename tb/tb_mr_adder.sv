// tb_mr_adder: random test of the mixed-radix adder against integer arithmetic.
// Random radices 1..5 per digit; the sum digits and carry must equal the mixed-radix
// decomposition of value(a) + value(b) + cin.
module tb_mr_adder;
  logic [5:0][2:0] a, b, radix, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mr_adder #(.NDIG(6)) dut (.a, .b, .radix, .cin, .s, .cout);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint va, vb, vs, w, tot;
      w = 1; va = 0; vb = 0; tot = 1;
      for (int x = 0; x < 6; x++) begin
        radix[x] = 3'($urandom_range(5, 1));
        a[x] = 3'($urandom_range(int'(radix[x]) - 1, 0));
        b[x] = 3'($urandom_range(int'(radix[x]) - 1, 0));
        va += a[x] * w;
        vb += b[x] * w;
        w *= radix[x];
      end
      tot = w;
      cin = 1'($urandom_range(1, 0));
      #1;
      vs = va + vb + cin;
      checks++;
      if (cout != (vs >= tot)) failures++;
      vs = vs % tot;
      for (int x = 0; x < 6; x++) begin
        checks++;
        if (s[x] != 3'(vs % radix[x])) failures++;
        vs = vs / radix[x];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
