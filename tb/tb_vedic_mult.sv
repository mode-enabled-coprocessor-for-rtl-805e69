// tb_vedic_mult: the Urdhva multiplier at the single precision width
// (N = 24, its default) and the double precision width (N = 53), and at a
// small odd width (N = 5) exhaustively, compared with the `*` operator.
// Random operands are mixed with all-ones, single-bit and zero operands,
// which exercise the longest column carry chains.
module tb_vedic_mult;
  logic [23:0]  a24, b24;
  logic [47:0]  p24;
  logic [52:0]  a53, b53;
  logic [105:0] p53;
  logic [4:0]   a5, b5;
  logic [9:0]   p5;
  int checks = 0, failures = 0;

  vedic_mult dut24 (.a(a24), .b(b24), .p(p24));
  vedic_mult #(.N(53)) dut53 (.a(a53), .b(b53), .p(p53));
  vedic_mult #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  function automatic logic [52:0] pick53(int sel);
    case (sel)
      0: return '1;
      1: return '0;
      2: return 53'd1 << $urandom_range(0, 52);
      3: return {1'b1, 52'($urandom)};
      default: return {21'($urandom), $urandom};
    endcase
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i);
        b5 = 5'(j);
        #1;
        checks++;
        if (p5 != 10'(i * j)) begin
          failures++;
          $display("FAIL N=5 %0d*%0d gave %0d", i, j, p5);
        end
      end
    end
    for (int t = 0; t < 4000; t++) begin
      logic [52:0] x, y;
      x = pick53($urandom_range(0, 7));
      y = pick53($urandom_range(0, 7));
      a53 = x;
      b53 = y;
      a24 = x[23:0];
      b24 = y[52:29];
      #1;
      checks += 2;
      if (p53 != 106'(x) * 106'(y)) begin
        failures++;
        $display("FAIL N=53 %h*%h gave %h", x, y, p53);
      end
      if (p24 != 48'(x[23:0]) * 48'(y[52:29])) begin
        failures++;
        $display("FAIL N=24 %h*%h gave %h", x[23:0], y[52:29], p24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
