// tb_compare_unit: branch condition flags on random and corner operands,
// checked against signed comparisons computed here.
module tb_compare_unit;
  logic [31:0] a, b;
  logic eq, gz, gez, lz, lez;
  int checks = 0, failures = 0;
  compare_unit dut (.a, .b, .cmp_eq(eq), .cmp_gz(gz), .cmp_gez(gez), .cmp_lz(lz), .cmp_lez(lez));
  logic [31:0] corner [5] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};
  initial begin
    for (int k = 0; k < 2000; k++) begin
      a = (k % 2 == 0) ? corner[$urandom_range(0, 4)] : $urandom;
      b = (k % 3 == 0) ? a : ((k % 5 == 0) ? corner[$urandom_range(0, 4)] : $urandom);
      #1; checks++;
      if (eq !== (a == b) || gz !== ($signed(a) > 0) || gez !== ($signed(a) >= 0) ||
          lz !== ($signed(a) < 0) || lez !== ($signed(a) <= 0)) begin
        failures++; $display("FAIL a=%h b=%h -> %b%b%b%b%b", a, b, eq, gz, gez, lz, lez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
