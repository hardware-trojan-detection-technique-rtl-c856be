// tb_ht_trojan: exhaustive check of the Trojan gate, infected and golden.
module tb_ht_trojan;
  int checks = 0, failures = 0;
  logic n1, n2, fb, out_inf, out_gold;

  ht_trojan #(.INSERTED(1'b1)) dut_inf  (.net_1(n1), .net_2(n2), .f_b(fb), .out_b(out_inf));
  ht_trojan #(.INSERTED(1'b0)) dut_gold (.net_1(n1), .net_2(n2), .f_b(fb), .out_b(out_gold));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {n1, n2, fb} = 3'(v);
      #1;
      checks += 2;
      if (out_inf !== (fb && (n1 || n2))) begin failures++; $display("FAIL infected v=%0d out=%b", v, out_inf); end
      if (out_gold !== fb) begin failures++; $display("FAIL golden v=%0d out=%b", v, out_gold); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
