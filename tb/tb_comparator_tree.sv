// tb_comparator_tree: random and tied inputs; the expected maximum and the
// lowest index holding it come from a linear scan.
module tb_comparator_tree;
  logic [31:0][7:0] val;
  logic [7:0] max_val;
  logic [4:0] max_idx;
  int checks = 0, failures = 0;

  comparator_tree dut (.val, .max_val, .max_idx);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int best, bi;
      for (int i = 0; i < 32; i++)
        val[i] = (t % 3 == 0) ? 8'($urandom_range(123, 120)) : 8'($urandom_range(128, 0));
      if (t == 1) val = '0;
      #1;
      best = -1; bi = 0;
      for (int i = 0; i < 32; i++) if (int'(val[i]) > best) begin best = int'(val[i]); bi = i; end
      checks++;
      if (int'(max_val) != best || int'(max_idx) != bi) begin
        failures++;
        $display("FAIL got %0d@%0d expected %0d@%0d", max_val, max_idx, best, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
