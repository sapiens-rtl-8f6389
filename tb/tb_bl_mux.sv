// tb_bl_mux: checks that bank k connects BL 8j+k to sense amplifier j.
module tb_bl_mux;
  logic [2:0] bank_sel;
  logic [8:0] bl_nhrs [256];
  logic [8:0] bl_nlrs [256];
  logic [8:0] bl_nrlx [256];
  logic [8:0] sa_nhrs [32];
  logic [8:0] sa_nlrs [32];
  logic [8:0] sa_nrlx [32];
  int checks = 0, failures = 0;

  bl_mux dut (.bank_sel, .bl_nhrs, .bl_nlrs, .bl_nrlx, .sa_nhrs, .sa_nlrs, .sa_nrlx);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < 256; r++) begin
        bl_nhrs[r] = 9'($urandom);
        bl_nlrs[r] = 9'($urandom);
        bl_nrlx[r] = 9'($urandom);
      end
      bank_sel = 3'(t % 8);
      #1;
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (sa_nhrs[j] !== bl_nhrs[8*j + t % 8] || sa_nlrs[j] !== bl_nlrs[8*j + t % 8] ||
            sa_nrlx[j] !== bl_nrlx[8*j + t % 8]) begin
          failures++;
          $display("FAIL bank %0d sa %0d", t % 8, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
