// tb_wl_driver: checks the WL pattern for sensing in both modes (query bit
// '0' -> even WL of the pair, '1' -> odd WL; 4 WLs per step in 2-bit mode,
// 2 in 1-bit mode) and the one-hot WL select for the programming operations.
module tb_wl_driver;
  import sapiens_pkg::*;
  arr_op_t      op;
  logic [7:0]   col;
  logic [127:0] query;
  logic [6:0]   step;
  logic         mode_2b;
  logic [255:0] wl_en;
  int checks = 0, failures = 0;

  wl_driver dut (.op, .col, .query, .step, .mode_2b, .wl_en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [255:0] exp_wl;
      query   = {$urandom, $urandom, $urandom, $urandom};
      mode_2b = t[0];
      step    = 7'($urandom_range(mode_2b ? 63 : 127, 0));
      col     = 8'($urandom);
      op      = OP_SENSE;
      #1;
      exp_wl = '0;
      if (mode_2b) begin
        // bits 2s and 2s+1 -> WLs 4s .. 4s+3
        exp_wl[4*step + 0] = !query[2*step];
        exp_wl[4*step + 1] =  query[2*step];
        exp_wl[4*step + 2] = !query[2*step + 1];
        exp_wl[4*step + 3] =  query[2*step + 1];
      end else begin
        exp_wl[2*step + 0] = !query[step];
        exp_wl[2*step + 1] =  query[step];
      end
      checks++;
      if (wl_en !== exp_wl) begin failures++; $display("FAIL sense step %0d mode %0d", step, mode_2b); end
      checks++;
      if ($countones(wl_en) != (mode_2b ? 2 : 1)) begin failures++; $display("FAIL pair count"); end
      op = arr_op_t'(1 + ($urandom % 4));   // READ, SET, RESET, FORM
      #1;
      checks++;
      if (wl_en !== (256'(1) << col)) begin failures++; $display("FAIL select col %0d", col); end
      op = OP_IDLE;
      #1;
      checks++;
      if (wl_en !== '0) begin failures++; $display("FAIL idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
