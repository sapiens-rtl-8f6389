// tb_bl_sl_driver: checks the BL decode and the bias levels for each
// operation against the published operating points.
module tb_bl_sl_driver;
  import sapiens_pkg::*;
  arr_op_t      op;
  logic [7:0]   row;
  mv_t          form_wl_mv, bl_mv, sl_mv, wl_mv;
  logic [255:0] bl_sel;
  int checks = 0, failures = 0;

  bl_sl_driver dut (.op, .row, .form_wl_mv, .bl_sel, .bl_mv, .sl_mv, .wl_mv);

  task automatic expect_bias(input string what, input int b, input int s, input int w, input bit sel);
    checks++;
    if (int'(bl_mv) != b || int'(sl_mv) != s || int'(wl_mv) != w ||
        bl_sel !== (sel ? (256'(1) << row) : 256'(0))) begin
      failures++;
      $display("FAIL %s: bl %0d sl %0d wl %0d", what, bl_mv, sl_mv, wl_mv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      row = 8'($urandom);
      form_wl_mv = mv_t'(1300 + 50 * ($urandom % 25));
      op = OP_READ;  #1 expect_bias("read",  200,  0,    2500, 1);
      op = OP_SET;   #1 expect_bias("set",   3300, 0,    2500, 1);
      op = OP_RESET; #1 expect_bias("reset", 0,    3500, 2500, 1);
      op = OP_FORM;  #1 expect_bias("form",  3300, 0,    int'(form_wl_mv), 1);
      op = OP_SENSE; #1 expect_bias("sense", 0,    0,    900,  0);
      op = OP_IDLE;  #1 expect_bias("idle",  0,    0,    0,    0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
