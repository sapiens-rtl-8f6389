// tb_sense_amp: checks the sensing windows. With SA VDD 1.0 V and a 7 kOhm
// charger, 0/1/2 matches among two selected cells give thermometer outputs
// 00/01/11 and one selected cell gives 01 (mismatch) or 11 (match). A weak
// charger (30 kOhm) pulls the windows down so only a double match reads high.
// A relaxed HRS device (60 kOhm) narrows the window: with a 30 kOhm charger
// a double match that includes one relaxed device no longer reads high.
// Expected values are worked out by hand from V = R/(R+Rc)*VDD with
// LRS 10 kOhm and HRS 200 kOhm.
module tb_sense_amp;
  logic [8:0]  n_hrs, n_lrs, n_rlx;
  logic [11:0] sa_vdd_mv;
  logic [19:0] r_charge_ohm;
  logic        out_l, out_h;
  int checks = 0, failures = 0;

  sense_amp dut (.n_hrs, .n_lrs, .n_rlx, .sa_vdd_mv, .r_charge_ohm, .out_l, .out_h);

  task automatic t(input int h, input int l, input int rc, input int vdd, input logic [1:0] exp_lh,
                   input int x = 0);
    n_hrs = 9'(h); n_lrs = 9'(l); n_rlx = 9'(x); r_charge_ohm = 20'(rc); sa_vdd_mv = 12'(vdd);
    #1;
    checks++;
    if ({out_h, out_l} !== {exp_lh[1], exp_lh[0]}) begin
      failures++;
      $display("FAIL hrs %0d lrs %0d rc %0d: h %0d l %0d", h, l, rc, out_h, out_l);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {h, l}
    t(0, 2, 7000, 1000, 2'b00);   // 5 kOhm   -> 417 mV, 0 matches
    t(1, 1, 7000, 1000, 2'b01);   // 9.5 kOhm -> 576 mV, 1 match
    t(2, 0, 7000, 1000, 2'b11);   // 100 kOhm -> 935 mV, 2 matches
    t(0, 1, 7000, 1000, 2'b01);   // 10 kOhm  -> 588 mV, 1-bit mismatch
    t(1, 0, 7000, 1000, 2'b11);   // 200 kOhm -> 966 mV, 1-bit match
    t(0, 0, 7000, 1000, 2'b11);   // open BL  -> SA VDD
    t(2, 0, 30000, 1000, 2'b11);  // 769 mV
    t(1, 1, 30000, 1000, 2'b00);  // 241 mV
    t(0, 2, 30000, 1000, 2'b00);  // 143 mV
    t(2, 0, 7000, 700, 2'b01);    // 654 mV with lowered SA VDD
    t(1, 1, 2000, 1000, 2'b11);   // strong charger: 826 mV
    t(1, 0, 7000, 1000, 2'b11, 1);  // 46 kOhm -> 868 mV, still a double match
    t(1, 0, 30000, 1000, 2'b01, 1); // 46 kOhm -> 605 mV, reads as one match
    t(0, 0, 30000, 1000, 2'b01, 1); // one relaxed cell alone: 667 mV
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
