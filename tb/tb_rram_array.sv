// tb_rram_array: exercises the array model (16 BLs x 8 WLs, short pulses):
// forming only with a long enough pulse and a high enough WL voltage, a WL
// ramp that forms every device between 1.3 V and 2.5 V, SET and RESET with
// correct and too-short pulses, verify reads, and sensing counts of HRS and
// LRS devices on the active WLs of every BL against a reference, the HRS
// verify read, and relaxed HRS devices counted apart.
module tb_rram_array;
  import sapiens_pkg::*;
  localparam int NB = 16, NW = 8, SETM = 3, RESETM = 5, FORMM = 7;
  logic clk = 0;
  logic [NB-1:0] bl_sel;
  logic [NW-1:0] wl_en;
  mv_t  bl_mv, sl_mv, wl_mv;
  logic pulse, sense_en, rd_lrs, rd_hrs;
  logic [3:0] bl_nhrs [NB];
  logic [3:0] bl_nlrs [NB];
  logic [3:0] bl_nrlx [NB];
  int checks = 0, failures = 0;

  rram_array #(.N_BL(NB), .N_WL(NW), .SET_MIN_CYCLES(SETM), .RESET_MIN_CYCLES(RESETM),
               .FORM_MIN_CYCLES(FORMM), .SEED(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic idle();
    bl_sel = '0; wl_en = '0; bl_mv = '0; sl_mv = '0; wl_mv = '0; pulse = 0; sense_en = 0;
  endtask

  // kind: 0 form/set (BL high), 1 reset (SL high)
  task automatic do_pulse(input int r, input int c, input int kind, input int len, input int wmv);
    @(negedge clk);
    bl_sel = NB'(1) << r; wl_en = NW'(1) << c; wl_mv = mv_t'(wmv);
    bl_mv = (kind == 0) ? mv_t'(V_SET_BL_MV) : '0;
    sl_mv = (kind == 1) ? mv_t'(V_RESET_SL_MV) : '0;
    pulse = 1;
    repeat (len) @(negedge clk);
    pulse = 0;
    @(negedge clk);
    idle();
  endtask

  task automatic rd(input int r, input int c, output bit v, input bit hrs = 0);
    @(negedge clk);
    bl_sel = NB'(1) << r; wl_en = NW'(1) << c; bl_mv = mv_t'(V_READ_BL_MV);
    sl_mv = '0; wl_mv = mv_t'(V_READ_WL_MV);
    #1 v = hrs ? rd_hrs : rd_lrs;
    @(negedge clk);
    idle();
  endtask

  initial begin
    bit v;
    int formed_at, nramp;
    logic [3:0] rbits [NB];
    idle();
    repeat (2) @(negedge clk);

    rd(0, 0, v); check(!v, "unformed reads high resistance");
    do_pulse(0, 0, 0, FORMM - 1, 2500);
    rd(0, 0, v); check(!v, "short forming pulse has no effect");
    check(dut.get_dev(0, 0) == 0, "still unformed");
    do_pulse(0, 0, 0, FORMM, 2500);
    rd(0, 0, v); check(v, "formed at 2.5 V");

    // ramp every device of BL 1
    for (int c = 0; c < NW; c++) begin
      formed_at = 0; nramp = 0;
      for (int mv = 1300; mv <= 2500 && formed_at == 0; mv += 50) begin
        do_pulse(1, c, 0, FORMM, mv);
        nramp++;
        rd(1, c, v);
        if (v) formed_at = mv;
      end
      check(formed_at >= 1300 && formed_at <= 2500, $sformatf("dev %0d formed at %0d", c, formed_at));
      do_pulse(1, c, 0, FORMM, 1300);      // forming pulse on a formed device acts as SET
      rd(1, c, v); check(v, "stays LRS");
    end

    // RESET / SET
    do_pulse(1, 2, 1, RESETM - 1, 2500);
    rd(1, 2, v); check(v, "short RESET has no effect");
    do_pulse(1, 2, 1, RESETM, 2500);
    rd(1, 2, v); check(!v, "RESET to HRS");
    check(dut.get_dev(1, 2) == 2, "state HRS");
    do_pulse(1, 2, 0, SETM - 1, 2500);
    rd(1, 2, v); check(!v, "short SET has no effect");
    do_pulse(1, 2, 0, SETM, 2500);
    rd(1, 2, v); check(v, "SET to LRS");
    do_pulse(1, 2, 1, RESETM, 2500);
    do_pulse(5, 2, 0, SETM, 2500);        // unformed device cannot be SET
    check(dut.get_dev(5, 2) == 0, "unformed ignores SET");

    // sensing
    dut.form_all();
    for (int r = 0; r < NB; r++) begin
      rbits[r] = 4'($urandom);
      dut.write_row(r, rbits[r]);
    end
    dut.set_dev(3, 1, 0);                 // one open device
    for (int t = 0; t < 50; t++) begin
      logic [NW-1:0] w;
      w = NW'($urandom);
      @(negedge clk);
      wl_en = w; sense_en = 1;
      @(negedge clk);
      sense_en = 0; wl_en = '0;
      for (int r = 0; r < NB; r++) begin
        int eh, el;
        eh = 0; el = 0;
        for (int c = 0; c < NW; c++) if (w[c]) begin
          if (r == 3 && c == 1) continue;
          // '1' = LRS on the even device, HRS on the odd one
          if ((c % 2 == 0) == rbits[r][c/2]) el++; else eh++;
        end
        check(int'(bl_nhrs[r]) == eh && int'(bl_nlrs[r]) == el,
              $sformatf("sense BL %0d: %0d/%0d expected %0d/%0d", r, bl_nhrs[r], bl_nlrs[r], eh, el));
      end
    end

    // relaxation: a relaxed device reads neither LRS nor HRS, is counted
    // apart when sensed, and a RESET pulse brings it back above the level
    begin
      int nrel, nh;
      nh = 0;
      for (int c = 0; c < NW; c++) if (dut.get_dev(4, c) == 2) nh++;
      dut.set_dev(4, 0, 2);
      dut.set_dev(4, 1, 1);
      rd(4, 0, v, 1); check(v, "HRS passes the HRS verify read");
      rd(4, 1, v, 1); check(!v, "LRS fails the HRS verify read");
      dut.set_dev(4, 0, 3);
      rd(4, 0, v, 1); check(!v, "relaxed fails the HRS verify read");
      rd(4, 0, v, 0); check(!v, "relaxed is not LRS");
      @(negedge clk);
      wl_en = 8'h01; sense_en = 1;
      @(negedge clk);
      sense_en = 0; wl_en = '0;
      check(bl_nrlx[4] == 1 && bl_nhrs[4] == 0 && bl_nlrs[4] == 0, "relaxed counted apart");
      do_pulse(4, 0, 1, RESETM, 2500);
      rd(4, 0, v, 1); check(v, "RESET restores a relaxed device");
      nh = 0;
      for (int r = 0; r < NB; r++) for (int c = 0; c < NW; c++) if (dut.get_dev(r, c) == 2) nh++;
      dut.relax_hrs(1000, nrel);
      check(nrel == nh && nrel > 0, $sformatf("relax_hrs relaxed %0d of %0d", nrel, nh));
      for (int c = 0; c < NW; c++) check(dut.get_dev(4, c) != 2, "no HRS left");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
