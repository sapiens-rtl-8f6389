// tb_sapiens_top: end-to-end test of the associative memory with short
// programming pulses (SET 3, RESET 5, FORM 4 cycles) and 15 % of pulses
// failing, so write-verify has to retry. It
//   - forms two BLs through the forming command (WL ramp),
//   - embeds 32 random support features broadcast to all 8 banks with
//     write-verify, and checks all 64 kbit through the array backdoor,
//   - re-runs write-verify on a BL with one drifted device,
//   - relaxes 2 % of the HRS devices and checks that a verification pass
//     over the whole chip re-programs each of them,
//   - runs 2-bit and 1-bit inferences over all or some banks and checks
//     class, per-bank winners, scores and latency against a reference,
//   - makes one bank disagree and checks the vote,
//   - weakens the SA charger and checks the changed scores,
//   - sends programming and inference requests together (programming wins),
//   - leaves a device unformed and checks that write-verify gives up.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_sapiens_top;
  import sapiens_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_valid = 0, prog_ready, prog_done, prog_fail;
  prog_cmd_t prog_cmd = CMD_FORM;
  logic [4:0] prog_class = '0;
  logic [7:0] prog_bank_mask = '0;
  logic [31:0][2:0] prog_levels = '0;
  logic [31:0] prog_pulses, prog_form_steps;
  logic prog_clipped, inf_clipped;
  logic inf_valid = 0, inf_ready, inf_done, inf_mode_2b = 1;
  logic [31:0][2:0] inf_levels = '0;
  logic [7:0] inf_bank_mask = '1;
  logic [4:0] inf_class;
  logic [7:0][4:0] inf_bank_class;
  logic [7:0][7:0] inf_bank_score;
  logic [11:0] sa_vdd_mv = 12'd1000;
  logic [19:0] sa_rchg_ohm = 20'd7000;
  int checks = 0, failures = 0;

  sapiens_top #(.SET_CYCLES(3), .RESET_CYCLES(5), .FORM_CYCLES(4),
                .PULSE_FAIL_PERMILLE(150), .SEED(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- reference model ----
  logic [127:0] store [8][32];          // what each bank holds
  logic [31:0][2:0] feat_lv [32];

  function automatic logic [127:0] therm(input logic [31:0][2:0] lv);
    logic [127:0] v;
    logic [95:0]  flat;
    flat = lv;
    v = '0;
    for (int e = 0; e < 32; e++) begin
      int q;
      q = int'(flat[2:0]);
      v = v | (128'((1 << q) - 1) << (4 * e));
      flat = flat >> 3;
    end
    return v;
  endfunction

  // score of one stored vector: mode 0 = 1 bit/step, 1 = 2 bits/step,
  // 2 = 2 bits/step with a weak charger (only double matches read high)
  function automatic int score(input logic [127:0] q, input logic [127:0] f, input int mode);
    logic [127:0] eq;
    eq = ~(q ^ f);
    if (mode == 2) return 2 * $countones(eq & (eq >> 1) & {64{2'b01}});
    return $countones(eq);
  endfunction

  // ---- drivers ----
  task automatic prog(input prog_cmd_t c, input int k, input logic [7:0] m, input logic [31:0][2:0] lv);
    @(negedge clk);
    while (!prog_ready) @(negedge clk);
    prog_cmd = c; prog_class = 5'(k); prog_bank_mask = m; prog_levels = lv; prog_valid = 1;
    @(negedge clk);
    prog_valid = 0;
    while (!prog_done) @(negedge clk);
  endtask

  int mech_form_ramp, mech_retry, mech_verify, mech_broadcast, mech_mode1, mech_mode2;
  int mech_subset, mech_disagree, mech_bias, mech_arbit, mech_giveup, mech_relax;

  task automatic infer(input logic [31:0][2:0] lv, input logic [7:0] m, input bit m2, input int smode);
    logic [127:0] q;
    int cyc, exp_cls, votes [32], best_v, n;
    n = m2 ? 64 : 128;
    q = therm(lv);
    @(negedge clk);
    while (!inf_ready) @(negedge clk);
    inf_levels = lv; inf_bank_mask = m; inf_mode_2b = m2; inf_valid = 1;
    @(posedge clk);
    #1 inf_valid = 0;
    cyc = 1;
    while (!inf_done && cyc < 10000) begin @(posedge clk); #1 cyc++; end
    check(cyc == 2 + $countones(m) * (n + 4), $sformatf("latency %0d", cyc));
    foreach (votes[i]) votes[i] = 0;
    for (int b = 0; b < 8; b++) if (m[b]) begin
      int bs, bc, s;
      bs = -1; bc = 0;
      for (int c = 0; c < 32; c++) begin
        s = score(q, store[b][c], smode);
        if (s > bs) begin bs = s; bc = c; end
      end
      votes[bc]++;
      check(int'(inf_bank_class[b]) == bc && int'(inf_bank_score[b]) == bs,
            $sformatf("bank %0d: class %0d score %0d expected %0d %0d", b, inf_bank_class[b], inf_bank_score[b], bc, bs));
    end
    best_v = -1; exp_cls = 0;
    for (int c = 0; c < 32; c++) if (votes[c] > best_v) begin best_v = votes[c]; exp_cls = c; end
    check(int'(inf_class) == exp_cls, $sformatf("voted class %0d expected %0d", inf_class, exp_cls));
    if (m2) mech_mode2++; else mech_mode1++;
    if (m != 8'hFF) mech_subset++;
    for (int b = 0; b < 8; b++) if (m[b] && inf_bank_class[b] != inf_class) mech_disagree++;
  endtask

  function automatic logic [31:0][2:0] noisy(input logic [31:0][2:0] lv, input int nflip);
    logic [31:0][2:0] r;
    r = lv;
    for (int k = 0; k < nflip; k++) begin
      int e;
      e = $urandom_range(31, 0);
      if (r[e] == 3'd4) r[e] = 3'd3; else if (r[e] == 3'd0) r[e] = 3'd1;
      else r[e] = ($urandom_range(1, 0) == 1) ? r[e] + 3'd1 : r[e] - 3'd1;
    end
    return r;
  endfunction

  initial begin
    int p0, bad, row;
    mech_form_ramp = 0; mech_retry = 0; mech_verify = 0; mech_broadcast = 0; mech_mode1 = 0;
    mech_mode2 = 0; mech_subset = 0; mech_disagree = 0; mech_bias = 0; mech_arbit = 0; mech_giveup = 0;
    mech_relax = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // forming of class 0 in banks 0 and 1 (BLs 0 and 1)
    prog(CMD_FORM, 0, 8'h03, '0);
    check(!prog_fail, "forming");
    bad = 0;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 256; c++) if (dut.u_array.get_dev(r, c) != 1) bad++;
    check(bad == 0, "formed devices");
    if (prog_form_steps > 512) mech_form_ramp++;
    dut.u_array.form_all();

    // one-shot learning: 32 features broadcast to all 8 banks
    for (int c = 0; c < 32; c++) begin
      for (int e = 0; e < 32; e++) feat_lv[c][e] = 3'($urandom_range(4, 0));
      for (int b = 0; b < 8; b++) store[b][c] = therm(feat_lv[c]);
    end
    p0 = prog_pulses;
    for (int c = 0; c < 32; c++) begin
      prog(CMD_WRITE, c, 8'hFF, feat_lv[c]);
      check(!prog_fail, $sformatf("write class %0d", c));
    end
    mech_broadcast++;
    if (int'(prog_pulses) - p0 > 256 * 128) mech_retry++;
    bad = 0;
    for (int b = 0; b < 8; b++) for (int c = 0; c < 32; c++) for (int i = 0; i < 128; i++) begin
      row = 8 * c + b;
      if (dut.u_array.get_dev(row, 2*i)     != (store[b][c][i] ? 1 : 2)) bad++;
      if (dut.u_array.get_dev(row, 2*i + 1) != (store[b][c][i] ? 2 : 1)) bad++;
    end
    check(bad == 0, $sformatf("stored pattern (%0d devices wrong)", bad));

    // verification pass on a BL with a drifted device
    dut.u_array.set_dev(8 * 4 + 2, 10, (dut.u_array.get_dev(8 * 4 + 2, 10) == 1) ? 2 : 1);
    p0 = prog_pulses;
    prog(CMD_WRITE, 4, 8'h04, feat_lv[4]);
    check(int'(prog_pulses) > p0 && dut.u_array.get_dev(8 * 4 + 2, 10) == (store[2][4][5] ? 1 : 2), "verify pass repairs");
    if (int'(prog_pulses) > p0) mech_verify++;

    // HRS relaxation after programming, repaired by a whole-chip verify pass
    begin
      int nrel;
      dut.u_array.relax_hrs(20, nrel);
      p0 = prog_pulses;
      for (int c = 0; c < 32; c++) prog(CMD_WRITE, c, 8'hFF, feat_lv[c]);
      check(int'(prog_pulses) - p0 >= nrel && int'(prog_pulses) - p0 < 2 * nrel + 20,
            $sformatf("relaxed %0d devices, %0d pulses", nrel, int'(prog_pulses) - p0));
      bad = 0;
      for (int b = 0; b < 8; b++) for (int c = 0; c < 32; c++) for (int i = 0; i < 128; i++) begin
        row = 8 * c + b;
        if (dut.u_array.get_dev(row, 2*i)     != (store[b][c][i] ? 1 : 2)) bad++;
        if (dut.u_array.get_dev(row, 2*i + 1) != (store[b][c][i] ? 2 : 1)) bad++;
      end
      check(bad == 0, $sformatf("pattern after relaxation (%0d devices wrong)", bad));
      if (nrel > 0 && bad == 0) mech_relax++;
    end

    // inference cases, all through one call site
    for (int t = 0; t < 9; t++) begin
      logic [31:0][2:0] lv;
      logic [7:0] m;
      bit m2;
      int smode;
      m = 8'hFF; m2 = 1'b1; smode = 1;
      sa_rchg_ohm = 20'd7000;
      case (t)
        0, 1, 2, 3: lv = noisy(feat_lv[$urandom_range(31, 0)], 6);
        4: begin lv = noisy(feat_lv[7], 4); m = 8'h0F; m2 = 1'b0; smode = 0; end
        5: begin lv = noisy(feat_lv[9], 8); m = 8'hA5; end
        6: begin
          // bank 3 holds a corrupted copy of class 12: it votes elsewhere
          store[3][12] = ~therm(feat_lv[12]);
          dut.u_array.write_row(8 * 12 + 3, store[3][12]);
          lv = feat_lv[12]; m = 8'h0F;
        end
        7: begin
          // weak SA charger: only double matches read high
          lv = noisy(feat_lv[20], 5); sa_rchg_ohm = 20'd30000; smode = 2; mech_bias++;
        end
        default: begin lv = noisy(feat_lv[21], 3); m2 = 1'b0; smode = 0; end
      endcase
      infer(lv, m, m2, smode);
      if (t == 6) check(inf_class == 5'd12, "majority keeps class 12");
    end
    sa_rchg_ohm = 20'd7000;

    // simultaneous requests: programming goes first
    @(negedge clk);
    while (!prog_ready) @(negedge clk);
    prog_cmd = CMD_WRITE; prog_class = 5'd1; prog_bank_mask = 8'h01; prog_levels = feat_lv[1];
    prog_valid = 1; inf_valid = 1; inf_levels = feat_lv[1]; inf_bank_mask = 8'h01; inf_mode_2b = 1;
    #1;
    check(prog_ready && !inf_ready, "programming wins");
    @(negedge clk);
    prog_valid = 0;
    check(!inf_ready && !dut.u_sense.busy, "inference held off");
    while (!prog_done) @(negedge clk);
    while (!inf_ready) @(negedge clk);
    @(negedge clk);
    inf_valid = 0;
    check(dut.u_sense.busy, "held inference starts afterwards");
    while (!inf_done) @(negedge clk);
    check(inf_class == 5'd1, "held inference result");
    mech_arbit++;

    // a device left unformed cannot be programmed
    // device 6 is the LRS device of bit 3 when the bit is 1, device 7 when 0
    dut.u_array.set_dev(8 * 30 + 6, store[6][30][3] ? 6 : 7, 0);
    prog(CMD_WRITE, 30, 8'h40, feat_lv[30]);
    check(prog_fail, "give-up on an unformed device");
    if (prog_fail) mech_giveup++;

    $display("mechanisms: form_ramp=%0d retry=%0d verify=%0d broadcast=%0d mode1=%0d mode2=%0d subset=%0d disagree=%0d bias=%0d arbit=%0d giveup=%0d relax=%0d",
             mech_form_ramp, mech_retry, mech_verify, mech_broadcast, mech_mode1, mech_mode2,
             mech_subset, mech_disagree, mech_bias, mech_arbit, mech_giveup, mech_relax);
    check(mech_form_ramp > 0, "forming ramp seen");
    check(mech_retry > 0, "write-verify retry seen");
    check(mech_verify > 0, "verify re-program seen");
    check(mech_broadcast > 0, "broadcast seen");
    check(mech_mode1 > 0 && mech_mode2 > 0, "both sensing modes seen");
    check(mech_subset > 0, "bank subset seen");
    check(mech_disagree > 0, "bank disagreement seen");
    check(mech_bias > 0, "SA bias change seen");
    check(mech_arbit > 0, "arbitration seen");
    check(mech_giveup > 0, "write give-up seen");
    check(mech_relax > 0, "relaxation repair seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
