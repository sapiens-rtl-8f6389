// tb_prog_ctrl: runs the programming controller against a small device model
// kept in the testbench (4 BLs x 8 WLs). It checks forming with the WL ramp
// (1.3 V + 50 mV per attempt), give-up above 2.5 V, write-verify with SET and
// RESET pulses of the configured widths, re-programming after injected pulse
// failures, a verification pass that pulses only drifted or relaxed devices,
// broadcast
// to both banks, and the fail flag when a device cannot reach its target.
module tb_prog_ctrl;
  import sapiens_pkg::*;
  localparam int SETC = 3, RESETC = 6, FORMC = 4, MAXP = 4;
  logic clk = 0, rst_n = 0, valid = 0;
  logic ready, done, fail, pulse, rd_lrs, rd_hrs;
  prog_cmd_t cmd;
  logic [0:0] cls;
  logic [1:0] bank_mask;
  logic [3:0] feature;
  logic [31:0] pulse_count, form_steps;
  arr_op_t op;
  logic [1:0] row;
  logic [2:0] col;
  mv_t form_wl_mv;
  int checks = 0, failures = 0;

  prog_ctrl #(.N_BANK(2), .N_CLASS(2), .N_WL(8), .SET_CYCLES(SETC),
              .RESET_CYCLES(RESETC), .FORM_CYCLES(FORMC), .MAX_PULSES(MAXP)) dut (.*);

  always #5 clk = ~clk;

  // device model: 0 unformed, 1 LRS, 2 HRS, 3 relaxed HRS (reads neither)
  int dev [4][8];
  int thr [4][8];
  int plen, npulses, nform, bad_width, bad_ramp, fail_every, pulse_idx, form_try;
  logic pulse_q;
  logic [4:0] last_rc = '1;
  arr_op_t op_q;

  assign rd_lrs = (op == OP_READ) && dev[row][col] == 1;
  assign rd_hrs = (op == OP_READ) && dev[row][col] == 2;

  always @(posedge clk) begin
    pulse_q <= pulse;
    op_q    <= op;
    if (pulse) plen <= pulse_q ? plen + 1 : 1;
    if (pulse && !pulse_q) begin
      npulses++;
      if (op == OP_FORM) begin
        nform++;
        if (5'({row, col}) != last_rc) form_try = 0;
        last_rc = 5'({row, col});
        if (int'(form_wl_mv) != 1300 + 50 * form_try) bad_ramp++;
        form_try++;
      end
    end
    if (pulse_q && !pulse) begin
      pulse_idx++;
      case (op)
        OP_SET:   if (plen != SETC)   bad_width++;
        OP_RESET: if (plen != RESETC) bad_width++;
        OP_FORM:  if (plen != FORMC)  bad_width++;
        default:  bad_width++;
      endcase
      if (fail_every == 0 || pulse_idx % fail_every != 0) begin
        if (op == OP_FORM && dev[row][col] == 0 && int'(form_wl_mv) >= 1300 + 50 * thr[row][col]) dev[row][col] = 1;
        else if (op == OP_SET && dev[row][col] != 0) dev[row][col] = 1;
        else if (op == OP_RESET && dev[row][col] != 0) dev[row][col] = 2;
      end
    end
  end

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

  task automatic run(input prog_cmd_t c, input int k, input logic [1:0] m, input logic [3:0] f);
    int guard;
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c; cls = 1'(k); bank_mask = m; feature = f; valid = 1;
    @(negedge clk);
    valid = 0;
    guard = 0;
    while (!done && guard < 100000) begin @(negedge clk); guard++; end
    check(done, "done pulse");
  endtask

  function automatic int target(input logic [3:0] f, input int c);
    return (c % 2 == 0) ? (f[c/2] ? 1 : 2) : (f[c/2] ? 2 : 1);
  endfunction

  initial begin
    int exp_f, p0;
    logic [3:0] f0;
    cmd = CMD_FORM; cls = 0; bank_mask = 0; feature = 0;
    plen = 0; npulses = 0; nform = 0; bad_width = 0; bad_ramp = 0; fail_every = 0;
    pulse_idx = 0; form_try = 0; pulse_q = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
      dev[r][c] = 0;
      thr[r][c] = $urandom % 6;
    end
    thr[2][3] = 30;              // cannot form within the ramp
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. form class 0 in both banks: rows 0 and 1
    exp_f = 0;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 8; c++) exp_f += thr[r][c] + 1;
    run(CMD_FORM, 0, 2'b11, 4'h0);
    check(!fail, "form ok");
    check(nform == exp_f && int'(form_steps) == exp_f, $sformatf("form pulses %0d/%0d expected %0d", nform, form_steps, exp_f));
    for (int r = 0; r < 2; r++) for (int c = 0; c < 8; c++) check(dev[r][c] == 1, "formed");
    check(dev[2][0] == 0 && dev[3][0] == 0, "other rows untouched");

    // 2. form class 1 bank 0 (row 2): one device gives up above 2.5 V
    p0 = nform;
    run(CMD_FORM, 1, 2'b01, 4'h0);
    check(fail, "form give-up flagged");
    check(dev[2][3] == 0, "device stays unformed");
    exp_f = 25;
    for (int c = 0; c < 8; c++) if (c != 3) exp_f += thr[2][c] + 1;
    check(nform - p0 == exp_f, $sformatf("ramp pulses %0d expected %0d", nform - p0, exp_f));

    // 3. write class 0 to both banks with every third pulse failing
    fail_every = 3;
    f0 = 4'($urandom);
    run(CMD_WRITE, 0, 2'b11, f0);
    check(!fail, "write ok");
    for (int r = 0; r < 2; r++) for (int c = 0; c < 8; c++)
      check(dev[r][c] == target(f0, c), $sformatf("row %0d dev %0d", r, c));
    fail_every = 0;

    // 4. verification pass: nothing to do, then one drifted device
    p0 = npulses;
    run(CMD_WRITE, 0, 2'b11, f0);
    check(npulses == p0, "verify pass without pulses");
    dev[1][5] = (dev[1][5] == 1) ? 2 : 1;
    run(CMD_WRITE, 0, 2'b11, f0);
    check(npulses == p0 + 1 && dev[1][5] == target(f0, 5), "drifted device re-programmed");
    // a relaxed HRS device fails its verify read and gets one RESET
    for (int c = 0; c < 8; c++) if (target(f0, c) == 2) begin dev[0][c] = 3; break; end
    p0 = npulses;
    run(CMD_WRITE, 0, 2'b11, f0);
    check(npulses == p0 + 1, "relaxed device re-programmed once");
    for (int c = 0; c < 8; c++) check(dev[0][c] == target(f0, c), "row 0 after relaxation");
    check(int'(pulse_count) == npulses, "pulse counter");

    // 5. write to row 2: the unformed device cannot be set -> fail
    p0 = npulses;
    run(CMD_WRITE, 1, 2'b01, 4'b0000);   // bit 1 = 0: device 3 must be LRS
    check(fail, "write give-up flagged");
    check(npulses - p0 >= MAXP, "max pulses on stuck device");
    for (int c = 0; c < 8; c++) if (c != 3) check(dev[2][c] == target(4'b0000, c), "row 2 others");

    check(bad_width == 0, $sformatf("pulse widths (%0d bad)", bad_width));
    check(bad_ramp == 0, $sformatf("form ramp (%0d bad)", bad_ramp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
