// tb_sapiens_full: one complete learn-and-infer operation with the design at
// its default sizes and pulse widths (SET 1 us = 200 cycles, RESET 100 us =
// 20000 cycles). The array is formed and preloaded with 31 support features
// in all 8 banks through the backdoor; class 5 is then embedded into bank 0
// by a real write-verify command, checked device by device, and a noisy
// query of class 5 is classified by all 8 banks in 2-bit mode.
module tb_sapiens_full;
  import sapiens_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_valid = 0, prog_ready, prog_done, prog_fail;
  prog_cmd_t prog_cmd = CMD_WRITE;
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

  sapiens_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [127:0] therm(input logic [31:0][2:0] lv);
    logic [127:0] v;
    logic [95:0]  flat;
    flat = lv;
    v = '0;
    for (int e = 0; e < 32; e++) begin
      v = v | (128'((1 << int'(flat[2:0])) - 1) << (4 * e));
      flat = flat >> 3;
    end
    return v;
  endfunction

  logic [31:0][2:0] feat_lv [32];
  logic [127:0]     feat [32];

  initial begin
    int cyc, bad, p0, best, bc, s;
    logic [127:0] q;
    logic [31:0][2:0] qlv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 32; c++) begin
      for (int e = 0; e < 32; e++) feat_lv[c][e] = 3'($urandom_range(4, 0));
      feat[c] = therm(feat_lv[c]);
    end
    dut.u_array.form_all();
    for (int c = 0; c < 32; c++)
      for (int b = 0; b < 8; b++)
        if (!(c == 5 && b == 0)) dut.u_array.write_row(8 * c + b, feat[c]);

    // write-verify of class 5 into bank 0 (freshly formed devices are LRS)
    p0 = prog_pulses;
    @(negedge clk);
    prog_class = 5'd5; prog_bank_mask = 8'h01; prog_levels = feat_lv[5]; prog_valid = 1;
    @(negedge clk);
    prog_valid = 0;
    cyc = 0;
    while (!prog_done) begin @(negedge clk); cyc++; end
    check(!prog_fail, "write-verify");
    check(int'(prog_pulses) - p0 == 128, $sformatf("%0d pulses, expected 128 RESETs", prog_pulses - p0));
    // 256 reads + 128 * (20000 pulse + 1 gap + 1 re-read) + done
    check(cyc >= 128 * 20000, $sformatf("programming took %0d cycles", cyc));
    bad = 0;
    for (int i = 0; i < 128; i++) begin
      if (dut.u_array.get_dev(40, 2*i)     != (feat[5][i] ? 1 : 2)) bad++;
      if (dut.u_array.get_dev(40, 2*i + 1) != (feat[5][i] ? 2 : 1)) bad++;
    end
    check(bad == 0, "programmed BL 40");

    // inference over all 8 banks
    qlv = feat_lv[5];
    for (int k = 0; k < 5; k++) qlv[3 * k] = (qlv[3 * k] == 3'd4) ? 3'd3 : qlv[3 * k] + 3'd1;
    q = therm(qlv);
    best = -1; bc = 0;
    for (int c = 0; c < 32; c++) begin
      s = $countones(~(q ^ feat[c]));
      if (s > best) begin best = s; bc = c; end
    end
    @(negedge clk);
    inf_levels = qlv; inf_bank_mask = 8'hFF; inf_valid = 1;
    @(posedge clk);
    #1 inf_valid = 0;
    cyc = 1;
    while (!inf_done && cyc < 10000) begin @(posedge clk); #1 cyc++; end
    check(cyc == 2 + 8 * (64 + 4), $sformatf("inference latency %0d", cyc));
    check(bc == 5 && inf_class == 5'd5, $sformatf("class %0d (reference %0d)", inf_class, bc));
    for (int b = 0; b < 8; b++)
      check(inf_bank_class[b] == 5'd5 && int'(inf_bank_score[b]) == best, $sformatf("bank %0d", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
