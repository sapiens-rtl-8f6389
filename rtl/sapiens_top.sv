// sapiens_top: RRAM-based non-volatile associative memory for one-shot
// learning and inference (64 kbit: 256 BLs x 128 complementary cells).
//
// Learning: a feature vector (32 levels 0..4, thermometer-coded to 128 bits)
// is written with write-verify into BL 8c+b for class c of every sub-AM bank b
// in the command's mask (CMD_WRITE). Fresh devices are formed first
// (CMD_FORM). Inference: the 128-bit query is applied to the WLs a slice per
// cycle; each of the 32 sense amplifiers, switched by its 8:1 mux onto the
// current bank's BL, reports how many query bits of the slice match the
// stored bits; counters accumulate the matches, a comparator tree picks the
// class with the most matches (smallest L1 distance) and the banks in the
// inference mask vote for the final class.
//
// Interfaces: a programming port (prog_valid/prog_ready handshake; prog_done
// pulses when the command finishes) and an inference port (inf_valid/
// inf_ready; inf_done pulses with inf_class valid). Only one runs at a time;
// a programming request wins a tie. Latency of an inference with B banks:
// 2 + B*(N+4) cycles from the accepting edge, N = 64 (2-bit mode) or 128
// (1-bit mode). sa_vdd_mv and sa_rchg_ohm set the sense-amplifier supply and
// charger strength used to calibrate the sensing windows.
// The array, drivers' analog levels and sense amplifiers are behavioural
// models; everything else is synthesizable logic. Running the controllers on
// chip, the arbitration and the latencies are this design's choices.
module sapiens_top
  import sapiens_pkg::*;
#(
  parameter int SET_CYCLES          = sapiens_pkg::SET_CYCLES,
  parameter int RESET_CYCLES        = sapiens_pkg::RESET_CYCLES,
  parameter int FORM_CYCLES         = sapiens_pkg::FORM_CYCLES,
  parameter int MAX_PULSES          = 8,
  parameter int PULSE_FAIL_PERMILLE = 0,
  parameter int SEED                = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // programming (learning)
  input  logic                           prog_valid,
  output logic                           prog_ready,
  input  prog_cmd_t                      prog_cmd,
  input  logic [4:0]                     prog_class,
  input  logic [N_BANK-1:0]              prog_bank_mask,
  input  logic [N_ELEM-1:0][LEVEL_W-1:0] prog_levels,
  output logic                           prog_done,
  output logic                           prog_fail,
  output logic [31:0]                    prog_pulses,
  output logic [31:0]                    prog_form_steps,
  output logic                           prog_clipped,
  // inference
  input  logic                           inf_valid,
  output logic                           inf_ready,
  input  logic [N_ELEM-1:0][LEVEL_W-1:0] inf_levels,
  input  logic [N_BANK-1:0]              inf_bank_mask,
  input  logic                           inf_mode_2b,
  output logic                           inf_done,
  output logic [4:0]                     inf_class,
  output logic [N_BANK-1:0][4:0]         inf_bank_class,
  output logic [N_BANK-1:0][CNT_W-1:0]   inf_bank_score,
  output logic                           inf_clipped,
  // sense amplifier calibration
  input  logic [11:0]                    sa_vdd_mv,
  input  logic [19:0]                    sa_rchg_ohm
);
  localparam int DW = DEV_CNT_W;

  // ---- encoders ----
  logic [FEAT_BITS-1:0] prog_feat, inf_query;

  therm_encoder u_enc_prog (.level(prog_levels), .vec(prog_feat), .sat(prog_clipped));
  therm_encoder u_enc_inf  (.level(inf_levels),  .vec(inf_query), .sat(inf_clipped));

  // ---- controllers ----
  logic    p_ready, p_start, s_busy, s_start;
  arr_op_t p_op, s_op, op;
  logic [7:0] p_row, p_col;
  logic    p_pulse;
  mv_t     p_form_mv;
  logic    rd_lrs, rd_hrs;

  assign p_start    = prog_valid && !s_busy;
  assign prog_ready = p_ready && !s_busy;
  assign s_start    = inf_valid && p_ready && !prog_valid && !s_busy;
  assign inf_ready  = p_ready && !prog_valid && !s_busy;

  prog_ctrl #(
    .SET_CYCLES(SET_CYCLES), .RESET_CYCLES(RESET_CYCLES),
    .FORM_CYCLES(FORM_CYCLES), .MAX_PULSES(MAX_PULSES)
  ) u_prog (
    .clk, .rst_n,
    .valid(p_start), .ready(p_ready), .cmd(prog_cmd), .cls(prog_class),
    .bank_mask(prog_bank_mask), .feature(prog_feat),
    .done(prog_done), .fail(prog_fail), .pulse_count(prog_pulses),
    .form_steps(prog_form_steps),
    .op(p_op), .row(p_row), .col(p_col), .pulse(p_pulse),
    .form_wl_mv(p_form_mv), .rd_lrs(rd_lrs), .rd_hrs(rd_hrs)
  );

  logic [FEAT_BITS-1:0]           s_query;
  logic [$clog2(FEAT_BITS)-1:0]   s_step;
  logic                           s_mode, s_sense_en;
  logic [$clog2(N_BANK)-1:0]      s_bank;
  logic                           acc_clear, acc_capture;
  logic [4:0]                     max_idx, vote_class, winner;
  logic [CNT_W-1:0]               max_val;
  logic                           vote_clear, vote;
  logic [$clog2(N_BANK+1)-1:0]    winner_votes;

  sense_ctrl u_sense (
    .clk, .rst_n,
    .start(s_start), .query(inf_query), .bank_mask(inf_bank_mask),
    .mode_2b(inf_mode_2b), .busy(s_busy), .done(inf_done),
    .class_out(inf_class), .bank_class(inf_bank_class),
    .bank_score(inf_bank_score),
    .op(s_op), .query_q(s_query), .step(s_step), .mode_q(s_mode),
    .bank_sel(s_bank), .sense_en(s_sense_en),
    .acc_clear(acc_clear), .acc_capture(acc_capture),
    .max_idx(max_idx), .max_val(max_val),
    .vote_clear(vote_clear), .vote(vote), .vote_class(vote_class),
    .winner(winner)
  );

  assign op = (s_op != OP_IDLE) ? s_op : p_op;

  // ---- peripherals and array ----
  logic [N_WL-1:0] wl_en;
  logic [N_BL-1:0] bl_sel;
  mv_t             bl_mv, sl_mv, wl_mv;

  wl_driver u_wl (
    .op(op), .col(p_col), .query(s_query), .step(s_step),
    .mode_2b(s_mode), .wl_en(wl_en)
  );

  bl_sl_driver u_blsl (
    .op(op), .row(p_row), .form_wl_mv(p_form_mv),
    .bl_sel(bl_sel), .bl_mv(bl_mv), .sl_mv(sl_mv), .wl_mv(wl_mv)
  );

  logic [DW-1:0] bl_nhrs [N_BL];
  logic [DW-1:0] bl_nlrs [N_BL];
  logic [DW-1:0] bl_nrlx [N_BL];

  rram_array #(
    .SET_MIN_CYCLES(SET_CYCLES), .RESET_MIN_CYCLES(RESET_CYCLES),
    .FORM_MIN_CYCLES(FORM_CYCLES),
    .PULSE_FAIL_PERMILLE(PULSE_FAIL_PERMILLE), .SEED(SEED)
  ) u_array (
    .clk, .bl_sel, .wl_en, .bl_mv, .sl_mv, .wl_mv,
    .pulse(p_pulse), .sense_en(s_sense_en),
    .rd_lrs(rd_lrs), .rd_hrs(rd_hrs),
    .bl_nhrs(bl_nhrs), .bl_nlrs(bl_nlrs), .bl_nrlx(bl_nrlx)
  );

  logic [DW-1:0] sa_nhrs [N_SA];
  logic [DW-1:0] sa_nlrs [N_SA];
  logic [DW-1:0] sa_nrlx [N_SA];

  bl_mux #(.N_SA(N_SA), .MUX(N_BANK), .CNT_W(DW)) u_mux (
    .bank_sel(s_bank), .bl_nhrs(bl_nhrs), .bl_nlrs(bl_nlrs), .bl_nrlx(bl_nrlx),
    .sa_nhrs(sa_nhrs), .sa_nlrs(sa_nlrs), .sa_nrlx(sa_nrlx)
  );

  logic [N_SA-1:0] sa_l, sa_h;

  for (genvar j = 0; j < N_SA; j++) begin : g_sa
    sense_amp #(.CNT_W(DW)) u_sa (
      .n_hrs(sa_nhrs[j]), .n_lrs(sa_nlrs[j]), .n_rlx(sa_nrlx[j]),
      .sa_vdd_mv(sa_vdd_mv), .r_charge_ohm(sa_rchg_ohm),
      .out_l(sa_l[j]), .out_h(sa_h[j])
    );
  end

  // ---- registers, counters, comparator tree, voting ----
  logic [N_CLASS-1:0][CNT_W-1:0] count;

  match_accum #(.N_CLASS(N_CLASS), .CNT_W(CNT_W)) u_acc (
    .clk, .rst_n, .clear(acc_clear), .capture(acc_capture),
    .mode_2b(s_mode), .sa_l(sa_l), .sa_h(sa_h), .count(count)
  );

  comparator_tree #(.N(N_CLASS), .W(CNT_W)) u_cmp (
    .val(count), .max_val(max_val), .max_idx(max_idx)
  );

  bank_voter #(.N_CLASS(N_CLASS), .N_BANK(N_BANK)) u_vote (
    .clk, .rst_n, .clear(vote_clear), .vote(vote), .vote_class(vote_class),
    .winner(winner), .winner_votes(winner_votes)
  );
endmodule
