// prog_ctrl: forming and write-verify programming of feature vectors.
//
// A command names a class c and a mask of sub-AM banks; it acts on BL
// 8c+b of every bank b in the mask, lowest bank first, so one command
// broadcasts a feature to several banks. On each BL the 256 devices are
// handled one at a time, WL 0 first.
//
// CMD_WRITE (write-verify): device 2i must be LRS when feature bit i is 1 and
// device 2i+1 LRS when it is 0 (a '1' cell is LRS-HRS). The device is read
// (BL 0.2 V, WL 2.5 V): an LRS target must read rd_lrs, an HRS target rd_hrs
// (above the HRS verify level, so a relaxed device fails). If it already
// holds its target it is left alone,
// otherwise a SET (1 us) or RESET (100 us) pulse is applied and it is read
// again, up to MAX_PULSES pulses. Issuing WRITE again on a programmed BL is a
// verification pass: only devices that drifted are re-programmed.
// CMD_FORM: a device that does not read LRS gets 1 ms forming pulses with the
// WL voltage ramped from 1.3 V in 50 mV steps until it reads LRS or the ramp
// passes 2.5 V.
// A device that misses its target sets `fail` (held until the next command).
// Each pulse is followed by one cycle with the bias held and no pulse, then a
// read. `done` pulses for one cycle when the command ends; `ready` is high in
// idle. Pulse widths are in clock cycles (defaults for 200 MHz). Reading
// before pulsing, one device at a time, MAX_PULSES and the 2.5 V ramp end are
// this design's choices.
module prog_ctrl
  import sapiens_pkg::*;
#(
  parameter int N_BANK       = sapiens_pkg::N_BANK,
  parameter int N_CLASS      = sapiens_pkg::N_CLASS,
  parameter int N_WL         = sapiens_pkg::N_WL,
  parameter int SET_CYCLES   = sapiens_pkg::SET_CYCLES,
  parameter int RESET_CYCLES = sapiens_pkg::RESET_CYCLES,
  parameter int FORM_CYCLES  = sapiens_pkg::FORM_CYCLES,
  parameter int MAX_PULSES   = 8,
  localparam int BW = $clog2(N_BANK),
  localparam int CW = $clog2(N_CLASS),
  localparam int WW = $clog2(N_WL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 valid,
  output logic                 ready,
  input  prog_cmd_t            cmd,
  input  logic [CW-1:0]        cls,
  input  logic [N_BANK-1:0]    bank_mask,
  input  logic [N_WL/2-1:0]    feature,
  output logic                 done,
  output logic                 fail,
  output logic [31:0]          pulse_count,
  output logic [31:0]          form_steps,
  // array side
  output arr_op_t              op,
  output logic [CW+BW-1:0]     row,
  output logic [WW-1:0]        col,
  output logic                 pulse,
  output mv_t                  form_wl_mv,
  input  logic                 rd_lrs,
  input  logic                 rd_hrs
);
  typedef enum logic [2:0] {P_IDLE, P_READ, P_PULSE, P_GAP, P_DONE} state_t;
  state_t            state;
  prog_cmd_t         cmd_q;
  logic [CW-1:0]     cls_q;
  logic [BW-1:0]     bank;
  logic [N_BANK-1:0] pending;
  logic [N_WL/2-1:0] feat_q;
  arr_op_t           pulse_op;
  int                pcnt, plen;
  int                tries;
  logic              target_lrs;

  function automatic logic [BW-1:0] first_bank(input logic [N_BANK-1:0] m);
    first_bank = '0;
    for (int b = N_BANK - 1; b >= 0; b--) if (m[b]) first_bank = BW'(b);
  endfunction

  assign ready      = (state == P_IDLE);
  assign row        = {cls_q, bank};
  assign target_lrs = col[0] ? ~feat_q[col[WW-1:1]] : feat_q[col[WW-1:1]];

  always_comb begin
    unique case (state)
      P_READ:         op = OP_READ;
      P_PULSE, P_GAP: op = pulse_op;
      default:        op = OP_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= P_IDLE;
      cmd_q       <= CMD_FORM;
      cls_q       <= '0;
      bank        <= '0;
      pending     <= '0;
      feat_q      <= '0;
      col         <= '0;
      pulse       <= 1'b0;
      pulse_op    <= OP_IDLE;
      pcnt        <= 0;
      plen        <= 0;
      tries       <= 0;
      form_wl_mv  <= mv_t'(V_FORM_WL_START_MV);
      done        <= 1'b0;
      fail        <= 1'b0;
      pulse_count <= '0;
      form_steps  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        P_IDLE: if (valid) begin
          cmd_q      <= cmd;
          cls_q      <= cls;
          feat_q     <= feature;
          fail       <= 1'b0;
          col        <= '0;
          tries      <= 0;
          form_wl_mv <= mv_t'(V_FORM_WL_START_MV);
          if (bank_mask == '0) begin
            state <= P_DONE;
          end else begin
            bank    <= first_bank(bank_mask);
            pending <= bank_mask & ~(N_BANK'(1) << first_bank(bank_mask));
            state   <= P_READ;
          end
        end
        P_READ: begin
          logic ok, give_up;
          if (cmd_q == CMD_WRITE) begin
            ok      = target_lrs ? rd_lrs : rd_hrs;
            give_up = (tries >= MAX_PULSES);
          end else begin
            ok      = rd_lrs;
            give_up = (int'(form_wl_mv) > V_FORM_WL_MAX_MV);
          end
          if (ok || give_up) begin
            if (!ok) fail <= 1'b1;
            // next device
            tries      <= 0;
            form_wl_mv <= mv_t'(V_FORM_WL_START_MV);
            col        <= col + 1'b1;
            if (col == WW'(N_WL - 1)) begin
              if (pending != '0) begin
                bank    <= first_bank(pending);
                pending <= pending & ~(N_BANK'(1) << first_bank(pending));
              end else begin
                state <= P_DONE;
              end
            end
          end else begin
            tries <= tries + 1;
            pcnt  <= 1;
            pulse <= 1'b1;
            state <= P_PULSE;
            pulse_count <= pulse_count + 1;
            if (cmd_q == CMD_FORM) begin
              pulse_op <= OP_FORM;
              plen     <= FORM_CYCLES;
            end else if (target_lrs) begin
              pulse_op <= OP_SET;
              plen     <= SET_CYCLES;
            end else begin
              pulse_op <= OP_RESET;
              plen     <= RESET_CYCLES;
            end
          end
        end
        P_PULSE: begin
          if (pcnt >= plen) begin
            pulse <= 1'b0;
            state <= P_GAP;
          end
          pcnt <= pcnt + 1;
        end
        P_GAP: begin
          if (cmd_q == CMD_FORM) begin
            form_wl_mv <= form_wl_mv + mv_t'(V_FORM_WL_STEP_MV);
            form_steps <= form_steps + 1;
          end
          state <= P_READ;
        end
        P_DONE: begin
          done  <= 1'b1;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
