// sense_ctrl: sequencer for one inference (similarity search and prediction).
//
// On `start` it latches the query, the bank mask and the sensing mode, then
// visits the enabled sub-AM banks from the lowest index up. The 32 SAs are
// shared by the 8 banks through the BL muxes, so banks are sensed one after
// another. For each bank:
//   CLEAR   1 cycle   zero the match counters
//   SENSE   N cycles  step s applies query slice s on the WLs (sense_en=1);
//                     N = 64 in 2-bit mode (4 WLs per cycle), 128 in 1-bit
//   DRAIN   2 cycles  SA-register and counter pipeline empties
//   CMP     1 cycle   take the comparator-tree winner, record it, vote
// After the last bank one FINAL cycle takes the vote winner; `done` is high
// for one cycle after it with `class_out` valid. A start in cycle 0 gives
// `done` in cycle 2 + banks * (N + 4). At 200 MHz one bank in 1-bit mode
// senses for 640 ns. An empty bank mask finishes at once with class 0.
// The pipeline depths, bank order and empty-mask rule are this design's.
module sense_ctrl
  import sapiens_pkg::*;
#(
  parameter int N_BANK    = sapiens_pkg::N_BANK,
  parameter int N_CLASS   = sapiens_pkg::N_CLASS,
  parameter int FEAT_BITS = sapiens_pkg::FEAT_BITS,
  parameter int CNT_W     = sapiens_pkg::CNT_W,
  localparam int BW = $clog2(N_BANK),
  localparam int CW = $clog2(N_CLASS),
  localparam int SW = $clog2(FEAT_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request
  input  logic                 start,
  input  logic [FEAT_BITS-1:0] query,
  input  logic [N_BANK-1:0]    bank_mask,
  input  logic                 mode_2b,
  output logic                 busy,
  output logic                 done,
  output logic [CW-1:0]        class_out,
  output logic [N_BANK-1:0][CW-1:0]    bank_class,
  output logic [N_BANK-1:0][CNT_W-1:0] bank_score,
  // array side
  output arr_op_t              op,
  output logic [FEAT_BITS-1:0] query_q,
  output logic [SW-1:0]        step,
  output logic                 mode_q,
  output logic [BW-1:0]        bank_sel,
  output logic                 sense_en,
  // counters, comparator tree, voter
  output logic                 acc_clear,
  output logic                 acc_capture,
  input  logic [CW-1:0]        max_idx,
  input  logic [CNT_W-1:0]     max_val,
  output logic                 vote_clear,
  output logic                 vote,
  output logic [CW-1:0]        vote_class,
  input  logic [CW-1:0]        winner
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_SENSE, S_DRAIN, S_CMP, S_FINAL} state_t;
  state_t            state;
  logic [N_BANK-1:0] pending;
  logic              drain_cnt;
  logic [SW-1:0]     last_step;

  function automatic logic [BW-1:0] first_bank(input logic [N_BANK-1:0] m);
    first_bank = '0;
    for (int b = N_BANK - 1; b >= 0; b--) if (m[b]) first_bank = BW'(b);
  endfunction

  assign last_step  = mode_q ? SW'(FEAT_BITS / 2 - 1) : SW'(FEAT_BITS - 1);
  assign busy       = (state != S_IDLE);
  assign op         = (state == S_SENSE) ? OP_SENSE : OP_IDLE;
  assign sense_en   = (state == S_SENSE);
  assign acc_clear  = (state == S_CLEAR);
  assign vote_clear = (state == S_IDLE) && start;
  assign vote       = (state == S_CMP);
  assign vote_class = max_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pending     <= '0;
      drain_cnt   <= 1'b0;
      step        <= '0;
      bank_sel    <= '0;
      query_q     <= '0;
      mode_q      <= 1'b0;
      done        <= 1'b0;
      class_out   <= '0;
      bank_class  <= '0;
      bank_score  <= '0;
      acc_capture <= 1'b0;
    end else begin
      done        <= 1'b0;
      acc_capture <= sense_en;
      unique case (state)
        S_IDLE: if (start) begin
          query_q <= query;
          mode_q  <= mode_2b;
          if (bank_mask == '0) begin
            state <= S_FINAL;
          end else begin
            bank_sel <= first_bank(bank_mask);
            pending  <= bank_mask & ~(N_BANK'(1) << first_bank(bank_mask));
            state    <= S_CLEAR;
          end
        end
        S_CLEAR: begin
          step  <= '0;
          state <= S_SENSE;
        end
        S_SENSE: begin
          if (step == last_step) begin
            drain_cnt <= 1'b0;
            state     <= S_DRAIN;
          end
          step <= step + 1'b1;
        end
        S_DRAIN: begin
          drain_cnt <= 1'b1;
          if (drain_cnt) state <= S_CMP;
        end
        S_CMP: begin
          bank_class[bank_sel] <= max_idx;
          bank_score[bank_sel] <= max_val;
          if (pending != '0) begin
            bank_sel <= first_bank(pending);
            pending  <= pending & ~(N_BANK'(1) << first_bank(pending));
            state    <= S_CLEAR;
          end else begin
            state <= S_FINAL;
          end
        end
        S_FINAL: begin
          class_out <= winner;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
