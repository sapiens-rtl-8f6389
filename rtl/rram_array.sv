// rram_array: behavioural model of the 256 x 256 1T1R RRAM array (not
// synthesizable: the real part is a foundry RRAM macro with analog BLs).
//
// Device (r, c) sits where bit line r crosses word line c. The devices on
// WL 2i and 2i+1 of one BL form the complementary 2T-2R cell of bit i:
// '1' is stored as LRS-HRS, '0' as HRS-LRS. Every device is UNFORMED at
// power-up and has its own forming voltage, drawn between 1.3 V and 2.5 V
// with most devices near the low end, as in the measured forming spread.
//
// Programming: a pulse acts when it ends, on the device at the selected BL
// (bl_sel) and WL (wl_en), if it lasted at least the required width:
//   BL 3.3 V, SL 0 V on an UNFORMED device with wl_mv >= its forming
//   voltage for FORM_MIN_CYCLES -> LRS (forming);
//   BL 3.3 V, SL 0 V on a formed device for SET_MIN_CYCLES -> LRS;
//   SL 3.5 V, BL 0 V on a formed device for RESET_MIN_CYCLES -> HRS.
// With PULSE_FAIL_PERMILLE > 0 a pulse leaves the device unchanged with that
// probability, which stands in for programming variation and relaxation.
//
// A RESET device may later relax to a lower resistance, below the HRS verify
// level (the HRS tail). The model marks it RELAXED; the task relax_hrs
// relaxes a chosen share of the HRS devices, as happens after programming.
//
// Verify read (BL 0.2 V, no pulse), combinational: rd_lrs is 1 when the
// selected device is in LRS, rd_hrs is 1 when it is in HRS above the verify
// level. An UNFORMED device reads neither; a RELAXED device reads neither.
// Sensing: at a clock edge with sense_en, every BL records how many of its
// devices on active WLs are in HRS, in LRS and RELAXED (unformed devices are
// open). The sense amplifier model turns these counts into a BL voltage.
// Backdoor tasks form_all, write_row, set_dev and relax_hrs let a testbench
// preload or disturb the array. Device resistances, the forming spread and the failure
// model are this model's own simplifications.
module rram_array
  import sapiens_pkg::*;
#(
  parameter int N_BL                = sapiens_pkg::N_BL,
  parameter int N_WL                = sapiens_pkg::N_WL,
  parameter int SET_MIN_CYCLES      = sapiens_pkg::SET_CYCLES,
  parameter int RESET_MIN_CYCLES    = sapiens_pkg::RESET_CYCLES,
  parameter int FORM_MIN_CYCLES     = sapiens_pkg::FORM_CYCLES,
  parameter int PULSE_FAIL_PERMILLE = 0,
  parameter int SEED                = 1,
  localparam int CW                 = $clog2(N_WL + 1)
) (
  input  logic            clk,
  input  logic [N_BL-1:0] bl_sel,
  input  logic [N_WL-1:0] wl_en,
  input  mv_t             bl_mv,
  input  mv_t             sl_mv,
  input  mv_t             wl_mv,
  input  logic            pulse,
  input  logic            sense_en,
  output logic            rd_lrs,
  output logic            rd_hrs,
  output logic [CW-1:0]   bl_nhrs [N_BL],
  output logic [CW-1:0]   bl_nlrs [N_BL],
  output logic [CW-1:0]   bl_nrlx [N_BL]
);
  typedef enum logic [1:0] {DEV_UNFORMED = 2'd0, DEV_LRS = 2'd1, DEV_HRS = 2'd2, DEV_RLX = 2'd3} dev_t;

  dev_t       dev     [N_BL][N_WL];
  logic [4:0] form_k  [N_BL][N_WL];   // forming voltage = 1.3 V + k * 50 mV
  logic       pulse_q;
  int         pcnt;

  logic [CW-1:0] nh [N_BL];          // sensing scratch
  logic [CW-1:0] nl [N_BL];
  logic [CW-1:0] nr [N_BL];
  int  sel_r, sel_c;
  logic sel_ok;

  initial begin
    int a, b;
    void'($urandom(SEED));
    pulse_q = 1'b0;
    pcnt    = 0;
    for (int r = 0; r < N_BL; r++)
      for (int c = 0; c < N_WL; c++) begin
        a = int'($urandom % 25);
        b = int'($urandom % 25);
        dev[r][c]    = DEV_UNFORMED;
        form_k[r][c] = 5'((a < b) ? a : b);
      end
    for (int r = 0; r < N_BL; r++) begin
      bl_nhrs[r] = '0;
      bl_nlrs[r] = '0;
      bl_nrlx[r] = '0;
    end
  end

  // Selected device: first selected BL and first active WL.
  always_comb begin
    sel_r = 0;
    sel_c = 0;
    sel_ok = 1'b0;
    for (int r = N_BL - 1; r >= 0; r--) if (bl_sel[r]) sel_r = r;
    for (int c = N_WL - 1; c >= 0; c--) if (wl_en[c])  sel_c = c;
    sel_ok = (|bl_sel) && (|wl_en);
  end

  always_comb begin
    rd_lrs = sel_ok && !pulse && (int'(bl_mv) == V_READ_BL_MV) &&
             (dev[sel_r][sel_c] == DEV_LRS);
    rd_hrs = sel_ok && !pulse && (int'(bl_mv) == V_READ_BL_MV) &&
             (dev[sel_r][sel_c] == DEV_HRS);
  end

  function automatic int form_mv(input logic [4:0] k);
    return V_FORM_WL_START_MV + int'(k) * V_FORM_WL_STEP_MV;
  endfunction

  always @(posedge clk) begin
    pulse_q <= pulse;
    if (pulse) pcnt <= pulse_q ? pcnt + 1 : 1;

    // A pulse takes effect when it ends.
    if (pulse_q && !pulse && sel_ok) begin
      if (PULSE_FAIL_PERMILLE == 0 || int'($urandom % 1000) >= PULSE_FAIL_PERMILLE) begin
        if (int'(bl_mv) >= V_SET_BL_MV && sl_mv == '0) begin
          if (dev[sel_r][sel_c] == DEV_UNFORMED) begin
            if (pcnt >= FORM_MIN_CYCLES && int'(wl_mv) >= form_mv(form_k[sel_r][sel_c]))
              dev[sel_r][sel_c] <= DEV_LRS;
          end else if (pcnt >= SET_MIN_CYCLES) begin
            dev[sel_r][sel_c] <= DEV_LRS;
          end
        end else if (int'(sl_mv) >= V_RESET_SL_MV && bl_mv == '0) begin
          if (dev[sel_r][sel_c] != DEV_UNFORMED && pcnt >= RESET_MIN_CYCLES)
            dev[sel_r][sel_c] <= DEV_HRS;
        end
      end
    end

    if (sense_en) begin
      for (int r = 0; r < N_BL; r++) begin
        nh[r] = '0;
        nl[r] = '0;
        nr[r] = '0;
      end
      for (int c = 0; c < N_WL; c++) begin
        if (wl_en[c]) begin
          for (int r = 0; r < N_BL; r++) begin
            if (dev[r][c] == DEV_HRS) nh[r] = nh[r] + 1'b1;
            if (dev[r][c] == DEV_LRS) nl[r] = nl[r] + 1'b1;
            if (dev[r][c] == DEV_RLX) nr[r] = nr[r] + 1'b1;
          end
        end
      end
      for (int r = 0; r < N_BL; r++) begin
        bl_nhrs[r] <= nh[r];
        bl_nlrs[r] <= nl[r];
        bl_nrlx[r] <= nr[r];
      end
    end
  end

  // ---- testbench backdoor ----
  task automatic form_all();
    for (int r = 0; r < N_BL; r++)
      for (int c = 0; c < N_WL; c++)
        if (dev[r][c] == DEV_UNFORMED) dev[r][c] = DEV_LRS;
  endtask

  task automatic write_row(input int r, input logic [N_WL/2-1:0] bits);
    for (int i = 0; i < N_WL / 2; i++) begin
      dev[r][2*i]     = bits[i] ? DEV_LRS : DEV_HRS;
      dev[r][2*i + 1] = bits[i] ? DEV_HRS : DEV_LRS;
    end
  endtask

  task automatic set_dev(input int r, input int c, input int state);
    dev[r][c] = dev_t'(state);
  endtask

  // Relax each HRS device with probability permille / 1000; returns how many.
  task automatic relax_hrs(input int permille, output int n);
    n = 0;
    for (int r = 0; r < N_BL; r++)
      for (int c = 0; c < N_WL; c++)
        if (dev[r][c] == DEV_HRS && int'($urandom % 1000) < permille) begin
          dev[r][c] = DEV_RLX;
          n++;
        end
  endtask

  function automatic int get_dev(input int r, input int c);
    return int'(dev[r][c]);
  endfunction
endmodule
