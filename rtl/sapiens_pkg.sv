// sapiens_pkg: constants and types shared by the SAPIENS associative memory.
//
// The array is 256 word lines (WLs) by 256 bit lines (BLs) of 1T1R RRAM
// devices. Two neighbouring devices on one BL form a complementary 2T-2R cell,
// so every BL (one "row") stores a 128-bit feature vector. The 256 rows are
// split into 8 sub-AM banks of 32 rows, read by 32 shared sense amplifiers.
// Programming biases and pulse widths follow the published operating points;
// the maximum forming WL voltage (2.5 V), the WL level during SET/RESET and
// sensing, and the 200 MHz pulse clock are this design's choices.
package sapiens_pkg;

  // Array geometry
  localparam int N_WL       = 256;              // word lines (2 per cell)
  localparam int N_BL       = 256;              // bit lines = stored vectors
  localparam int FEAT_BITS  = N_WL / 2;         // 128-bit feature vector
  localparam int N_SA       = 32;               // sense amplifiers
  localparam int N_BANK     = 8;                // sub-AM banks (8:1 BL mux)
  localparam int N_CLASS    = N_SA;             // classes per bank
  localparam int N_ELEM     = 32;               // feature elements
  localparam int THERM_BITS = 4;                // thermometer code per element
  localparam int N_LEVELS   = 5;                // quantization levels 0..4
  localparam int LEVEL_W    = 3;
  localparam int CNT_W      = $clog2(FEAT_BITS + 1);  // match counter width
  localparam int DEV_CNT_W  = $clog2(N_WL + 1);       // devices on one BL

  // Timing at the 200 MHz core clock
  localparam int CLK_MHZ      = 200;
  localparam int SET_CYCLES   = 1 * CLK_MHZ;        // 1 us SET pulse
  localparam int RESET_CYCLES = 100 * CLK_MHZ;      // 100 us RESET pulse
  localparam int FORM_CYCLES  = 1000 * CLK_MHZ;     // 1 ms forming pulse

  // Bias points in mV
  localparam int V_SET_BL_MV        = 3300;
  localparam int V_RESET_SL_MV      = 3500;
  localparam int V_READ_BL_MV       = 200;
  localparam int V_READ_WL_MV       = 2500;
  localparam int V_FORM_BL_MV       = 3300;
  localparam int V_FORM_WL_START_MV = 1300;
  localparam int V_FORM_WL_STEP_MV  = 50;
  localparam int V_FORM_WL_MAX_MV   = 2500;
  localparam int V_PROG_WL_MV       = 2500;   // WL gate level for SET/RESET
  localparam int V_SENSE_WL_MV      = 900;    // WL pulse level when sensing

  typedef logic [11:0] mv_t;

  // Operation presented to the array peripherals
  typedef enum logic [2:0] {
    OP_IDLE  = 3'd0,
    OP_READ  = 3'd1,
    OP_SET   = 3'd2,
    OP_RESET = 3'd3,
    OP_FORM  = 3'd4,
    OP_SENSE = 3'd5
  } arr_op_t;

  // Host programming commands
  typedef enum logic {
    CMD_FORM  = 1'b0,
    CMD_WRITE = 1'b1
  } prog_cmd_t;

  // Physical row (BL) that holds class c of bank b: BL 8c+b sits on mux
  // input b of sense amplifier c.
  function automatic logic [7:0] row_of(input logic [4:0] cls, input logic [2:0] bank);
    return {cls, bank};
  endfunction

endpackage
