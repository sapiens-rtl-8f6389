// bl_sl_driver: BL/SL decoder and bias selection for programming and verify.
//
// Decodes `row` to the one BL/SL pair that is driven and chooses the bias
// levels (as mV codes for the level-shifting drivers) for the operation:
//   READ  : BL 0.2 V, SL 0 V, WL 2.5 V         (verify read)
//   SET   : BL 3.3 V, SL 0 V                   (to low resistance)
//   RESET : BL 0 V,   SL 3.5 V                 (to high resistance)
//   FORM  : BL 3.3 V, SL 0 V, WL = form_wl_mv  (ramped by prog_ctrl)
//   SENSE : no BL driven, SLs at ground; selected WLs pulse at 0.9 V
// These values follow the published operating points except the WL level
// during SET/RESET (2.5 V) and sensing (0.9 V), which are this design's
// choices. Purely combinational.
module bl_sl_driver
  import sapiens_pkg::*;
#(
  parameter int N_BL = sapiens_pkg::N_BL
) (
  input  arr_op_t                  op,
  input  logic [$clog2(N_BL)-1:0]  row,
  input  mv_t                      form_wl_mv,
  output logic [N_BL-1:0]          bl_sel,
  output mv_t                      bl_mv,
  output mv_t                      sl_mv,
  output mv_t                      wl_mv
);
  always_comb begin
    bl_sel = '0;
    bl_mv  = '0;
    sl_mv  = '0;
    wl_mv  = '0;
    unique case (op)
      OP_READ:  begin bl_sel[row] = 1'b1; bl_mv = mv_t'(V_READ_BL_MV);  wl_mv = mv_t'(V_READ_WL_MV); end
      OP_SET:   begin bl_sel[row] = 1'b1; bl_mv = mv_t'(V_SET_BL_MV);   wl_mv = mv_t'(V_PROG_WL_MV); end
      OP_RESET: begin bl_sel[row] = 1'b1; sl_mv = mv_t'(V_RESET_SL_MV); wl_mv = mv_t'(V_PROG_WL_MV); end
      OP_FORM:  begin bl_sel[row] = 1'b1; bl_mv = mv_t'(V_FORM_BL_MV);  wl_mv = form_wl_mv; end
      OP_SENSE: wl_mv = mv_t'(V_SENSE_WL_MV);
      default:  ;
    endcase
  end
endmodule
