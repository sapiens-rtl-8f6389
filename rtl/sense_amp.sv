// sense_amp: behavioural model of one BL sense amplifier (not synthesizable:
// the real circuit is analog).
//
// The SA charger, a PMOS whose strength is set by SA Bias, pulls the BL up
// while the activated cells pull it down, so the BL settles at
//   V_BL = R_BL / (R_BL + R_charge) * SA_VDD,
// where R_BL is the parallel combination of the selected devices. A matching
// query bit selects the cell's high-resistance device, so more matches give a
// higher V_BL. Two inverter buffers with low and high trip points turn V_BL
// into a thermometer output: out_l = 1 above VT_LOW_MV, out_h = 1 above
// VT_HIGH_MV. With two query bits per cycle, 00/01/11 mean 0/1/2 matches.
// Relaxed HRS devices (the HRS tail, below 100 kOhm) are counted separately
// and enter with R_RLX_OHM; they pull a matching BL lower and narrow the
// sensing window. SA Bias is represented by the charger resistance it
// produces (r_charge_ohm). The device resistances (about 10 kOhm LRS and 20x that for
// HRS) follow the measured distributions; the trip points are this model's
// choice. Combinational.
module sense_amp #(
  parameter int  CNT_W       = 9,
  parameter real R_LRS_OHM   = 10000.0,
  parameter real R_HRS_OHM   = 200000.0,
  parameter real R_RLX_OHM   = 60000.0,
  parameter int  VT_LOW_MV   = 500,
  parameter int  VT_HIGH_MV  = 750
) (
  input  logic [CNT_W-1:0] n_hrs,
  input  logic [CNT_W-1:0] n_lrs,
  input  logic [CNT_W-1:0] n_rlx,
  input  logic [11:0]      sa_vdd_mv,
  input  logic [19:0]      r_charge_ohm,
  output logic             out_l,
  output logic             out_h
);
  real g_bl, r_bl, v_bl;

  always_comb begin
    g_bl = real'(n_hrs) / R_HRS_OHM + real'(n_lrs) / R_LRS_OHM +
           real'(n_rlx) / R_RLX_OHM;
    if (g_bl == 0.0) begin
      v_bl = real'(sa_vdd_mv);                // open BL charges to SA VDD
      r_bl = 0.0;
    end else begin
      r_bl = 1.0 / g_bl;
      v_bl = r_bl / (r_bl + real'(r_charge_ohm)) * real'(sa_vdd_mv);
    end
    out_l = (v_bl > real'(VT_LOW_MV));
    out_h = (v_bl > real'(VT_HIGH_MV));
  end
endmodule
