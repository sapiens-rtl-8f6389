// bl_mux: the 32 8:1 bit-line multiplexers in front of the sense amplifiers.
//
// Sense amplifier j serves the group of BLs 8j .. 8j+7. Selecting mux input
// `bank_sel` = k connects BL 8j+k to SA j for every j at once, so sub-AM bank
// k is the set of 32 BLs {k, 8+k, 16+k, ...} and its 32 stored vectors (one
// per class j) are sensed in parallel. In silicon this is an analog pass-gate
// mux; here it carries the per-BL device counts produced by the array model.
// Purely combinational.
module bl_mux #(
  parameter int N_SA  = 32,
  parameter int MUX   = 8,
  parameter int CNT_W = 9
) (
  input  logic [$clog2(MUX)-1:0] bank_sel,
  input  logic [CNT_W-1:0]       bl_nhrs [N_SA*MUX],
  input  logic [CNT_W-1:0]       bl_nlrs [N_SA*MUX],
  input  logic [CNT_W-1:0]       bl_nrlx [N_SA*MUX],
  output logic [CNT_W-1:0]       sa_nhrs [N_SA],
  output logic [CNT_W-1:0]       sa_nlrs [N_SA],
  output logic [CNT_W-1:0]       sa_nrlx [N_SA]
);
  always_comb begin
    for (int j = 0; j < N_SA; j++) begin
      sa_nhrs[j] = bl_nhrs[j*MUX + int'(bank_sel)];
      sa_nlrs[j] = bl_nlrs[j*MUX + int'(bank_sel)];
      sa_nrlx[j] = bl_nrlx[j*MUX + int'(bank_sel)];
    end
  end
endmodule
