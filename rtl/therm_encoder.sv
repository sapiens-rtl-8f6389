// therm_encoder: turns quantized feature levels into the 128-bit vector the
// associative memory stores and searches.
//
// Each of the N_ELEM elements is a level 0..4 that becomes a THERM_BITS-wide
// thermometer code: level q sets the q least significant bits of its field
// (1 -> 0001, 3 -> 0111). Element e occupies bits [4e+3:4e]. With this code the
// number of differing bits between two vectors equals the L1 distance between
// their level vectors, so counting matching bits measures similarity.
// Levels above 4 are clipped to 4 and flagged on `sat`; clipping is this
// design's choice. Purely combinational.
module therm_encoder #(
  parameter int N_ELEM     = 32,
  parameter int THERM_BITS = 4,
  parameter int LEVEL_W    = 3
) (
  input  logic [N_ELEM-1:0][LEVEL_W-1:0] level,
  output logic [N_ELEM*THERM_BITS-1:0]   vec,
  output logic                           sat
);
  always_comb begin
    vec = '0;
    sat = 1'b0;
    for (int e = 0; e < N_ELEM; e++) begin
      for (int b = 0; b < THERM_BITS; b++)
        vec[e*THERM_BITS + b] = (int'(level[e]) > b);
      if (int'(level[e]) > THERM_BITS) sat = 1'b1;
    end
  end
endmodule
