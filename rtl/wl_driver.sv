// wl_driver: word-line decoder and drivers of the RRAM array.
//
// Sensing (op = OP_SENSE) applies the query vector a slice at a time. Query
// bit i drives the complementary WL pair of cell i: bit '0' turns on WL[2i],
// bit '1' turns on WL[2i+1], so a cell whose stored bit matches the query bit
// presents its high-resistance device to the BL. In 2-bit mode step s drives
// bits 2s and 2s+1 (4 WLs, 64 steps per vector); in 1-bit mode step s drives
// bit s (2 WLs, 128 steps). The 1-bit-mode mapping is this design's choice.
// Read, SET, RESET and FORM turn on the single WL `col`. OP_IDLE turns all off.
// Purely combinational; WL voltage levels come from bl_sl_driver.
module wl_driver
  import sapiens_pkg::*;
#(
  parameter int N_WL      = sapiens_pkg::N_WL,
  parameter int FEAT_BITS = N_WL / 2
) (
  input  arr_op_t                          op,
  input  logic [$clog2(N_WL)-1:0]          col,
  input  logic [FEAT_BITS-1:0]             query,
  input  logic [$clog2(FEAT_BITS)-1:0]     step,
  input  logic                             mode_2b,
  output logic [N_WL-1:0]                  wl_en
);
  always_comb begin
    wl_en = '0;
    unique case (op)
      OP_SENSE: begin
        for (int i = 0; i < FEAT_BITS; i++) begin
          if (mode_2b ? ((i >> 1) == int'(step)) : (i == int'(step))) begin
            wl_en[2*i]     = ~query[i];
            wl_en[2*i + 1] =  query[i];
          end
        end
      end
      OP_READ, OP_SET, OP_RESET, OP_FORM: wl_en[col] = 1'b1;
      default: wl_en = '0;
    endcase
  end
endmodule
