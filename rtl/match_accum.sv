// match_accum: the SA output registers and per-class match counters.
//
// At the end of each sensing cycle (`capture`) the 32 SA outputs are stored
// in registers; one cycle later each counter adds its class's matches:
// out_l + out_h (0..2) in 2-bit mode, out_h (0..1) in 1-bit mode. A larger
// count means more matching bits, i.e. a smaller L1 distance between query
// and stored feature. `clear` zeroes the counters and the capture register.
// Timing: SA outputs captured at edge t appear in `count` after edge t+1.
// Counters saturate at their maximum (this design's choice; 8 bits hold the
// largest count, 128).
module match_accum #(
  parameter int N_CLASS = 32,
  parameter int CNT_W   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     capture,
  input  logic                     mode_2b,
  input  logic [N_CLASS-1:0]       sa_l,
  input  logic [N_CLASS-1:0]       sa_h,
  output logic [N_CLASS-1:0][CNT_W-1:0] count
);
  logic [N_CLASS-1:0] reg_l, reg_h;
  logic               reg_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_l <= '0;
      reg_h <= '0;
      reg_v <= 1'b0;
    end else if (clear) begin
      reg_v <= 1'b0;
    end else begin
      reg_v <= capture;
      if (capture) begin
        reg_l <= sa_l;
        reg_h <= sa_h;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (reg_v) begin
      for (int j = 0; j < N_CLASS; j++) begin
        logic [1:0] inc;
        inc = mode_2b ? (2'(reg_l[j]) + 2'(reg_h[j])) : 2'(reg_h[j]);
        if (int'(count[j]) + int'(inc) > (1 << CNT_W) - 1) count[j] <= '1;
        else count[j] <= count[j] + CNT_W'(inc);
      end
    end
  end
endmodule
