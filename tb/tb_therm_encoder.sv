// tb_therm_encoder: checks the thermometer code of random level vectors,
// the clipping flag, and that the bit distance between two encoded vectors
// equals the L1 distance of their (clipped) levels.
module tb_therm_encoder;
  localparam int N = 32;
  logic [N-1:0][2:0] la, lb;
  logic [N*4-1:0]    va, vb;
  logic              sa, sb;
  int checks = 0, failures = 0;

  therm_encoder dut_a (.level(la), .vec(va), .sat(sa));
  therm_encoder dut_b (.level(lb), .vec(vb), .sat(sb));

  function automatic int clip(input int v); return (v > 4) ? 4 : v; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      bit any_big;
      int l1, hd;
      any_big = 0;
      for (int e = 0; e < N; e++) begin
        la[e] = 3'($urandom_range((t < 100) ? 4 : 7, 0));
        lb[e] = 3'($urandom_range(4, 0));
        if (la[e] > 4) any_big = 1;
      end
      #1;
      l1 = 0;
      for (int e = 0; e < N; e++) begin
        logic [3:0] exp_code;
        case (clip(int'(la[e])))
          0: exp_code = 4'b0000;
          1: exp_code = 4'b0001;
          2: exp_code = 4'b0011;
          3: exp_code = 4'b0111;
          default: exp_code = 4'b1111;
        endcase
        checks++;
        if (va[e*4 +: 4] !== exp_code) begin
          failures++;
          $display("FAIL elem %0d level %0d code %b", e, la[e], va[e*4 +: 4]);
        end
        begin
          int qa, qb;
          qa = clip(int'(la[e]));
          qb = int'(lb[e]);
          l1 += (qa > qb) ? qa - qb : qb - qa;
        end
      end
      hd = 0;
      for (int k = 0; k < N*4; k++) if (va[k] != vb[k]) hd++;
      checks++;
      if (hd != l1) begin failures++; $display("FAIL hamming %0d l1 %0d t %0d", hd, l1, t); for (int e = 0; e < N; e++) if ($countones(va[e*4 +: 4] ^ vb[e*4 +: 4]) != ((clip(int'(la[e])) > int'(lb[e])) ? clip(int'(la[e])) - int'(lb[e]) : int'(lb[e]) - clip(int'(la[e])))) $display("  %0d: %0d %0d %b %b", e, la[e], lb[e], va[e*4 +: 4], vb[e*4 +: 4]); end
      checks++;
      if (sa !== any_big) begin failures++; $display("FAIL sat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
