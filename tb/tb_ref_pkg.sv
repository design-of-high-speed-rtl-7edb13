// tb_ref_pkg -- reference model shared by the testbenches.
//
// round_ref() finds the rounded operand by brute force, independently of the
// priority-encoder/mask method of the RTL: it scans every candidate v in
// 0..2^width, keeps those whose set bits span at most k positions (from the
// lowest set bit to the leading one), and returns the candidate nearest to b,
// the smaller one on a tie.
package tb_ref_pkg;

  function automatic int unsigned span_of(longint unsigned v);
    int hi = -1;
    int lo = -1;
    for (int i = 0; i < 40; i++) begin
      if (v[i]) begin
        hi = i;
        if (lo < 0) lo = i;
      end
    end
    return (hi < 0) ? 0 : int'(hi - lo + 1);
  endfunction

  function automatic longint unsigned round_ref(longint unsigned b, int width, int k);
    longint unsigned best      = 0;
    longint unsigned best_distance = 64'hFFFF_FFFF_FFFF_FFFF;
    longint unsigned distance;
    for (longint unsigned v = 0; v <= (64'd1 << width); v++) begin
      if (span_of(v) <= k) begin
        distance = (v > b) ? v - b : b - v;
        if (distance < best_distance) begin
          best      = v;
          best_distance = distance;
        end
      end
    end
    return best;
  endfunction

endpackage
