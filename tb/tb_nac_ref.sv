// Reference model for the testbenches: edit distance with unit insertion
// and deletion cost and substitution cost 0 (match) or 2 (mismatch), plus
// the two character-match rules (DNA: codes share a set bit; ASCII: equal).
// Plain full-width dynamic programming, independent of the mod-4 hardware.
package tb_nac_ref;

  function automatic bit chars_match(bit dna, int a, int b);
    if (a == 0 || b == 0) return 1'b0;
    return dna ? ((a & b) != 0) : (a == b);
  endfunction

  function automatic int edit_distance(bit dna, int s[$], int t[$]);
    int prev[$], cur[$];
    int m = s.size();
    int n = t.size();
    for (int j = 0; j <= n; j++) prev.push_back(j);
    for (int i = 1; i <= m; i++) begin
      cur = {};
      cur.push_back(i);
      for (int j = 1; j <= n; j++) begin
        int best = prev[j] + 1;
        if (cur[j-1] + 1 < best) best = cur[j-1] + 1;
        if (prev[j-1] + (chars_match(dna, s[i-1], t[j-1]) ? 0 : 2) < best)
          best = prev[j-1] + (chars_match(dna, s[i-1], t[j-1]) ? 0 : 2);
        cur.push_back(best);
      end
      prev = cur;
    end
    return prev[n];
  endfunction

  // Random DNA code: a base most of the time, sometimes a wildcard.
  function automatic int rand_dna();
    int r = $urandom_range(0, 19);
    case (r)
      0: return 4'b0101;   // R
      1: return 4'b1010;   // Y
      2: return 4'b1111;   // N
      default: return 1 << $urandom_range(0, 3);
    endcase
  endfunction

  function automatic int rand_ascii();
    return 8'h61 + $urandom_range(0, 3);  // 'a'..'d'
  endfunction

endpackage
