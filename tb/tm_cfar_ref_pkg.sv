// Reference model of the TM-CFAR decision, written independently of the RTL
// (plain insertion sort and 64/128-bit arithmetic) for the testbenches.
package tm_cfar_ref_pkg;

  typedef logic [31:0] word_t;

  // Sort n values ascending, in place.
  function automatic void sort_words(ref word_t v[], input int n);
    for (int i = 1; i < n; i++) begin
      word_t key = v[i];
      int j = i - 1;
      while (j >= 0 && v[j] > key) begin
        v[j+1] = v[j];
        j--;
      end
      v[j+1] = key;
    end
  endfunction

  // Trimmed mean of the 8 reference cells of a 9-cell window (tap 4 is the CUT).
  function automatic word_t ref_average(word_t win[9], int t1, int t2);
    word_t  cells[] = new[8];
    longint unsigned sum = 0;
    int k = 0;
    int keep = 8 - t1 - t2;
    for (int i = 0; i < 9; i++) if (i != 4) cells[k++] = win[i];
    sort_words(cells, 8);
    for (int i = t1; i < 8 - t2; i++) sum += longint'(cells[i]);
    return word_t'(sum / longint'(keep));
  endfunction

  // Adaptive threshold: average * T >> frac, saturated to 32 bits.
  function automatic word_t ref_threshold(word_t aver, word_t t, int frac);
    logic [127:0] p = 128'(aver) * 128'(t);
    p = p >> frac;
    return (p > 128'h0000_0000_FFFF_FFFF) ? 32'hFFFF_FFFF : word_t'(p);
  endfunction

  function automatic bit ref_decision(word_t win[9], word_t t, int t1, int t2, int frac);
    return win[4] > ref_threshold(ref_average(win, t1, t2), t, frac);
  endfunction

endpackage
