// pmatch_ref_pkg: reference model of P-Match coding for the testbenches.
//
// It works on text: the input word and the dictionary entries are turned into
// strings of '0'/'1' characters, groups are compared as substrings, and a
// compressed word is a string over "01wx" with the leftmost symbol first. It
// shares nothing with the RTL but the symbol encoding of pmatch_pkg, which
// sym_str() decodes.
package pmatch_ref_pkg;
  import pmatch_pkg::*;

  // Binary string of the low n bits of v, most significant bit first.
  function automatic string bin_str(input logic [63:0] v, input int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, v[i] ? "1" : "0"};
    return s;
  endfunction

  // Decode nsym two-bit symbols (highest index = leftmost) to text.
  function automatic string sym_str(input logic [63:0] bits, input int nsym);
    string s = "";
    for (int i = nsym - 1; i >= 0; i--) begin
      case (bits[2*i +: 2])
        2'b00:   s = {s, "0"};
        2'b11:   s = {s, "1"};
        2'b01:   s = {s, "w"};
        default: s = {s, "x"};
      endcase
    end
    return s;
  endfunction

  // Candidate word of `data` (n_seg segments of seg_w bits) against one
  // dictionary entry, as text.
  function automatic string ref_cand(input logic [63:0] data, input int seg_w,
                                     input int n_seg, input logic [15:0] entry);
    string d = bin_str(data, seg_w * n_seg);
    string e = bin_str({48'd0, entry}, seg_w);
    string s = "";
    int g = seg_w / 4;
    for (int seg = 0; seg < n_seg; seg++) begin
      for (int p = 0; p < 4; p++) begin
        string grp  = d.substr(seg * seg_w + p * g, seg * seg_w + p * g + g - 1);
        string egrp = e.substr(p * g, p * g + g - 1);
        bit all0 = 1, all1 = 1;
        for (int j = 0; j < g; j++) begin
          if (grp[j] != "0") all0 = 0;
          if (grp[j] != "1") all1 = 0;
        end
        if (all0)              s = {s, "0"};
        else if (all1)         s = {s, "1"};
        else if (grp == egrp)  s = {s, "w"};
        else                   s = {s, "x"};
      end
    end
    return s;
  endfunction

  // Score of a candidate: its symbols that are not 'x'.
  function automatic int ref_score(input string w);
    int n = 0;
    for (int i = 0; i < w.len(); i++) if (w[i] != "x") n++;
    return n;
  endfunction

  function automatic int count_char(input string w, input byte c);
    int n = 0;
    for (int i = 0; i < w.len(); i++) if (w[i] == c) n++;
    return n;
  endfunction

  // Index of the first candidate with the highest score.
  function automatic int ref_pick(input string c0, input string c1,
                                  input string c2, input string c3);
    int sc[4];
    int best = 0;
    sc[0] = ref_score(c0); sc[1] = ref_score(c1);
    sc[2] = ref_score(c2); sc[3] = ref_score(c3);
    for (int k = 1; k < 4; k++) if (sc[k] > sc[best]) best = k;
    return best;
  endfunction

  // Text of a symbol word back to two-bit symbols (highest index = leftmost).
  function automatic logic [63:0] str_bits(input string w);
    logic [63:0] b = '0;
    int n = w.len();
    for (int i = 0; i < n; i++) begin
      logic [1:0] c;
      case (w[i])
        "0":     c = 2'b00;
        "1":     c = 2'b11;
        "w", "W": c = 2'b01;
        default: c = 2'b10;
      endcase
      b[2*(n-1-i) +: 2] = c;
    end
    return b;
  endfunction

endpackage
