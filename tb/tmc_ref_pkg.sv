// tmc_ref_pkg: reference model of the time encoding used by the testbenches.
// A half period's 16 samples are scanned from the earliest; the first sample
// that differs from its predecessor gives hit = 1, its level as the edge
// polarity and its index as the position. A clock period's word is
// {code of samples 31..16, code of samples 15..0}.
package tmc_ref_pkg;

  function automatic logic [5:0] ref_code(logic [15:0] s, logic p);
    logic last = p;
    for (int i = 0; i < 16; i++) begin
      if (s[i] != last) return {1'b1, s[i], 4'(i)};
      last = s[i];
    end
    return 6'b0;
  endfunction

  function automatic logic [11:0] ref_word(logic [31:0] s, logic prev_last);
    return {ref_code(s[31:16], s[15]), ref_code(s[15:0], prev_last)};
  endfunction

endpackage
