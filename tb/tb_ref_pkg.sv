// tb_ref_pkg: reference models shared by the testbenches.
//
// expected_responses() computes, from the test bit stream a core receives,
// the response bit stream its test interface must return: the stream is cut
// into S-bit chunks (bit c to chain c), one chunk per scan clock; after every
// L chunks the core captures; each scan clock unloads the last flip-flop of
// every chain; the returned stream is S zero bits followed by the unloaded
// chunks, cut to the length of the test stream. The core is the
// scan_core_model (chains start at zero, same capture rule).
package tb_ref_pkg;
  localparam int MAXS = 64, MAXL = 256;

  function automatic void expected_responses(input bit in_bits[$], input int S, input int L,
                                             output bit out_bits[$]);
    bit st  [MAXS][MAXL];
    bit nst [MAXS][MAXL];
    int nchunks;
    out_bits.delete();
    for (int c = 0; c < S; c++) for (int j = 0; j < L; j++) st[c][j] = 1'b0;
    for (int b = 0; b < S; b++) out_bits.push_back(1'b0);
    nchunks = in_bits.size() / S;
    for (int n = 0; n < nchunks; n++) begin
      for (int c = 0; c < S; c++) out_bits.push_back(st[c][L-1]);
      for (int c = 0; c < S; c++) begin
        for (int j = L - 1; j > 0; j--) st[c][j] = st[c][j-1];
        st[c][0] = in_bits[n*S + c];
      end
      if (n % L == L - 1) begin
        for (int c = 0; c < S; c++)
          for (int j = 0; j < L; j++)
            nst[c][j] = ~st[c][j] ^ st[(c + 1) % S][(j + 1) % L];
        st = nst;
      end
    end
    while (out_bits.size() > in_bits.size()) void'(out_bits.pop_back());
  endfunction

  // Same, for a core inside a core_wrapper with NPI input and NPO output
  // boundary cells (cell k on chain k mod S) and internal chains of length L.
  // Wrapper chain c is: input cells, internal chain c, output cells; the
  // test interface scans LW = max chain length chunks per pattern. At a
  // capture the internal chains update as above, input cells hold, and output
  // cell k loads the core output ~freg[k] ^ (input cell k).
  function automatic int wrapped_len(int S, int L, int NPI, int NPO, int c);
    int ni, no;
    ni = (NPI > c) ? (NPI - c + S - 1) / S : 0;
    no = (NPO > c) ? (NPO - c + S - 1) / S : 0;
    return ni + L + no;
  endfunction

  function automatic void expected_wrapped(input bit in_bits[$], input int S, input int L,
                                           input int NPI, input int NPO, input logic [31:0] freg,
                                           output bit out_bits[$]);
    bit ch  [MAXS][MAXL];
    bit nch [MAXS][MAXL];
    int ni [MAXS], len [MAXS];
    int lw, nchunks;
    out_bits.delete();
    lw = 0;
    for (int c = 0; c < S; c++) begin
      ni[c]  = (NPI > c) ? (NPI - c + S - 1) / S : 0;
      len[c] = wrapped_len(S, L, NPI, NPO, c);
      if (len[c] > lw) lw = len[c];
      for (int p = 0; p < len[c]; p++) ch[c][p] = 1'b0;
    end
    for (int b = 0; b < S; b++) out_bits.push_back(1'b0);
    nchunks = in_bits.size() / S;
    for (int n = 0; n < nchunks; n++) begin
      for (int c = 0; c < S; c++) out_bits.push_back(ch[c][len[c]-1]);
      for (int c = 0; c < S; c++) begin
        for (int p = len[c] - 1; p > 0; p--) ch[c][p] = ch[c][p-1];
        ch[c][0] = in_bits[n*S + c];
      end
      if (n % lw == lw - 1) begin
        nch = ch;
        for (int c = 0; c < S; c++)
          for (int j = 0; j < L; j++)
            nch[c][ni[c] + j] = ~ch[c][ni[c] + j] ^ ch[(c + 1) % S][ni[(c + 1) % S] + (j + 1) % L];
        for (int k = 0; k < NPO; k++) begin
          int c, i;
          bit pi;
          c = k % S; i = k / S;
          pi = (k < NPI) ? ch[c][i] : 1'b0;
          nch[c][ni[c] + L + i] = ~freg[k] ^ pi;
        end
        ch = nch;
      end
    end
    while (out_bits.size() > in_bits.size()) void'(out_bits.pop_back());
  endfunction
endpackage
