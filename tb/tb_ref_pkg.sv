// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the reset contents of the rank table, the top-3
// selection by ranking order, and the decoding of a 16-word segment frame.
package tb_ref_pkg;
  import dct_pkg::*;

  // Reset rank: hit-layer count n, rank = (n >= 2 ? n-1 : 0) * 4 + weight.
  function automatic int ref_rank(int pattern, int weight);
    int n = $countones(pattern[3:0]);
    return ((n >= 2) ? (n - 1) : 0) * 4 + weight;
  endfunction

  // Slot that candidate i takes (0..2), or -1: its place is the number of
  // eligible candidates ahead of it (higher rank, or equal rank and lower
  // position).
  function automatic int ref_slot(cand_t c [NCAND], int r [NCAND], int i);
    int ahead = 0;
    if (!(c[i].valid && c[i].fine)) return -1;
    for (int j = 0; j < NCAND; j++)
      if (j != i && c[j].valid && c[j].fine && (r[j] > r[i] || (r[j] == r[i] && j < i)))
        ahead++;
    return (ahead < NSEL) ? ahead : -1;
  endfunction

  // Expected slot contents for one group.
  function automatic void ref_select(cand_t c [NCAND], int r [NCAND], output seg_t s [NSEL]);
    for (int k = 0; k < NSEL; k++) s[k] = '0;
    for (int i = 0; i < NCAND; i++) begin
      int k = ref_slot(c, r, i);
      if (k >= 0) begin
        s[k].mask = 1'b1;
        s[k].loc  = 4'(i);
        s[k].phi  = c[i].phi;
        s[k].dphi = c[i].dphi;
      end
    end
  endfunction

  // Rebuild a segment from the 16 bits its pin carried (bits[w] = word w).
  function automatic seg_t decode_pin(logic [15:0] bits);
    seg_t s;
    s.mask = bits[0];
    s.loc  = {bits[1], bits[2], bits[3], bits[4]};
    s.phi  = {bits[5], bits[6], bits[7], bits[8], bits[9], bits[10]};
    s.dphi = {bits[11], bits[12], bits[13]};
    return s;
  endfunction

  function automatic cand_t rand_cand(int p_valid, int p_fine);
    cand_t c;
    c.valid   = ($urandom_range(99) < p_valid);
    c.fine    = ($urandom_range(99) < p_fine);
    c.pattern = 4'($urandom);
    c.weight  = 2'($urandom);
    c.phi     = 6'($urandom);
    c.dphi    = 3'($urandom);
    return c;
  endfunction
endpackage
