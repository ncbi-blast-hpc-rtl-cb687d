// seed_model_pkg: reference model of the query lookup tables, for testbenches.
//
// build() takes a query of 2-bit nucleotide codes and fills the backbone and
// overflow tables the way the hitter expects them: for every 8-residue word
// (16 bits, first residue in the high bits) starting at query offset i,
// backbone[word] is -1 if the word never occurs, the offset if it occurs once,
// and -base if it occurs several times, with overflow[base..] holding the
// offsets in increasing order followed by -1. Lists start at address 2 so that
// every pointer is <= -2. occ[word] gives the expected offsets directly from
// the query, independently of the tables.
package seed_model_pkg;

  localparam int NWORDS = 65536;

  typedef int unsigned offq_t[$];

  logic [15:0] bb [NWORDS];
  logic [15:0] ov [NWORDS];
  int          ov_used;
  offq_t       occ [NWORDS];

  function automatic logic [15:0] word_at(const ref logic [1:0] q[], input int i);
    logic [15:0] w = '0;
    for (int k = 0; k < 8; k++) w = {w[13:0], q[i+k]};
    return w;
  endfunction

  function automatic void build(const ref logic [1:0] q[]);
    int base;
    for (int w = 0; w < NWORDS; w++) begin
      occ[w].delete();
      bb[w] = 16'hFFFF;
      ov[w] = 16'hFFFF;
    end
    for (int i = 0; i + 8 <= q.size(); i++) occ[word_at(q, i)].push_back(i);
    base = 2;
    for (int w = 0; w < NWORDS; w++) begin
      if (occ[w].size() == 1) bb[w] = 16'(occ[w][0]);
      else if (occ[w].size() > 1) begin
        bb[w] = 16'(-base);
        foreach (occ[w][k]) ov[base + k] = 16'(occ[w][k]);
        ov[base + occ[w].size()] = 16'hFFFF;
        base += occ[w].size() + 1;
      end
    end
    ov_used = base;
  endfunction

  // Cycles from the start cycle to ended, without stalls.
  function automatic int latency(int unsigned n);
    return (n <= 1) ? 2 : n + 4;
  endfunction

endpackage
