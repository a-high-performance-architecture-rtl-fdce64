// bdd_build_pkg: testbench-side compiler from a prioritised rule list to the
// node words of a decision-diagram pipeline, plus a reference classifier.
//
// A rule is a ternary pattern over the key (val, care: care bit 1 means the
// key bit must equal val) with a priority and the terminal value to report
// (larger priority wins). The compiler walks the key from its most
// significant bit: the first root_bits bits select root node 0..2^root_bits-1
// directly, then each level consumes `stride` bits. A node is identified by
// the set of rules still matching the bits read so far; equal sets share one
// node, so the result is a decision diagram with no skipped levels. Word
// {node, bits} of level l holds the child node number, or on the last level
// the terminal of the best rule left. Up to 64 rules per diagram.
package bdd_build_pkg;

  typedef struct {
    logic [127:0]    val;
    logic [127:0]    care;
    int unsigned     prio;
    longint unsigned res;
  } rule_t;

  typedef struct {
    int unsigned     level;
    int unsigned     addr;
    longint unsigned data;
  } wr_t;

  // Do key bits [hi -: n] == v agree with rule r?
  function automatic bit bits_match(rule_t r, int hi, int n, int unsigned v);
    for (int b = 0; b < n; b++) begin
      if (r.care[hi-b] && (r.val[hi-b] != v[n-1-b])) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Terminal of the highest-priority rule in `set` (0 if none).
  function automatic longint unsigned best_res(rule_t rules[$], logic [63:0] set);
    int bi = -1;
    for (int i = 0; i < rules.size(); i++)
      if (set[i] && (bi < 0 || rules[i].prio > rules[bi].prio)) bi = i;
    return (bi < 0) ? 64'd0 : rules[bi].res;
  endfunction

  // Reference: index of the highest-priority rule matching the whole key.
  function automatic int ref_best(rule_t rules[$], logic [127:0] key, int key_w);
    int bi = -1;
    for (int i = 0; i < rules.size(); i++) begin
      logic [127:0] diff;
      diff = (rules[i].val ^ key) & rules[i].care;
      if ((diff & ((128'd1 << key_w) - 128'd1)) == '0 && (bi < 0 || rules[i].prio > rules[bi].prio)) bi = i;
    end
    return bi;
  endfunction

  // Compile `rules` into the words of every level.
  task automatic build(input int key_w, input int root_bits, input int stride,
                       input rule_t rules[$], output wr_t wrs[$], output int max_nodes);
    logic [63:0] cur[$];
    logic [63:0] nxt[$];
    int          levels;
    wrs.delete();
    levels    = (key_w - root_bits) / stride;
    max_nodes = 0;
    if (root_bits == 0) begin
      logic [63:0] all = '0;
      for (int i = 0; i < rules.size(); i++) all[i] = 1'b1;
      cur.push_back(all);
    end else begin
      for (int v = 0; v < (1 << root_bits); v++) begin
        logic [63:0] s = '0;
        for (int i = 0; i < rules.size(); i++)
          if (bits_match(rules[i], key_w-1, root_bits, v)) s[i] = 1'b1;
        cur.push_back(s);
      end
    end
    for (int l = 0; l < levels; l++) begin
      int id[logic [63:0]];
      int hi = key_w - 1 - root_bits - l*stride;
      if (cur.size() > max_nodes) max_nodes = cur.size();
      id.delete();
      nxt.delete();
      for (int n = 0; n < cur.size(); n++) begin
        for (int v = 0; v < (1 << stride); v++) begin
          logic [63:0] s = '0;
          wr_t w;
          for (int i = 0; i < rules.size(); i++)
            if (cur[n][i] && bits_match(rules[i], hi, stride, v)) s[i] = 1'b1;
          w.level = l;
          w.addr  = (n << stride) | v;
          if (l == levels - 1) begin
            w.data = best_res(rules, s);
          end else begin
            if (!id.exists(s)) begin
              id[s] = nxt.size();
              nxt.push_back(s);
            end
            w.data = id[s];
          end
          wrs.push_back(w);
        end
      end
      cur = nxt;
    end
  endtask

endpackage
