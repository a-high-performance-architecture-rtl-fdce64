// cls_tb_pkg: testbench helpers for the packet classifier: random 5-tuple
// rules built from a few header templates, per-unit byte orders, and
// translation of a rule into a unit's byte order.
//
// Header layout (104 bits, byte 0 first): source IP (bytes 0-3), destination
// IP (4-7), protocol (8), source port (9-10), destination port (11-12).
// Each rule field is a prefix (IP addresses) or exact-or-any (protocol and
// ports). A rule's terminal value is {action, priority} as pc_pkg::match_t.
package cls_tb_pkg;
  import pc_pkg::*;
  import bdd_build_pkg::*;

  localparam int NT = 6;   // header templates

  typedef logic [HDR_W-1:0] hdr_t;

  function automatic hdr_t rand_hdr();
    hdr_t h;
    for (int i = 0; i < HDR_BYTES; i++) h[HDR_W-1-8*i -: 8] = 8'($urandom);
    return h;
  endfunction

  // A template header with some bytes replaced at random.
  function automatic hdr_t near_hdr(hdr_t tmpl[NT]);
    hdr_t h = tmpl[$urandom_range(0, NT - 1)];
    int n = $urandom_range(0, 3);
    for (int k = 0; k < n; k++) begin
      int b = $urandom_range(0, HDR_BYTES - 1);
      h[HDR_W-1-8*b -: 8] = 8'($urandom);
    end
    return h;
  endfunction

  // Random rule around a template; prio must be unique per rule-set.
  function automatic rule_t gen_rule(hdr_t tmpl[NT], int prio);
    rule_t r;
    int slen, dlen;
    hdr_t care = '0;
    r.val = '0;
    r.val[HDR_W-1:0] = tmpl[$urandom_range(0, NT - 1)];
    slen = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(8, 32);
    dlen = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(8, 32);
    for (int b = 0; b < slen; b++) care[HDR_W-1-b] = 1'b1;
    for (int b = 0; b < dlen; b++) care[HDR_W-33-b] = 1'b1;
    if ($urandom_range(0, 1) == 0) care[HDR_W-65 -: 8]  = 8'hFF;
    if ($urandom_range(0, 2) == 0) care[HDR_W-73 -: 16] = 16'hFFFF;
    if ($urandom_range(0, 1) == 0) care[HDR_W-89 -: 16] = 16'hFFFF;
    r.care = '0;
    r.care[HDR_W-1:0] = care;
    r.val  = r.val & r.care;
    r.prio = prio;
    r.res  = 64'({ACTION_W'($urandom_range(1, 255)), PRIO_W'(prio)});
    return r;
  endfunction

  // The catch-all rule every subset holds: priority 0, action 0.
  function automatic rule_t default_rule();
    rule_t r;
    r.val = '0; r.care = '0; r.prio = 0; r.res = 0;
    return r;
  endfunction

  // Byte j of the reordered header is byte perm[j] of the original.
  function automatic hdr_t permute(hdr_t h, int perm[HDR_BYTES]);
    hdr_t o;
    for (int j = 0; j < HDR_BYTES; j++) o[HDR_W-1-8*j -: 8] = h[HDR_W-1-8*perm[j] -: 8];
    return o;
  endfunction

  function automatic rule_t permute_rule(rule_t r, int perm[HDR_BYTES]);
    rule_t o = r;
    o.val  = '0; o.care = '0;
    o.val[HDR_W-1:0]  = permute(r.val[HDR_W-1:0], perm);
    o.care[HDR_W-1:0] = permute(r.care[HDR_W-1:0], perm);
    return o;
  endfunction

  // A random byte order (identity for unit 0).
  function automatic void rand_perm(int unit, output int perm[HDR_BYTES]);
    for (int j = 0; j < HDR_BYTES; j++) perm[j] = j;
    if (unit != 0) begin
      for (int j = HDR_BYTES - 1; j > 0; j--) begin
        int r = $urandom_range(0, j);
        int t = perm[j];
        perm[j] = perm[r]; perm[r] = t;
      end
    end
  endfunction

endpackage
